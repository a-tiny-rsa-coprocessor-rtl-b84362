// mont_pe_f: processing element of type F, the first PE of the systolic
// Montgomery multiplier. It owns word 0 of the running sum S and produces the
// quotient bit of every step.
//
// For bit x_i the PE computes q_i = (x_i & Y_0) ^ S_0, gated by the Control
// state so that q_i is 0 outside the add phase, and adds x_i*Y^(0) + q_i*M^(0)
// to the shifted word. Like the E type PE it keeps two copies of the result,
// for the unknown top bit of its shifted word being 0 (SE/CE) or 1 (SO/CO),
// and the registered S_0 of PE#1 (s0_next) selects one of them a clock later.
// There is no carry in. The q_i logic, the odd/even copies and the MUXes
// follow the design description; the 2-bit carry and the single behavioural
// adder are this design's choices.
//
// Control: CTL_ADD adds, CTL_LOCK latches s0_next, other states hold; clr
// zeroes the word at operation start. q is combinational from registers and x.
module mont_pe_f
  import rsa_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clr,
  input  pe_ctl_e      ctl,
  input  logic         x,        // x_i
  input  logic [W-1:0] y,        // Y^(0)
  input  logic [W-1:0] m,        // M^(0)
  input  logic         s0_next,  // S_0^(1), from PE#1
  output logic         q,        // q_i
  output logic [1:0]   c_out,    // C^(1)
  output logic [W-1:0] s_word    // S^(0)
);

  logic [W-2:0] t_lo_q;
  logic         so_q, se_q;
  logic [1:0]   co_q, ce_q;
  logic         sel_lock_q;

  logic         sel;
  logic [W-1:0] t_res;
  logic [W+1:0] sum_e, sum_o;

  always_comb begin
    sel    = (ctl == CTL_ADD || ctl == CTL_LOCK) ? s0_next : sel_lock_q;
    t_res  = {sel ? so_q : se_q, t_lo_q};
    c_out  = sel ? co_q : ce_q;
    s_word = {s0_next, t_res[W-1:1]};
    // S_0 of the current word is t_res[1], which both copies share
    q      = ((x & y[0]) ^ t_res[1]) & (ctl == CTL_ADD);
    sum_e  = {3'b000, t_res[W-1:1]}
           + (x ? {2'b00, y} : '0)
           + (q ? {2'b00, m} : '0);
    sum_o  = sum_e + {2'b00, 1'b1, {(W-1){1'b0}}};
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      t_lo_q     <= '0;
      so_q       <= 1'b0;
      se_q       <= 1'b0;
      co_q       <= '0;
      ce_q       <= '0;
      sel_lock_q <= 1'b0;
    end else begin
      case (ctl)
        CTL_ADD: begin
          t_lo_q <= sum_e[W-2:0];
          se_q   <= sum_e[W-1];
          ce_q   <= sum_e[W+1:W];
          so_q   <= sum_o[W-1];
          co_q   <= sum_o[W+1:W];
        end
        CTL_LOCK: sel_lock_q <= s0_next;
        default: ;
      endcase
    end
  end

  // The sum with q_i*M added is even, so the shift loses nothing.
  assert property (@(posedge clk) ctl == CTL_ADD |-> sum_e[0] == 1'b0);

endmodule
