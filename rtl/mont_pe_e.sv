// mont_pe_e: processing element of type E of the systolic Montgomery
// multiplier. It owns word j (1 <= j <= e-2) of the running sum S.
//
// Radix-2 Montgomery step: S <- (S + x_i*Y + q_i*M) / 2. Word j of the new S
// is (T_0^(j+1), T_{w-1..1}^(j)) where T^(j) is this PE's w-bit sum word, so
// the top bit of the word this PE needs for its next step comes from the
// right neighbour, which computes it in the very same clock. Instead of
// waiting, the PE adds twice per clock: once with that unknown top bit at 0
// (even copy SE/CE) and once at 1 (odd copy SO/CO). The two sums differ only
// in bit w-1 and in the carry, so the low w-1 bits are stored once. One clock
// later the neighbour's registered S_0 (input s0_next) picks the right copy
// through two multiplexers, for this PE's own next sum and for the carry it
// passes right. This odd/even scheme, the register and the two output MUXes
// follow the design description; the carry being 2 bits wide and the use of
// one behavioural adder in place of the drawn two CSA levels are this
// design's choices.
//
// Control (pe_ctl_e): CTL_ADD adds, CTL_LOCK latches s0_next so that the final
// word stays selected, other states hold. clr (one clock at operation start)
// zeroes the word, i.e. S = 0.
//
// Timing: c_out and s_word are valid one clock after the ADD cycle that wrote
// the copies, once the right neighbour's t0 has been registered.
module mont_pe_e
  import rsa_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clr,
  input  pe_ctl_e      ctl,
  input  logic         x,        // x_{i-j}
  input  logic         q,        // q_{i-j}
  input  logic [W-1:0] y,        // Y^(j)
  input  logic [W-1:0] m,        // M^(j)
  input  logic [1:0]   c_in,     // C^(j), from PE j-1
  input  logic         s0_next,  // S_0^(j+1), from PE j+1
  output logic [1:0]   c_out,    // C^(j+1), to PE j+1
  output logic [W-1:0] s_word,   // S^(j)
  output logic         t0        // S_0^(j), to PE j-1
);

  logic [W-2:0] t_lo_q;          // shared bits T_{w-2..0}
  logic         so_q, se_q;      // bit w-1, odd / even copy
  logic [1:0]   co_q, ce_q;      // carry, odd / even copy
  logic         sel_lock_q;      // S_temp: locked S_0^(j+1)

  logic         sel;
  logic [W-1:0] t_res;
  logic [W+1:0] sum_e, sum_o;

  always_comb begin
    sel    = (ctl == CTL_ADD || ctl == CTL_LOCK) ? s0_next : sel_lock_q;
    t_res  = {sel ? so_q : se_q, t_lo_q};
    c_out  = sel ? co_q : ce_q;
    s_word = {s0_next, t_res[W-1:1]};
    t0     = t_lo_q[0];
    // even copy: unknown top bit of the shifted word taken as 0
    sum_e  = {3'b000, t_res[W-1:1]}
           + (x ? {2'b00, y} : '0)
           + (q ? {2'b00, m} : '0)
           + {{W{1'b0}}, c_in};
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

  // The odd copy can never carry past 2: sum < 3 * 2^w.
  assert property (@(posedge clk) ctl == CTL_ADD |-> sum_o[W+1:W] != 2'b11);

endmodule
