// rsa_coprocessor: N-bit RSA modular exponentiation, rsa_result = M^E mod N,
// built around a single systolic Montgomery multiplier with built-in final
// subtraction (mont_mult).
//
// Data path: operand mux A chooses 1, P or Nr = 2^(2N) mod N (con4) for the
// bit-serial operand X; operand mux B chooses M, R or P (con2) for the
// word-parallel operand Y; the modulus goes straight to the multiplier. The
// multiplier returns S (not reduced), S - M and the carry CS^e of the
// subtraction; the output mux writes S - M when CS^e = 1 and S otherwise, into
// P or R as con1 says. P holds the running power and is the result; R holds
// M in Montgomery form. rsa_ctrl_fsm sequences the left-to-right binary
// method and e_shift_reg presents the exponent bits MSB first. This structure
// follows the design description; the port handshake is this design's.
//
// Interface: pulse start for one clock while busy is low, with nr, e_exp,
// n_mod and m_msg valid; they must stay stable until rsa_done, which pulses
// for one clock when rsa_result is valid. rsa_result holds until the next
// start. n_mod must be odd, m_msg < n_mod, nr = 2^(2N) mod n_mod.
// Timing: each multiplication takes N + N/W + 3 clocks plus one clock of
// handshake, and an exponentiation 3 + N + popcount(E) multiplications.
module rsa_coprocessor
  import rsa_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] nr,
  input  logic [N-1:0] e_exp,
  input  logic [N-1:0] n_mod,
  input  logic [N-1:0] m_msg,
  output logic         rsa_done,
  output logic [N-1:0] rsa_result,
  output logic         busy
);

  localparam int unsigned E = num_words(N, W);

  logic           mul_start, mul_done, mul_busy, cs;
  logic [E*W-1:0] s, s_sub;
  logic [N-1:0]   op_a, op_b, prod;
  logic [N-1:0]   p_q, r_q;
  opa_sel_e       con4;
  opb_sel_e       con2;
  logic           con1, con3, wr_en, e_load, e_msb;

  rsa_ctrl_fsm #(.H(N)) u_ctrl (
    .clk, .rst_n, .start, .mul_done, .e_msb,
    .mul_start, .con4, .con2, .con1, .wr_en, .con3, .e_load,
    .rsa_done, .busy);

  e_shift_reg #(.H(N)) u_e_sr (
    .clk, .rst_n, .load(e_load), .shift(con3), .e_in(e_exp), .e_msb);

  always_comb begin
    unique case (con4)
      OPA_ONE: op_a = N'(1);
      OPA_P:   op_a = p_q;
      default: op_a = nr;
    endcase
    unique case (con2)
      OPB_M:   op_b = m_msg;
      OPB_R:   op_b = r_q;
      default: op_b = p_q;
    endcase
  end

  mont_mult #(.N(N), .W(W)) u_mult (
    .clk, .rst_n, .start(mul_start), .x(op_a), .y(op_b), .m(n_mod),
    .s, .s_sub, .cs, .done(mul_done), .busy(mul_busy));

  // output mux: S - M when S >= M, else S
  assign prod = cs ? s_sub[N-1:0] : s[N-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= '0;
      r_q <= '0;
    end else if (e_load) begin
      p_q <= N'(1);
    end else if (wr_en) begin
      if (con1) r_q <= prod;
      else      p_q <= prod;
    end
  end

  assign rsa_result = p_q;

  assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy);

endmodule
