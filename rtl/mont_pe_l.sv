// mont_pe_l: processing element of type L, the last PE of the systolic
// Montgomery multiplier. It owns the top word e-1 of the running sum, above
// the N bits of Y and M, so it only adds the carry from PE e-2 to its shifted
// word: (C, T) = (0, S_{w-1..1}) + C^(e-1).
//
// The bit shifted into the top of this word is always 0 because the sum
// stays below 4M < 2^(N+2); the PE therefore needs no odd/even copies and no
// selection, and its carry out is always 0. That bound argument is this
// design's; the addition itself follows the design description.
//
// Control: CTL_ADD adds, all other states hold; clr zeroes the word.
// t0 (S_0 of this word) goes to PE e-2 to choose its copy.
module mont_pe_l
  import rsa_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clr,
  input  pe_ctl_e      ctl,
  input  logic [1:0]   c_in,     // C^(e-1)
  output logic [W-1:0] s_word,   // S^(e-1)
  output logic         t0        // S_0^(e-1)
);

  logic [W-1:0] t_q;
  logic [W:0]   sum;

  always_comb begin
    s_word = {1'b0, t_q[W-1:1]};
    t0     = t_q[0];
    sum    = {2'b00, t_q[W-1:1]} + {{(W-1){1'b0}}, c_in};
  end

  always_ff @(posedge clk) begin
    if (clr)                  t_q <= '0;
    else if (ctl == CTL_ADD)  t_q <= sum[W-1:0];
  end

  assert property (@(posedge clk) ctl == CTL_ADD |-> sum[W] == 1'b0);

endmodule
