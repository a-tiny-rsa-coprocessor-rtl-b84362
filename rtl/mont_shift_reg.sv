// mont_shift_reg: tapped delay line that carries x_i, q_i and the Control
// state along the PE row of the systolic Montgomery multiplier.
//
// taps[0] is the input itself (for PE#0); taps[k] is the input delayed by k
// clocks (for PE#k), so PE#k works on bit i-k while PE#0 works on bit i. The
// three shift registers along the PE row follow the design description; one
// stage per PE and the asynchronous reset to zero are this design's choices.
module mont_shift_reg #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 33
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] taps [DEPTH]
);

  logic [WIDTH-1:0] stage_q [1:DEPTH-1];

  always_comb begin
    taps[0] = d;
    for (int k = 1; k < DEPTH; k++) taps[k] = stage_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < DEPTH; k++) stage_q[k] <= '0;
    end else begin
      stage_q[1] <= d;
      for (int k = 2; k < DEPTH; k++) stage_q[k] <= stage_q[k-1];
    end
  end

  initial assert (DEPTH >= 2) else $error("mont_shift_reg needs DEPTH >= 2");

endmodule
