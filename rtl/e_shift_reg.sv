// e_shift_reg: exponent register of the RSA coprocessor. It is loaded with
// the H-bit exponent E and shifted left by one on every 'shift' (Con3 of the
// control FSM), so e_msb is always the exponent bit e_i the left-to-right
// binary method is working on, from e_{H-1} down to e_0. Zeros enter at the
// bottom. The block and its role follow the design description; the shift
// direction and the load/shift interface are this design's choices.
module e_shift_reg #(
  parameter int unsigned H = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [H-1:0] e_in,
  output logic         e_msb
);

  logic [H-1:0] e_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      e_q <= '0;
    else if (load)   e_q <= e_in;
    else if (shift)  e_q <= {e_q[H-2:0], 1'b0};
  end

  assign e_msb = e_q[H-1];

endmodule
