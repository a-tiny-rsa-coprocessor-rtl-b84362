// mont_pe_s: processing element of type S, one word of the final subtraction
// of the Montgomery multiplication, S - M = S + ~M + 1.
//
// The e S PEs form a word-serial subtractor: when word i of S becomes final
// (en, one clock after the E/F PE owning it locked its result), this PE forms
// (CS^(i), S_sub^(i)) = S^(i) + ~M^(i) + CS^(i-1) and registers both. The
// carry of PE i reaches PE i+1 exactly when word i+1 becomes final, so the
// whole subtraction ends e clocks after the first word, with no long carry
// chain. The carry into the first word is 1. The adder follows the design
// description; registering one word per clock is this design's choice.
// The last carry, CS^e, is 1 when S >= M.
module mont_pe_s #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] s_word,   // S^(i)
  input  logic [W-1:0] m,        // M^(i)
  input  logic         c_in,     // CS^(i-1)
  output logic [W-1:0] s_sub,    // S_sub^(i)
  output logic         c_out     // CS^(i)
);

  logic [W:0] sum;
  assign sum = {1'b0, s_word} + {1'b0, ~m} + {{W{1'b0}}, c_in};

  always_ff @(posedge clk) begin
    if (clr) begin
      s_sub <= '0;
      c_out <= 1'b0;
    end else if (en) begin
      s_sub <= sum[W-1:0];
      c_out <= sum[W];
    end
  end

endmodule
