// tb_mont_pe_l: self-checking testbench of the L type processing element
// (W = 32). After clr the word is 0; every add clock must give
// T' = (T >> 1) + C for a random carry C in 0..2, seen as
// s_word = {0, T'[W-1:1]} and t0 = T'[0]; non-add clocks hold the word.
module tb_mont_pe_l;
  import rsa_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0, clr = 1'b0;
  pe_ctl_e ctl = CTL_IDLE;
  logic [1:0] c_in = '0;
  logic [W-1:0] s_word;
  logic t0;
  int checks = 0, failures = 0;
  logic [W-1:0] t_ref;

  always #5 clk = ~clk;

  mont_pe_l dut (.*);

  initial begin
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    t_ref = '0;
    for (int t = 0; t < 2000; t++) begin
      checks++;
      if (s_word != {1'b0, t_ref[W-1:1]} || t0 != t_ref[0]) begin
        failures++;
        $display("FAIL step %0d: s_word=%h t0=%b expect %h %b", t, s_word, t0,
                 {1'b0, t_ref[W-1:1]}, t_ref[0]);
      end
      // start from a large word now and then so the shift is visible
      if (t % 100 == 0) begin
        ctl = CTL_IDLE;
        clr = 1'b1;
        @(negedge clk);
        clr = 1'b0;
        t_ref = '0;
      end
      ctl  = pe_ctl_e'(($urandom_range(0, 3) == 0) ? CTL_IDLE : CTL_ADD);
      c_in = 2'($urandom_range(0, 2));
      @(negedge clk);
      if (ctl == CTL_ADD) t_ref = (t_ref >> 1) + W'(c_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
