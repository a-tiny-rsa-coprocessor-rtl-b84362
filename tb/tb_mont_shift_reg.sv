// tb_mont_shift_reg: self-checking testbench of the tapped delay line
// (WIDTH = 2, DEPTH = 9). A random stream is fed in; tap k must show the
// value fed k clocks earlier (tap 0 the current input), and all taps must be
// 0 after reset.
module tb_mont_shift_reg;

  localparam int unsigned WIDTH = 2;
  localparam int unsigned DEPTH = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [WIDTH-1:0] d = '0;
  logic [WIDTH-1:0] taps [DEPTH];
  logic [WIDTH-1:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_shift_reg #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    for (int k = 1; k < DEPTH; k++) begin
      checks++;
      if (taps[k] != '0) failures++;
    end
    rst_n = 1'b1;
    for (int k = 0; k < DEPTH; k++) hist.push_front('0);
    for (int t = 0; t < 500; t++) begin
      d = WIDTH'($urandom());
      hist.push_front(d);
      hist.pop_back();
      #1;
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (taps[k] != hist[k]) begin
          failures++;
          $display("FAIL t=%0d tap %0d = %0d expected %0d", t, k, taps[k], hist[k]);
        end
      end
      @(negedge clk);
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
