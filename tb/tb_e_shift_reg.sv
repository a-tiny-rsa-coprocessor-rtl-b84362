// tb_e_shift_reg: self-checking testbench of the exponent shift register
// (H = 64). After loading a random exponent, e_msb must show e_{63}, e_{62},
// ... e_0 and then zeros as shift pulses arrive at random clocks, and must
// hold between shifts. A reload in the middle restarts from the new MSB.
module tb_e_shift_reg;

  localparam int unsigned H = 64;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [H-1:0] e_in;
  logic e_msb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  e_shift_reg #(.H(H)) dut (.*);

  task automatic chk(input logic expect_bit, input string what);
    checks++;
    if (e_msb !== expect_bit) begin
      failures++;
      $display("FAIL %s: e_msb=%b expected %b", what, e_msb, expect_bit);
    end
  endtask

  initial begin
    logic [H-1:0] ev;
    e_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      ev = {$urandom(), $urandom()};
      e_in = ev;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      e_in = ~ev;          // input changes must not matter after load
      for (int i = H - 1; i >= -2; i--) begin
        chk(i >= 0 ? ev[i] : 1'b0, "bit");
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);   // no shift: must hold
          chk(i >= 0 ? ev[i] : 1'b0, "hold");
        end
        if (t == 5 && i == 30) break;   // abandon this one, reload next round
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
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
