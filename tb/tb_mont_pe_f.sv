// tb_mont_pe_f: self-checking testbench of the F type processing element
// (W = 32). A reference keeps the even-copy sum word T of the last add. Each
// clock a random s0_next selects T_sel = T + s0_next * 2^(W-1); the PE must
// give c_out = T_sel >> W and s_word = {s0_next, T_sel[W-1:1]}, and during an
// add with random x, Y and odd M the quotient bit q = (x & Y_0) ^ T_sel[1]
// and the new sum T' = (T_sel >> 1) + x*Y + q*M, whose bit 0 must be 0. q must
// be 0 outside the add state. clr and LOCK are checked as well.
module tb_mont_pe_f;
  import rsa_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0, clr = 1'b0;
  pe_ctl_e ctl = CTL_IDLE;
  logic x = 1'b0, s0_next = 1'b0, q;
  logic [W-1:0] y = '0, m = '1;
  logic [1:0] c_out;
  logic [W-1:0] s_word;
  int checks = 0, failures = 0, q_ones = 0;

  logic [W+1:0] t_ref;

  always #5 clk = ~clk;

  mont_pe_f dut (.*);

  function automatic logic [W+1:0] sel_sum(input logic b);
    return t_ref + (b ? {2'b00, 1'b1, {(W-1){1'b0}}} : '0);
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    t_ref = '0;
    for (int t = 0; t < 3000; t++) begin
      logic [W+1:0] ts;
      logic qr;
      s0_next = $urandom_range(0, 1);
      ctl = CTL_IDLE;
      x   = 1'b1;
      #1;
      chk(q == 1'b0, "q idle");
      ctl = CTL_ADD;
      x   = $urandom_range(0, 1);
      y   = $urandom();
      m   = $urandom() | 1;
      #1;
      ts = sel_sum(s0_next);
      chk(c_out == ts[W+1:W] && s_word == {s0_next, ts[W-1:1]}, "select");
      qr = (x & y[0]) ^ ts[1];
      chk(q == qr, "q");
      if (qr) q_ones++;
      @(negedge clk);
      t_ref = {3'b000, ts[W-1:1]} + (x ? {2'b00, y} : '0) + (qr ? {2'b00, m} : '0);
      chk(t_ref[0] == 1'b0, "reference sum even");
    end
    chk(q_ones > 100, "q took both values");
    // LOCK keeps the selection
    s0_next = 1'b1;
    ctl = CTL_LOCK;
    @(negedge clk);
    ctl = CTL_IDLE;
    s0_next = 1'b0;
    #1;
    begin
      logic [W+1:0] ts;
      ts = sel_sum(1'b1);
      chk(c_out == ts[W+1:W] && s_word[W-2:0] == ts[W-1:1], "lock");
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
