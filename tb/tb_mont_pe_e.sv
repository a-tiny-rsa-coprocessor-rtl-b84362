// tb_mont_pe_e: self-checking testbench of the E type processing element
// (W = 32). A reference keeps the full even-copy sum word T (W+2 bits) of the
// last add. In every clock the testbench picks a random s0_next; the PE must
// present c_out = T_sel >> W, s_word = {s0_next, T_sel[W-1:1]} and t0 = T[0],
// where T_sel = T + s0_next * 2^(W-1). An add clock with random x, q, Y, M and
// carry (0..2) then forms T' = (T_sel >> 1) + x*Y + q*M + C. Also checked:
// clr zeroes the PE, the live s0_next selects during add clocks, LOCK keeps the selection through later IDLE clocks while
// s0_next changes, and IDLE holds the word.
module tb_mont_pe_e;
  import rsa_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0, clr = 1'b0;
  pe_ctl_e ctl = CTL_IDLE;
  logic x = 1'b0, q = 1'b0, s0_next = 1'b0;
  logic [W-1:0] y = '0, m = '0;
  logic [1:0] c_in = '0, c_out;
  logic [W-1:0] s_word;
  logic t0;
  int checks = 0, failures = 0;

  logic [W+1:0] t_ref;       // even copy of the last sum
  logic         lock_ref;

  always #5 clk = ~clk;

  mont_pe_e dut (.*);

  function automatic logic [W+1:0] sel_sum(input logic b);
    return t_ref + (b ? {2'b00, 1'b1, {(W-1){1'b0}}} : '0);
  endfunction

  task automatic check_out(input logic b, input string what);
    logic [W+1:0] ts;
    ts = sel_sum(b);
    checks++;
    if (c_out != ts[W+1:W] || s_word != {s0_next, ts[W-1:1]} || t0 != t_ref[0]) begin
      failures++;
      $display("FAIL %s: c_out=%0d s_word=%h t0=%b expect c=%0d s=%h t0=%b", what, c_out, s_word,
               t0, ts[W+1:W], {s0_next, ts[W-1:1]}, t_ref[0]);
    end
  endtask

  initial begin
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    t_ref = '0;
    check_out(1'b0, "after clr");
    for (int t = 0; t < 3000; t++) begin
      logic [W+1:0] ts;
      // choose the neighbour bit, check the selected outputs
      s0_next = $urandom_range(0, 1);
      ctl  = CTL_ADD;   // the live neighbour bit selects during an add
      #1;
      check_out(s0_next, "select");
      // one add
      x    = $urandom_range(0, 1);
      q    = $urandom_range(0, 1);
      y    = $urandom();
      m    = $urandom();
      c_in = 2'($urandom_range(0, 2));
      ts   = sel_sum(s0_next);
      @(negedge clk);
      t_ref = {3'b000, ts[W-1:1]} + (x ? {2'b00, y} : '0) + (q ? {2'b00, m} : '0) + {{W{1'b0}}, c_in};
      ctl = CTL_IDLE;
      // now and then an idle clock that must hold the word
      if (t % 7 == 3) begin
        x = ~x; y = $urandom(); c_in = '0;
        @(negedge clk);
      end
    end
    // LOCK keeps the selection
    lock_ref = 1'b1;
    s0_next = lock_ref;
    ctl = CTL_LOCK;
    @(negedge clk);
    ctl = CTL_IDLE;
    s0_next = 1'b0;
    #1;
    begin
      logic [W+1:0] ts;
      ts = sel_sum(lock_ref);
      checks++;
      if (c_out != ts[W+1:W] || s_word[W-2:0] != ts[W-1:1]) begin
        failures++;
        $display("FAIL lock: selection not kept");
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
