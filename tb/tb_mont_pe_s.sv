// tb_mont_pe_s: self-checking testbench of the S type processing element.
// Four instances (W = 32) are chained as in the multiplier and enabled one per
// clock, lowest word first, to subtract a random 128-bit M from a random S;
// the joined S_sub words must equal (S - M) mod 2^128 and the last carry must
// be 1 exactly when S >= M. Outputs must hold while en is low.
module tb_mont_pe_s;

  localparam int unsigned W = 32;
  localparam int unsigned K = 4;

  logic clk = 1'b0, clr = 1'b0;
  logic en [K];
  logic [K*W-1:0] s_all, m_all, sub_all;
  logic c [K+1];
  int checks = 0, failures = 0, n_ge = 0, n_lt = 0;

  always #5 clk = ~clk;

  assign c[0] = 1'b1;
  for (genvar j = 0; j < K; j++) begin : g
    mont_pe_s dut (.clk, .clr, .en(en[j]), .s_word(s_all[j*W +: W]),
                            .m(m_all[j*W +: W]), .c_in(c[j]),
                            .s_sub(sub_all[j*W +: W]), .c_out(c[j+1]));
  end

  initial begin
    for (int j = 0; j < K; j++) en[j] = 1'b0;
    s_all = '0; m_all = '0;
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int t = 0; t < 500; t++) begin
      logic [K*W-1:0] exp_sub;
      for (int k = 0; k < K; k++) begin
        s_all[k*W +: W] = $urandom();
        m_all[k*W +: W] = $urandom();
      end
      if (t % 4 == 1) m_all = s_all;                        // equal: S - M = 0
      if (t % 4 == 2) m_all[K*W-1 -: 8] = s_all[K*W-1 -: 8]; // close values
      for (int j = 0; j < K; j++) begin
        en[j] = 1'b1;
        @(negedge clk);
        en[j] = 1'b0;
      end
      @(negedge clk);
      exp_sub = s_all - m_all;
      checks++;
      if (sub_all != exp_sub || c[K] != (s_all >= m_all)) begin
        failures++;
        $display("FAIL s=%h m=%h sub=%h cs=%b", s_all, m_all, sub_all, c[K]);
      end
      if (s_all >= m_all) n_ge++; else n_lt++;
    end
    checks++;
    if (n_ge == 0 || n_lt == 0) failures++;
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
