// tb_rsa_full: one complete 1024-bit modular exponentiation on the RSA
// coprocessor at its default parameters (N = 1024, W = 32). The modulus is a
// random odd 1024-bit number with its top bit set, the message a random value
// below it and the exponent a random full-width 1024-bit number. The result
// is compared with a square-and-multiply reference computed here with plain
// wide arithmetic, and the clock count with
// 1 + (3 + 1024 + popcount(E)) * (1024 + 33 + 3).
module tb_rsa_full;

  localparam int unsigned N  = 1024;
  localparam int unsigned EW = 33;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] nr, e_exp, n_mod, m_msg, rsa_result;
  logic rsa_done, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_coprocessor dut (.*);

  function automatic logic [N-1:0] rnd_n();
    logic [N-1:0] v;
    for (int k = 0; k < N; k += 32) v[k +: 32] = $urandom();
    return v;
  endfunction

  function automatic logic [N-1:0] ref_modexp(input logic [N-1:0] b, input logic [N-1:0] ex,
                                              input logic [N-1:0] md);
    logic [2*N-1:0] acc, base, mm;
    mm = {{N{1'b0}}, md};
    acc = 1;
    base = {{N{1'b0}}, b};
    for (int i = N - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (ex[i]) acc = (acc * base) % mm;
    end
    return acc[N-1:0];
  endfunction

  initial begin
    logic [2*N:0] r2;
    logic [N-1:0] expect_res;
    int cyc, expect_cyc;
    n_mod = rnd_n();
    n_mod[N-1] = 1'b1;
    n_mod[0] = 1'b1;
    m_msg = rnd_n() % n_mod;
    e_exp = rnd_n();
    e_exp[N-1] = 1'b1;
    r2 = '0;
    r2[2*N] = 1'b1;
    nr = N'(r2 % {1'b0, n_mod});
    expect_res = ref_modexp(m_msg, e_exp, n_mod);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!rsa_done) begin
      @(negedge clk);
      cyc++;
    end
    expect_cyc = 1 + (3 + N + $countones(e_exp)) * (N + EW + 3);
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("FAIL clocks %0d expected %0d", cyc, expect_cyc);
    end
    checks++;
    if (rsa_result != expect_res) begin
      failures++;
      $display("FAIL result\n  got    %h\n  expect %h", rsa_result, expect_res);
    end
    $display("1024-bit exponentiation: %0d clocks, %0d multiplications", cyc, 3 + N + $countones(e_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
