// tb_rsa_coprocessor: end-to-end test of the RSA coprocessor at N = 32,
// W = 8 (5 words per multiplier).
//  1. RSA round trip with a real key: n = 65521 * 65519, e = 65537, d = e^-1
//     mod phi(n) computed here by the extended Euclidean algorithm; each
//     message is encrypted and decrypted on the coprocessor and must come back,
//     and the ciphertext must equal a square-and-multiply reference.
//  2. Random odd moduli, messages and exponents (including E = 0, E = 1 and
//     all ones) against the reference.
// For every run the clock count from start to rsa_done is checked against
// 1 + (3 + N + popcount(E)) * (N + e + 3). It also counts how often each
// mechanism happened: squaring, multiplying (e_i = 1), skipped multiply
// (e_i = 0), final subtraction taken and not taken; one that never happened
// counts as a failure.
module tb_rsa_coprocessor;
  import rsa_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned W  = 8;
  localparam int unsigned EW = num_words(N, W);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] nr, e_exp, n_mod, m_msg, rsa_result;
  logic rsa_done, busy;
  int checks = 0, failures = 0;
  int n_sqr = 0, n_mul = 0, n_skip = 0, n_sub = 0, n_nosub = 0;

  always #5 clk = ~clk;

  rsa_coprocessor #(.N(N), .W(W)) dut (.*);

  // mechanism counters, sampled on the write-back of each product
  always @(posedge clk) if (rst_n && dut.wr_en) begin
    if (dut.u_ctrl.state_q == 3'(3)) begin       // S_SQR
      n_sqr++;
      if (!dut.e_msb) n_skip++;
    end
    if (dut.u_ctrl.state_q == 3'(4)) n_mul++;    // S_MUL
    if (dut.cs) n_sub++; else n_nosub++;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: n=%h e=%h m=%h result=%h", what, n_mod, e_exp, m_msg, rsa_result);
    end
  endtask

  function automatic logic [N-1:0] ref_modexp(input logic [N-1:0] b, input logic [N-1:0] ex,
                                              input logic [N-1:0] md);
    logic [2*N-1:0] acc, base, mm;
    mm = {{N{1'b0}}, md};
    acc = 1 % mm;
    base = {{N{1'b0}}, b} % mm;
    for (int i = N - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (ex[i]) acc = (acc * base) % mm;
    end
    return acc[N-1:0];
  endfunction

  function automatic logic [63:0] modinv(input logic [63:0] a, input logic [63:0] md);
    longint t = 0, newt = 1, r = longint'(md), newr = longint'(a), qq, tmp;
    while (newr != 0) begin
      qq = r / newr;
      tmp = t - qq * newt; t = newt; newt = tmp;
      tmp = r - qq * newr; r = newr; newr = tmp;
    end
    if (t < 0) t += longint'(md);
    return 64'(t);
  endfunction

  task automatic run_exp(input logic [N-1:0] b, input logic [N-1:0] ex, input logic [N-1:0] md,
                         output logic [N-1:0] res);
    logic [2*N:0] r2;
    int cyc, expect_cyc;
    r2 = '0;
    r2[2*N] = 1'b1;
    nr = N'(r2 % {{(N+1){1'b0}}, md});
    e_exp = ex; n_mod = md; m_msg = b;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!rsa_done) begin
      @(negedge clk);
      cyc++;
    end
    expect_cyc = 1 + (3 + N + $countones(ex)) * (N + EW + 3);
    check("latency", cyc == expect_cyc);
    if (cyc != expect_cyc) $display("  clocks %0d expected %0d", cyc, expect_cyc);
    res = rsa_result;
    check("result", res == ref_modexp(b, ex, md));
    @(negedge clk);
    check("result held", rsa_result == res && !busy);
  endtask

  initial begin
    logic [N-1:0] nn, c, back, md, b;
    logic [63:0] phi, d;
    nr = '0; e_exp = '0; n_mod = 1; m_msg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // RSA key from two 16-bit primes
    nn  = N'(64'd65521 * 64'd65519);
    phi = 64'd65520 * 64'd65518;
    d   = modinv(64'd65537, phi);
    check("d * e = 1 mod phi", ((d * 64'd65537) % phi) == 64'd1);
    for (int t = 0; t < 4; t++) begin
      b = N'($urandom()) % nn;
      run_exp(b, N'(65537), nn, c);
      run_exp(c, N'(d), nn, back);
      check("decrypt(encrypt(m)) == m", back == b);
    end

    // random moduli and exponents
    for (int t = 0; t < 8; t++) begin
      md = N'($urandom()) | 1;
      if (t % 2 == 0) md[N-1] = 1'b1;
      b = N'($urandom()) % md;
      run_exp(b, N'($urandom()), md, c);
    end
    md = N'($urandom()) | 32'h8000_0001;
    b  = N'($urandom()) % md;
    run_exp(b, '0, md, c);
    run_exp(b, N'(1), md, c);
    run_exp(b, '1, md, c);
    run_exp('0, N'(5), md, c);

    $display("squarings %0d, multiplies %0d, skipped multiplies %0d, subtraction taken %0d / not taken %0d",
             n_sqr, n_mul, n_skip, n_sub, n_nosub);
    check("squaring happened", n_sqr > 0);
    check("multiply happened", n_mul > 0);
    check("skipped multiply happened", n_skip > 0);
    check("final subtraction taken", n_sub > 0);
    check("final subtraction not taken", n_nosub > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
