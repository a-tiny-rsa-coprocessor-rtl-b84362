// tb_rsa_workloads: the larger key sizes, 2048 and 4096 bits (W = 32).
//  - Montgomery multiplication: a few random products on mont_mult at
//    N = 2048 (65 words) and N = 4096 (129 words); each must satisfy
//    R * 2^N = X * Y (mod M), R < M, and take N + e + 2 clocks.
//  - One 2048-bit exponentiation with a random full-width
//    exponent on the coprocessor, against a square-and-multiply reference,
//    with the clock count 1 + (3 + N + popcount(E)) * (N + e + 3).
//  - The start of a 4096-bit exponentiation with a random full-width
//    exponent: the first 16 products written back (P = 2^N mod n,
//    R = M * 2^N mod n, then squarings and multiplies) must equal the
//    Montgomery-domain reference, N + e + 3 clocks apart. A whole 4096-bit
//    run (about 17 M clocks) is left out to keep the simulation short.
// Each unit has its own gated clock, so units that are not in use cost no
// simulation time. The 4096-bit reference uses shift-and-add modular
// multiplication, since the simulator limits the width of '%'.
module tb_rsa_workloads;
  import rsa_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // each unit gets its own gated clock so that idle units cost no run time
  logic en_m2 = 1'b0, en_m4 = 1'b0, en_r2 = 1'b0, en_r4 = 1'b0;
  logic clk_m2, clk_m4, clk_r2, clk_r4;

  always #5 clk = ~clk;
  assign clk_m2 = clk & (en_m2 | !rst_n);   // all clocks run during reset
  assign clk_m4 = clk & (en_m4 | !rst_n);
  assign clk_r2 = clk & (en_r2 | !rst_n);
  assign clk_r4 = clk & (en_r4 | !rst_n);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- Montgomery multipliers ----------------
  localparam int unsigned N2 = 2048, N4 = 4096;
  localparam int unsigned E2 = num_words(N2, W), E4 = num_words(N4, W);

  logic st2 = 1'b0, st4 = 1'b0;
  logic [N2-1:0] x2, y2, m2;
  logic [N4-1:0] x4, y4, m4;
  logic [E2*W-1:0] s2, ss2;
  logic [E4*W-1:0] s4, ss4;
  logic cs2, cs4, d2, d4, b2, b4;

  mont_mult #(.N(N2), .W(W)) u_mm2 (.clk(clk_m2), .rst_n, .start(st2), .x(x2), .y(y2), .m(m2),
                                    .s(s2), .s_sub(ss2), .cs(cs2), .done(d2), .busy(b2));
  mont_mult #(.N(N4), .W(W)) u_mm4 (.clk(clk_m4), .rst_n, .start(st4), .x(x4), .y(y4), .m(m4),
                                    .s(s4), .s_sub(ss4), .cs(cs4), .done(d4), .busy(b4));

  // ---------------- coprocessors ----------------
  logic rs2 = 1'b0, rs4 = 1'b0;
  logic [N2-1:0] nr2, e2, n2, msg2, res2;
  logic [N4-1:0] nr4, e4, n4, msg4, res4;
  logic rd2, rd4, rb2, rb4;

  rsa_coprocessor #(.N(N2), .W(W)) u_rsa2 (.clk(clk_r2), .rst_n, .start(rs2), .nr(nr2), .e_exp(e2),
    .n_mod(n2), .m_msg(msg2), .rsa_done(rd2), .rsa_result(res2), .busy(rb2));
  rsa_coprocessor #(.N(N4), .W(W)) u_rsa4 (.clk(clk_r4), .rst_n, .start(rs4), .nr(nr4), .e_exp(e4),
    .n_mod(n4), .m_msg(msg4), .rsa_done(rd4), .rsa_result(res4), .busy(rb4));

  function automatic logic [N4-1:0] rnd4();
    logic [N4-1:0] v;
    for (int k = 0; k < N4; k += 32) v[k +: 32] = $urandom();
    return v;
  endfunction

  // Reference arithmetic by interleaved shift-and-add, so no operand is
  // wider than N4 + 2 bits: a * b mod m for a, b < m.
  function automatic logic [N4-1:0] modmul(input logic [N4-1:0] a, input logic [N4-1:0] b,
                                           input logic [N4-1:0] m);
    logic [N4+1:0] acc, aa, mm;
    acc = '0;
    aa  = {2'b00, a};
    mm  = {2'b00, m};
    for (int i = N4 - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc >= mm) acc = acc - mm;
      if (b[i]) begin
        acc = acc + aa;
        if (acc >= mm) acc = acc - mm;
      end
    end
    return acc[N4-1:0];
  endfunction

  // 2^k mod m by doubling
  function automatic logic [N4-1:0] pow2mod(input int k, input logic [N4-1:0] m);
    logic [N4+1:0] acc, mm;
    mm  = {2'b00, m};
    acc = 1;
    for (int i = 0; i < k; i++) begin
      acc = acc << 1;
      if (acc >= mm) acc = acc - mm;
    end
    return acc[N4-1:0];
  endfunction

  function automatic logic [N2-1:0] ref_modexp2(input logic [N2-1:0] b, input logic [N2-1:0] ex,
                                                input logic [N2-1:0] md);
    logic [2*N2-1:0] acc, base, mm;
    mm = {{N2{1'b0}}, md};
    acc = 1;
    base = {{N2{1'b0}}, b};
    for (int i = N2 - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (ex[i]) acc = (acc * base) % mm;
    end
    return acc[N2-1:0];
  endfunction


  initial begin
    logic [N4-1:0] rr;
    logic [N4-1:0] expect_res;
    int cyc;
    st2 = 0; st4 = 0;
    x2 = '0; y2 = '0; m2 = '1; x4 = '0; y4 = '0; m4 = '1;
    nr2 = '0; e2 = '0; n2 = '1; msg2 = '0; nr4 = '0; e4 = '0; n4 = '1; msg4 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 2048-bit Montgomery products
    en_m2 = 1'b1;
    for (int t = 0; t < 3; t++) begin
      m2 = N2'(rnd4()) | 1; m2[N2-1] = 1'b1;
      x2 = N2'(rnd4()) % m2; y2 = N2'(rnd4()) % m2;
      @(negedge clk) st2 = 1'b1;
      @(negedge clk) st2 = 1'b0;
      cyc = 1;
      while (!d2) begin @(negedge clk); cyc++; end
      chk(cyc == N2 + E2 + 2, "2048-bit multiplier latency");
      begin
        logic [2*N2-1:0] r2w, m2w;
        r2w = {{N2{1'b0}}, cs2 ? ss2[N2-1:0] : s2[N2-1:0]};
        m2w = {{N2{1'b0}}, m2};
        chk(r2w < m2w, "2048-bit result below M");
        chk(((r2w << N2) % m2w) == (({{N2{1'b0}}, x2} * {{N2{1'b0}}, y2}) % m2w),
            "2048-bit Montgomery product");
      end
    end
    $display("2048-bit Montgomery multiplication: %0d clocks", N2 + E2 + 2);
    en_m2 = 1'b0;
    en_m4 = 1'b1;

    // 4096-bit Montgomery products
    for (int t = 0; t < 3; t++) begin
      m4 = rnd4() | 1; m4[N4-1] = 1'b1;
      x4 = rnd4() % m4; y4 = rnd4() % m4;
      @(negedge clk) st4 = 1'b1;
      @(negedge clk) st4 = 1'b0;
      cyc = 1;
      while (!d4) begin @(negedge clk); cyc++; end
      chk(cyc == N4 + E4 + 2, "4096-bit multiplier latency");
      rr = cs4 ? ss4[N4-1:0] : s4[N4-1:0];
      chk(rr < m4, "4096-bit result below M");
      chk(modmul(rr, pow2mod(N4, m4), m4) == modmul(x4, y4, m4), "4096-bit Montgomery product");
    end
    $display("4096-bit Montgomery multiplication: %0d clocks", N4 + E4 + 2);
    en_m4 = 1'b0;
    en_r2 = 1'b1;

    // 2048-bit exponentiation, full-width random exponent
    n2 = N2'(rnd4()) | 1; n2[N2-1] = 1'b1;
    msg2 = N2'(rnd4()) % n2;
    e2 = N2'(rnd4()); e2[N2-1] = 1'b1;
    nr2 = N2'(pow2mod(2 * N2, N4'(n2)));
    expect_res = N4'(ref_modexp2(msg2, e2, n2));
    @(negedge clk) rs2 = 1'b1;
    @(negedge clk) rs2 = 1'b0;
    cyc = 1;
    while (!rd2) begin @(negedge clk); cyc++; end
    chk(cyc == 1 + (3 + N2 + $countones(e2)) * (N2 + E2 + 3), "2048-bit exponentiation clocks");
    chk(res2 == N2'(expect_res), "2048-bit exponentiation result");
    $display("2048-bit exponentiation: %0d clocks", cyc);
    en_r2 = 1'b0;
    en_r4 = 1'b1;

    // 4096-bit exponentiation: the first 16 write-backs of a run with a
    // random full-width exponent, each compared in the Montgomery domain
    // (value * 2^N mod n), and the clock distance between write-backs.
    n4 = rnd4() | 1; n4[N4-1] = 1'b1;
    msg4 = rnd4() % n4;
    e4 = rnd4(); e4[N4-1] = 1'b1; e4[N4-2] = 1'b1;
    nr4 = pow2mod(2 * N4, n4);
    begin
      logic [N4-1:0] r_mont, p_true, expect_p;
      int bit_i, wb, last_wb;
      logic mul_next;
      r_mont = pow2mod(N4, n4);
      p_true = 1;
      bit_i = N4 - 1;
      mul_next = 1'b0;
      @(negedge clk) rs4 = 1'b1;
      @(negedge clk) rs4 = 1'b0;
      cyc = 1; wb = 0; last_wb = 0;
      while (wb < 16) begin
        if (u_rsa4.wr_en) begin
          // which register and which value the binary method writes now
          if (wb == 0)      expect_p = r_mont;                         // P = 2^N mod n
          else if (wb == 1) expect_p = modmul(msg4, r_mont, n4);       // R = M * 2^N
          else if (mul_next) begin
            p_true = modmul(p_true, msg4, n4);
            expect_p = modmul(p_true, r_mont, n4);
          end else begin
            p_true = modmul(p_true, p_true, n4);
            expect_p = modmul(p_true, r_mont, n4);
          end
          chk(u_rsa4.prod == expect_p, "4096-bit exponentiation step");
          chk(u_rsa4.con1 == (wb == 1), "4096-bit write target");
          if (wb >= 2) begin
            chk(cyc - last_wb == N4 + E4 + 3, "4096-bit clocks per multiplication");
            if (mul_next) begin
              mul_next = 1'b0;
              bit_i--;
            end else if (e4[bit_i]) mul_next = 1'b1;
            else bit_i--;
          end
          last_wb = cyc;
          wb++;
        end
        @(negedge clk);
        cyc++;
      end
      $display("4096-bit exponentiation: first %0d write-backs checked after %0d clocks", wb, cyc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
