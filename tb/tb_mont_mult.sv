// tb_mont_mult: self-checking testbench of the systolic Montgomery multiplier
// at N = 64, W = 8 (9 words). For random odd moduli M (top bit set or not) and
// operands X, Y < M it picks the reduced result R = (cs ? s_sub : s) and checks
//   R < M,  (R * 2^N) mod M == (X * Y) mod M,
// S < 2M and the subtraction word row (s_sub == s - M when cs = 1, cs = 0 when
// S < M), and that done arrives N + e + 2 clocks after start. Edge operands
// (0, 1, M-1) are included. A watchdog ends a hung run.
module tb_mont_mult;
  import rsa_pkg::*;

  localparam int unsigned N  = 64;
  localparam int unsigned W  = 8;
  localparam int unsigned E  = num_words(N, W);
  localparam int unsigned LAT = N + E + 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] x, y, m;
  logic [E*W-1:0] s, s_sub;
  logic cs, done, busy;
  int checks = 0, failures = 0;
  int n_sub = 0, n_nosub = 0;

  always #5 clk = ~clk;

  mont_mult #(.N(N), .W(W)) dut (.*);

  function automatic logic [N-1:0] rnd_n();
    logic [N-1:0] v;
    for (int k = 0; k < N; k += 32) v[k +: 32] = $urandom();
    return v;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%h y=%h m=%h s=%h s_sub=%h cs=%b", what, x, y, m, s, s_sub, cs);
    end
  endtask

  task automatic run_one(input logic [N-1:0] xi, input logic [N-1:0] yi, input logic [N-1:0] mi);
    logic [2*N+W:0] prod, lhs, mm, rr, sfull;
    int cyc;
    x = xi; y = yi; m = mi;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check("latency", cyc == LAT);
    mm    = '0; mm[N-1:0] = m;
    sfull = '0; sfull[E*W-1:0] = s;
    rr    = '0; rr[N-1:0] = cs ? s_sub[N-1:0] : s[N-1:0];
    prod  = ({{(N+W+1){1'b0}}, x} * {{(N+W+1){1'b0}}, y}) % mm;
    lhs   = (rr << N) % mm;
    check("S < 2M", sfull < (mm << 1));
    check("cs", cs == (sfull >= mm));
    if (cs) check("s_sub", {1'b0, s_sub} == (E*W+1)'(sfull - mm));
    check("R < M", rr < mm);
    check("R*2^N = X*Y mod M", lhs == prod);
    if (cs) n_sub++; else n_nosub++;
  endtask

  initial begin
    logic [N-1:0] mi;
    x = '0; y = '0; m = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", !busy && !done);
    for (int t = 0; t < 60; t++) begin
      mi = rnd_n() | 1;
      if (t % 3 == 0) mi[N-1] = 1'b1;
      if (t % 5 == 1) mi = mi >> (t % 17);
      mi[0] = 1'b1;
      run_one(rnd_n() % mi, rnd_n() % mi, mi);
    end
    mi = rnd_n() | {1'b1, {(N-1){1'b0}}} | 1;
    run_one('0, rnd_n() % mi, mi);
    run_one(1, 1, mi);
    run_one(mi - 1, mi - 1, mi);
    run_one(mi - 1, 1, mi);
    run_one(1, 1, 3);
    check("both subtraction outcomes seen", n_sub > 0 && n_nosub > 0);
    $display("subtract taken %0d, not taken %0d", n_sub, n_nosub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
