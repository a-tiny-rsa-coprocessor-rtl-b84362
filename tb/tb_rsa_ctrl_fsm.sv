// tb_rsa_ctrl_fsm: self-checking testbench of the RSA control FSM (H = 16).
// The multiplier is replaced by a responder that answers each mul_start with
// mul_done after a random 1..20 clocks, and the exponent register by a bit
// index that moves down on con3. For random exponents (and 0, all ones) the
// sequence of requested multiplications, written as (operand A, operand B,
// target register), must be exactly the left-to-right binary method:
//   (Nr, P -> P), (Nr, M -> R), per bit e_i from H-1 down to 0: (P, P -> P)
//   and, if e_i = 1, (P, R -> P); finally (1, P -> P).
// Also checked: e_load at start, one wr_en per multiplication, no request
// while one is pending, one rsa_done after the last write and busy meanwhile.
module tb_rsa_ctrl_fsm;
  import rsa_pkg::*;

  localparam int unsigned H = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic mul_done = 1'b0, e_msb;
  logic mul_start, con1, wr_en, con3, e_load, rsa_done, busy;
  opa_sel_e con4;
  opb_sel_e con2;
  int checks = 0, failures = 0;

  logic [H-1:0] e_bits;
  int           e_idx;
  logic         pending;
  int           delay;
  typedef struct packed { opa_sel_e a; opb_sel_e b; logic r; } op_t;
  op_t          seen [$];
  int           n_wr, n_load, n_done;

  always #5 clk = ~clk;

  rsa_ctrl_fsm #(.H(H)) dut (.*);

  assign e_msb = (e_idx >= 0) ? e_bits[e_idx] : 1'b0;

  // multiplier responder and exponent-register model
  always @(posedge clk) begin
    mul_done <= 1'b0;
    if (mul_start) begin
      if (pending) begin
        failures++;
        $display("FAIL request while pending");
      end
      pending <= 1'b1;
      delay   <= $urandom_range(1, 20);
      seen.push_back('{con4, con2, con1});
    end else if (pending) begin
      if (delay == 1) begin
        mul_done <= 1'b1;
        pending  <= 1'b0;
      end
      delay <= delay - 1;
    end
    if (wr_en)    n_wr++;
    if (e_load)   n_load++;
    if (rsa_done) n_done++;
    if (con3)     e_idx <= e_idx - 1;
  end

  task automatic run(input logic [H-1:0] ex);
    op_t expect_ops [$];
    int cyc;
    e_bits = ex; e_idx = H - 1;
    seen.delete();
    n_wr = 0; n_load = 0; n_done = 0;
    expect_ops.push_back('{OPA_NR, OPB_P, 1'b0});
    expect_ops.push_back('{OPA_NR, OPB_M, 1'b1});
    for (int i = H - 1; i >= 0; i--) begin
      expect_ops.push_back('{OPA_P, OPB_P, 1'b0});
      if (ex[i]) expect_ops.push_back('{OPA_P, OPB_R, 1'b0});
    end
    expect_ops.push_back('{OPA_ONE, OPB_P, 1'b0});
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!rsa_done && cyc < 100000) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during run");
      end
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    checks++;
    if (seen.size() != expect_ops.size()) begin
      failures++;
      $display("FAIL e=%h: %0d operations, expected %0d", ex, seen.size(), expect_ops.size());
    end else begin
      foreach (expect_ops[k]) if (seen[k] != expect_ops[k]) begin
        failures++;
        $display("FAIL e=%h op %0d: got %p expected %p", ex, k, seen[k], expect_ops[k]);
        break;
      end
    end
    checks++;
    if (n_wr != expect_ops.size() || n_load != 1 || n_done != 1 || busy) begin
      failures++;
      $display("FAIL e=%h: wr %0d load %0d done %0d busy %b", ex, n_wr, n_load, n_done, busy);
    end
  endtask

  initial begin
    pending = 1'b0; delay = 0; e_bits = '0; e_idx = H - 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run('0);
    run('1);
    run(16'h8001);
    for (int t = 0; t < 20; t++) run(H'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
