// mont_mult: systolic radix-2 Montgomery multiplier with the final
// subtraction built in. It computes S = X*Y*2^-N mod M in the non-reduced
// range [0, 2M) together with S - M and the carry CS^e of that subtraction;
// the caller picks S_sub when cs = 1 (S >= M) and S otherwise.
//
// Structure (e = N/W + 1 words of W bits):
//   PE#0 (type F)        word 0, makes q_i
//   PE#1 .. PE#e-2 (E)   middle words, carries to the right
//   PE#e-1 (type L)      top word, carry only
//   e PEs of type S      word-serial S + ~M + 1
// and three shift registers that hand x_i, q_i and the 2-bit Control state to
// PE#j one clock after PE#j-1, so that PE#j works on bit i-j of X while PE#0
// works on bit i. Each E/F PE keeps odd/even copies of its word and takes the
// right one with the registered S_0 of its right neighbour, so a new bit of X
// enters every clock. This organisation follows the design description.
//
// Sequencing (this design's choice of handshake): a one-clock start while not
// busy loads X into the x register, clears all PEs and starts the Control
// sequence ADD (N clocks), LOCK, SUB, IDLE at PE#0; the shift register
// replays it along the row. Word j of S is final N+j+2 clocks after start and
// its S PE subtracts in that clock; done pulses N+e+2 clocks after start, and
// s, s_sub and cs then hold until the next start. Y and M are not registered:
// they must stay stable while busy. Requirements: M odd, X, Y < M < 2^N, W >= 3.
module mont_mult
  import rsa_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned W = 32,
  localparam int unsigned E = num_words(N, W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [N-1:0]   m,
  output logic [E*W-1:0] s,
  output logic [E*W-1:0] s_sub,
  output logic           cs,
  output logic           done,
  output logic           busy
);

  localparam int unsigned CW = $clog2(N + 1);

  // ---- sequencer -------------------------------------------------------
  pe_ctl_e         ctl0_q;
  logic [CW-1:0]   cnt_q;
  logic [N-1:0]    x_q;
  logic            clr;
  pe_ctl_e         ctl [E];      // Control state seen by PE#j

  assign clr = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl0_q <= CTL_IDLE;
      cnt_q  <= '0;
      x_q    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        ctl0_q <= CTL_ADD;
        cnt_q  <= '0;
        x_q    <= x;
        busy   <= 1'b1;
      end else begin
        case (ctl0_q)
          CTL_ADD: begin
            x_q   <= x_q >> 1;
            cnt_q <= cnt_q + 1'b1;
            if (cnt_q == CW'(N - 1)) ctl0_q <= CTL_LOCK;
          end
          CTL_LOCK: ctl0_q <= CTL_SUB;
          CTL_SUB:  ctl0_q <= CTL_IDLE;
          default:  ;
        endcase
        // the last S PE subtracts while its Control state is SUB
        if (busy && ctl[E-1] == CTL_SUB) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // ---- shift registers for Control, x and q ----------------------------
  logic [1:0] ctl_taps [E];
  logic       x_taps   [E];
  logic       q_taps   [E];
  logic       q0;

  mont_shift_reg #(.WIDTH(2), .DEPTH(E)) u_ctl_sr (
    .clk, .rst_n, .d(ctl0_q), .taps(ctl_taps));
  mont_shift_reg #(.WIDTH(1), .DEPTH(E)) u_x_sr (
    .clk, .rst_n, .d(x_q[0]), .taps(x_taps));
  mont_shift_reg #(.WIDTH(1), .DEPTH(E)) u_q_sr (
    .clk, .rst_n, .d(q0), .taps(q_taps));

  always_comb
    for (int j = 0; j < E; j++) ctl[j] = pe_ctl_e'(ctl_taps[j]);

  // ---- PE row ----------------------------------------------------------
  logic [E*W-1:0] y_ext, m_ext;
  logic [1:0]     carry [E];     // carry[j]: C^(j), out of PE j-1
  logic           t0    [E+1];   // t0[j]: S_0^(j); t0[E] = 0
  logic [W-1:0]   s_w   [E];
  logic           cs_c  [E+1];   // cs_c[j]: carry into S PE j

  assign y_ext = {{(E*W-N){1'b0}}, y};
  assign m_ext = {{(E*W-N){1'b0}}, m};
  assign t0[E] = 1'b0;
  assign t0[0] = 1'b0;           // nothing left of PE#0
  assign carry[0] = 2'b00;

  mont_pe_f #(.W(W)) u_pe_f (
    .clk, .clr, .ctl(ctl[0]), .x(x_taps[0]),
    .y(y_ext[W-1:0]), .m(m_ext[W-1:0]), .s0_next(t0[1]),
    .q(q0), .c_out(carry[1]), .s_word(s_w[0]));

  for (genvar j = 1; j < E - 1; j++) begin : g_pe_e
    mont_pe_e #(.W(W)) u_pe_e (
      .clk, .clr, .ctl(ctl[j]), .x(x_taps[j]), .q(q_taps[j]),
      .y(y_ext[j*W +: W]), .m(m_ext[j*W +: W]),
      .c_in(carry[j]), .s0_next(t0[j+1]),
      .c_out(carry[j+1]), .s_word(s_w[j]), .t0(t0[j]));
  end

  mont_pe_l #(.W(W)) u_pe_l (
    .clk, .clr, .ctl(ctl[E-1]), .c_in(carry[E-1]),
    .s_word(s_w[E-1]), .t0(t0[E-1]));

  // ---- final subtraction row ------------------------------------------
  assign cs_c[0] = 1'b1;

  for (genvar j = 0; j < E; j++) begin : g_pe_s
    mont_pe_s #(.W(W)) u_pe_s (
      .clk, .clr, .en(ctl[j] == CTL_SUB),
      .s_word(s_w[j]), .m(m_ext[j*W +: W]), .c_in(cs_c[j]),
      .s_sub(s_sub[j*W +: W]), .c_out(cs_c[j+1]));
    assign s[j*W +: W] = s_w[j];
  end

  assign cs = cs_c[E];

  initial assert (W >= 3 && E >= 3) else $error("mont_mult needs W >= 3 and N > W");

endmodule
