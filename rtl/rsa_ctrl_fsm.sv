// rsa_ctrl_fsm: control FSM of the RSA coprocessor. It runs the left-to-right
// binary method with Montgomery multiplication on the one multiplier:
//
//   P := Mon(Nr, P=1)      P = 2^N mod N        (INIT_P)
//   R := Mon(Nr, M)        M in Montgomery form  (INIT_R)
//   for i = H-1 downto 0:
//     P := Mon(P, P)                              (SQR)
//     if e_i: P := Mon(P, R)                      (MUL)
//   P := Mon(1, P)         back to normal form   (FINAL)
//
// Nr = 2^(2N) mod N is precomputed by the host. The operand muxes offer
// {1, P, Nr} on side A (con4, x of the multiplier) and {M, R, P} on side B
// (con2, y); since Mon(1, Nr) cannot be formed from them, P is loaded with 1
// at start (e_load) and the first step is Mon(Nr, P). This sequence follows
// the design description; the state encoding, the handshake and the use of
// con1 to choose the written register (0 = P, 1 = R) are this design's
// choices.
//
// Each step pulses mul_start for one clock, waits for mul_done and in that
// same clock raises wr_en so the reduced product is written. After SQR or MUL
// finishing bit i, con3 shifts the exponent register. rsa_done pulses one
// clock after the final write. All H exponent bits are scanned, so an
// exponentiation takes 2 + H + popcount(E) + 1 multiplications.
module rsa_ctrl_fsm
  import rsa_pkg::*;
#(
  parameter int unsigned H = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     mul_done,
  input  logic     e_msb,
  output logic     mul_start,
  output opa_sel_e con4,
  output opb_sel_e con2,
  output logic     con1,
  output logic     wr_en,
  output logic     con3,
  output logic     e_load,
  output logic     rsa_done,
  output logic     busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT_P, S_INIT_R, S_SQR, S_MUL, S_FINAL, S_DONE
  } state_e;

  localparam int unsigned BW = $clog2(H + 1);

  state_e        state_q;
  logic          wait_q;      // multiplication launched, waiting for done
  logic [BW-1:0] bits_q;      // exponent bits still to scan
  logic          last_bit;

  assign last_bit = (bits_q == BW'(1));

  always_comb begin
    con4      = OPA_P;
    con2      = OPB_P;
    con1      = 1'b0;
    unique case (state_q)
      S_INIT_P: begin con4 = OPA_NR;  con2 = OPB_P; end
      S_INIT_R: begin con4 = OPA_NR;  con2 = OPB_M; con1 = 1'b1; end
      S_SQR:    begin con4 = OPA_P;   con2 = OPB_P; end
      S_MUL:    begin con4 = OPA_P;   con2 = OPB_R; end
      S_FINAL:  begin con4 = OPA_ONE; con2 = OPB_P; end
      default: ;
    endcase
    mul_start = (state_q inside {S_INIT_P, S_INIT_R, S_SQR, S_MUL, S_FINAL}) && !wait_q;
    wr_en     = wait_q && mul_done;
    con3      = wait_q && mul_done &&
                ((state_q == S_SQR && !e_msb) || state_q == S_MUL);
    e_load    = (state_q == S_IDLE) && start;
    rsa_done  = (state_q == S_DONE);
    busy      = (state_q != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      wait_q  <= 1'b0;
      bits_q  <= '0;
    end else begin
      if (mul_start) wait_q <= 1'b1;
      if (wr_en)     wait_q <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_INIT_P;
          bits_q  <= BW'(H);
        end
        S_INIT_P: if (wr_en) state_q <= S_INIT_R;
        S_INIT_R: if (wr_en) state_q <= S_SQR;
        S_SQR: if (wr_en) begin
          if (e_msb)         state_q <= S_MUL;
          else begin
            bits_q <= bits_q - 1'b1;
            state_q <= last_bit ? S_FINAL : S_SQR;
          end
        end
        S_MUL: if (wr_en) begin
          bits_q  <= bits_q - 1'b1;
          state_q <= last_bit ? S_FINAL : S_SQR;
        end
        S_FINAL: if (wr_en) state_q <= S_DONE;
        default: state_q <= S_IDLE;   // S_DONE
      endcase
    end
  end

  // A new multiplication is only requested when none is pending.
  assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !wait_q);
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> busy);

endmodule
