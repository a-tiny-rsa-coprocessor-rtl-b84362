// rsa_pkg: types shared by the systolic Montgomery multiplier and the RSA
// coprocessor.
//
// pe_ctl_e is the 2-bit Control state that travels along the processing
// element (PE) row in a shift register. Each PE sees the same sequence, one
// clock later than its left neighbour:
//   CTL_ADD  - add x_i*Y + q_i*M (+ carry) into the word, keep odd/even copies
//   CTL_LOCK - stop adding, latch S_0 of the right neighbour (final MSB choice)
//   CTL_SUB  - the word is final; its S PE forms this word of S - M
//   CTL_IDLE - hold everything
// The four states and their meaning follow the design description; the
// encoding is this design's choice.
package rsa_pkg;

  typedef enum logic [1:0] {
    CTL_IDLE = 2'b00,
    CTL_ADD  = 2'b01,
    CTL_LOCK = 2'b10,
    CTL_SUB  = 2'b11
  } pe_ctl_e;

  // Operand A select (Con4) and operand B select (Con2) of the coprocessor.
  typedef enum logic [1:0] {
    OPA_ONE = 2'd0,
    OPA_P   = 2'd1,
    OPA_NR  = 2'd2
  } opa_sel_e;

  typedef enum logic [1:0] {
    OPB_M = 2'd0,
    OPB_R = 2'd1,
    OPB_P = 2'd2
  } opb_sel_e;

  // Number of words of the multiplier for an N-bit modulus and W-bit words:
  // the running sum stays below 4M < 2^(N+2), so one word is added on top of
  // the ceil(N/W) operand words.
  function automatic int unsigned num_words(int unsigned n, int unsigned w);
    return (n + w - 1) / w + 1;
  endfunction

endpackage
