// Shared types of the SCS-MM-New Montgomery multiplier.
//
// opsel_e is the select code of the two k-bit operand multiplexers M1 and
// M2 that feed the configurable carry-save adder (CCSA): the register
// shifted right by one bit (a normal iteration), shifted by two bits (the
// iteration after a skipped one), the register as it is (format
// conversion), or the stored operand (N^ for M1, B^ for M2, used once to
// start the precomputation of D^ = N^ + B^). The four-way choice follows
// the multiplier's block diagram; the encoding is this design's own.
//
// state_e lists the phases of the control part, which the architecture
// leaves undescribed; the phases follow the algorithm's order: precompute
// D^, run the loop, convert the carry-save result to binary.
package scs_mm_pkg;

  typedef enum logic [1:0] {
    OP_SHR1   = 2'd0,  // register >> 1
    OP_SHR2   = 2'd1,  // register >> 2 (after a skip)
    OP_DIRECT = 2'd2,  // register unshifted
    OP_CONST  = 2'd3   // stored operand
  } opsel_e;

  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,  // waiting for start; result held
    ST_PRE_INIT   = 3'd1,  // (SS,SC) <- N^ + B^ (first 2H_CSA step)
    ST_PRE_CONV   = 3'd2,  // (SS,SC) <- SS + SC until SC = 0, then D^ <- SS
    ST_LOOP       = 3'd3,  // iterations i = -1 .. k+4 with skipping
    ST_CONV_SHIFT = 3'd4,  // last pending shift, first conversion step
    ST_CONV       = 3'd5,  // (SS,SC) <- SS + SC until SC = 0
    ST_DONE       = 3'd6   // one-cycle done pulse
  } state_e;

endpackage
