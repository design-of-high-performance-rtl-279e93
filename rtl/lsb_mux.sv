// 3-bit 2-to-1 multiplexer (M4 or M5).
//
// Delivers the three least significant bits of SS[i] (or SC[i]), the
// register as the CCSA will see it in the current iteration, to the skip
// detector: bits 3:1 of the register after a normal iteration (shift by
// one), bits 4:2 after a skip (shift by two). It duplicates the low bits
// of M1/M2 in a small, fast cell so that the skip detector's path does not
// pass through the k-bit multiplexers. Purely combinational.
module lsb_mux (
  input  logic       shr2,  // 1: register >> 2, 0: register >> 1
  input  logic [4:1] r,     // register bits 4:1
  output logic [2:0] y      // bits 2:0 of the shifted register
);
  always_comb y = shr2 ? r[4:2] : r[3:1];
endmodule
