// k-bit 4-to-1 operand multiplexer (M1 or M2).
//
// Chooses what the CCSA sees on one of its register inputs: the register
// shifted right by one bit (a normal iteration divides by two), shifted by
// two bits (the previous iteration also stands in for a skipped one), the
// register unshifted (format conversion and D^ precomputation), or a stored
// operand (N^ for M1, B^ for M2) to start the D^ = N^ + B^ precomputation.
// The four inputs are those drawn in the block diagram; which feedback
// register feeds which of M1 and M2 is this design's choice (SS into M1,
// SC into M2). Purely combinational; the select comes from the control part.
module opmux4
  import scs_mm_pkg::*;
#(
  parameter int unsigned W = 1030
) (
  input  opsel_e       sel,
  input  logic [W-1:0] r,     // feedback register (SS or SC)
  input  logic [W-1:0] k,     // stored operand (N^ or B^)
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      OP_SHR1:   y = r >> 1;
      OP_SHR2:   y = r >> 2;
      OP_DIRECT: y = r;
      default:   y = k;
    endcase
  end
endmodule
