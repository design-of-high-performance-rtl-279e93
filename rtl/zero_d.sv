// Zero detector Zero_D.
//
// Reports that the carry register SC is all zeros, i.e. that the repeated
// carry-save additions (SS, SC) = SS + SC + 0 have finished propagating and
// SS holds the binary value. The published design specifies one NOR over SC;
// here it is the W-input NOR written as a reduction. Combinational.
module zero_d #(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] sc,
  output logic         zero
);
  always_comb zero = ~(|sc);
endmodule
