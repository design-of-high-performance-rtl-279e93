// Shift register for the multiplier operand A.
//
// Loaded with A at the start of a multiplication. Each loop cycle handles
// iteration i and must offer the next two multiplier bits A_{i+1} (bit 0)
// and A_{i+2} (bit 1) to the skip detector, so after every iteration the
// register shifts right by one bit, or by two bits when the next iteration
// is skipped; zeros enter from the top, so the iterations beyond the top
// bit of A see A_i = 0. The register is loaded while the iteration index is
// -1, so bit 0 then is A_0. The published architecture has this shift register in its
// area count; the two-step shift is this design's reading of the skip.
// Timing: load and shift act on the rising clock edge; load has priority.
module a_shreg #(
  parameter int unsigned W = 1025
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  input  logic         shift,   // advance by one iteration
  input  logic         shift2,  // with shift: advance by two (skip)
  output logic         a_next1, // A_{i+1}
  output logic         a_next2  // A_{i+2}
);
  logic [W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (load)     q <= din;
    else if (shift)    q <= shift2 ? (q >> 2) : (q >> 1);
  end

  assign a_next1 = q[0];
  assign a_next2 = q[1];
endmodule
