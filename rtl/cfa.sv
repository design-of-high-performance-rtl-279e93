// Configurable full adder (CFA), one cell of the CCSA.
//
// With alpha = 1 the cell is an ordinary full adder on (a, b, x): it adds
// three operand bits as one three-input carry-save addition (1F_CSA).
// With alpha = 0 the same gates act as two half adders in series: the first
// adds a and b, and the second adds that partial sum to the first half
// adder's carry from the cell one bit below (cin). A row of such cells then
// performs two two-input carry-save additions in one cycle (2H_CSA), which
// halves the cycles spent in carry-save to binary conversion.
//
// hc (= a & b) is the first half adder's carry and goes to cin of the cell
// above. The carry output c is the full-adder majority when alpha = 1, and
// only the second half adder's carry when alpha = 0. The published design states
// the two modes and that the change from a full adder costs one NAND2 and
// one inverting 2-to-1 multiplexer; the gate-level form below (a mux on
// the third input, a gate on the generate term) is this design's reading.
// Purely combinational.
module cfa (
  input  logic alpha,  // 1: full adder, 0: two serial half adders
  input  logic a,
  input  logic b,
  input  logic x,      // third operand bit, used when alpha = 1
  input  logic cin,    // lower cell's half-adder carry, used when alpha = 0
  output logic s,      // sum bit, weight 2^j
  output logic c,      // carry bit, weight 2^(j+1)
  output logic hc      // half-adder carry to the upper cell
);
  logic p, g, t;

  always_comb begin
    p  = a ^ b;
    g  = a & b;
    t  = alpha ? x : cin;
    s  = p ^ t;
    c  = (p & t) | (g & alpha);
    hc = g;
  end
endmodule
