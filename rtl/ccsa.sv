// One-level configurable carry-save adder (CCSA).
//
// A row of W configurable full-adder cells. With alpha = 1 it adds three
// W-bit operands a + b + x into a sum vector and a carry vector (1F_CSA).
// With alpha = 0 it ignores x and performs two serial two-input carry-save
// additions of a + b in one cycle (2H_CSA): each cell's first half-adder
// carry feeds the second half adder of the cell above. In both modes
// sum + carry equals the arithmetic sum of the inputs as long as that sum
// fits in W bits, which the multiplier's widths guarantee.
//
// carry is weight-aligned: carry[0] is 0 and carry[j+1] is cell j's carry
// output, so the registered pair (sum, carry) can be added bit for bit.
// Purely combinational; W is the datapath width (k + 6 in the multiplier).
module ccsa #(
  parameter int unsigned W = 1030
) (
  input  logic         alpha,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] x,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] hc;     // half-adder carries between neighbouring cells
  logic [W-1:0] cout;   // cell carry outputs, weight 2^(j+1)

  for (genvar j = 0; j < W; j++) begin : g_cell
    cfa u_cfa (
      .alpha (alpha),
      .a     (a[j]),
      .b     (b[j]),
      .x     (x[j]),
      .cin   ((j == 0) ? 1'b0 : hc[(j == 0) ? 0 : j-1]),
      .s     (sum[j]),
      .c     (cout[j]),
      .hc    (hc[j])
    );
  end

  // The top cell's carries leave the datapath; the multiplier's value
  // bounds keep them at zero.
  assign carry = {cout[W-2:0], 1'b0};
endmodule
