// Simplified 4-to-1 multiplexer SM3: the third CCSA operand x.
//
// x = 0, N^, B^ or D^ for (A^, q^) = (0,0), (0,1), (1,0), (1,1), where A^
// is the multiplier bit and q^ the quotient bit of the current iteration,
// both read from flip-flops so the selection starts at the clock edge.
// Because one of the four inputs is zero, the published design replaces a full
// 4-to-1 multiplexer by a smaller cell (about a NAND2, an inverting 2-to-1
// mux and a 2-to-1 mux per bit). This module computes the same function
// per bit as a 2-to-1 choice of D^ or N^ by A^, a 2-to-1 choice of that or
// B^ by q^, gated by (A^ or q^). Purely combinational.
module sm3 #(
  parameter int unsigned W = 1030
) (
  input  logic         a_hat,
  input  logic         q_hat,
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  output logic [W-1:0] x
);
  logic [W-1:0] nd;

  always_comb begin
    nd = a_hat ? d_hat : n_hat;
    x  = (q_hat ? nd : b_hat) & {W{a_hat | q_hat}};
  end
endmodule
