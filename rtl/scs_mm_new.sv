// SCS-MM-New radix-2 Montgomery modular multiplier.
//
// Computes S = A * B * 2^-(k+2) mod N, with 0 <= S < 2N, for an odd
// modulus N < 2^k and operands 0 <= A, B < 2N, so a result can be fed back
// as an operand. The intermediate sum stays in carry-save form (SS, SC) and
// every loop cycle is a single three-input carry-save addition, so the
// clock period is about one 4-to-1 multiplexer plus one full adder.
//
// Operation, one multiplication:
//  1. Load N^ = N + 1, B^ = 8B and A. Using N^ instead of N moves the carry
//     that an odd N always produces at bit 0 into the operand, and 8B
//     clears the low bits of B, so the low two bits of every x are zero
//     and the next quotient bits can be computed from a few register bits.
//  2. Precompute D^ = N^ + B^ with the same adder: one 2H_CSA step on
//     (N^, B^), then (SS, SC) = SS + SC + 0 in 2H_CSA mode until SC = 0.
//  3. Loop, iteration i = -1 .. k+4: (SS, SC) = (SS[i] + SC[i] + x) / 2
//     with x = 0, N^, B^ or D^ for (A_i, q_i). Iteration -1 only primes
//     q_0 and A_0. When A_{i+1} = q_{i+1} = 0 and SS[i+1]_0 = SC[i+1]_0 = 0,
//     iteration i+1 is skipped: the next cycle reads the registers shifted
//     by two instead of one. Skip_D prepares q^ and A^ one cycle ahead.
//     The k+5 halvings against 8B give the factor 2^-(k+2); the last three
//     iterations see A_i = 0 and bring S below 2N.
//  4. Format conversion: (SS, SC) = SS + SC + 0, two carry-save additions
//     per cycle, until Zero_D sees SC = 0. SS then holds S.
// The register contents are the raw CCSA outputs (sum, carry << 1); the
// division by two of each iteration happens in M1/M2 on the next cycle.
//
// Datapath width W = k + 6: the loop value stays below 17N and the raw
// register pair below 2^(k+6). The loop cycle count depends on the data
// (k + 6 minus the number of skips), as does the conversion length.
//
// Interface: pulse start for one cycle while idle with a_in, b_in, n_in
// valid (they are sampled in that cycle). done pulses for one cycle when
// result is valid; result then holds until the next start. busy is high
// in between. Active-low asynchronous reset.
//
// From the published architecture: the block set (CCSA, M1, M2, SM3, M4, M5, Skip_D,
// Zero_D, registers N^, B^, D^, SS, SC and the A shift register), the
// operand transformations, the skip rule and the quotient look-ahead.
// This design's own: the control sequence, the handshake, the widths, the
// load-time increment that forms N^ = N + 1, clearing SS/SC after the
// precomputation, and keeping the q_i & N^_1 term in Skip_D (see skip_d).
module scs_mm_new
  import scs_mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a_in,    // multiplier A, 0 <= A < 2N
  input  logic [K:0]   b_in,    // multiplicand B, 0 <= B < 2N
  input  logic [K-1:0] n_in,    // odd modulus N
  output logic         busy,
  output logic         done,
  output logic [K:0]   result   // A*B*2^-(k+2) mod N, below 2N
);
  localparam int unsigned W = K + 6;

  // registers
  logic [W-1:0] n_hat, b_hat, d_hat, ss, sc;
  logic         q_hat, a_hat, skipped;

  // control
  opsel_e m12_sel;
  logic   alpha, ld_ops, ss_we, ss_clr, d_we, iter_en, allow;

  // datapath nets
  logic [W-1:0] m1_y, m2_y, x, sum, carry;
  logic [2:0]   ss_lsb, sc_lsb;
  logic         sc_zero, skip, q_next, a_next, a_next1, a_next2;

  scs_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n, .start,
    .sc_zero, .skip, .skipped,
    .m12_sel, .alpha, .ld_ops, .ss_we, .ss_clr, .d_we, .iter_en, .allow,
    .busy, .done
  );

  opmux4 #(.W(W)) u_m1 (.sel(m12_sel), .r(ss), .k(n_hat), .y(m1_y));
  opmux4 #(.W(W)) u_m2 (.sel(m12_sel), .r(sc), .k(b_hat), .y(m2_y));

  sm3 #(.W(W)) u_sm3 (
    .a_hat, .q_hat, .n_hat, .b_hat, .d_hat, .x
  );

  ccsa #(.W(W)) u_ccsa (
    .alpha, .a(m1_y), .b(m2_y), .x, .sum, .carry
  );

  lsb_mux u_m4 (.shr2(skipped), .r(sc[4:1]), .y(sc_lsb));
  lsb_mux u_m5 (.shr2(skipped), .r(ss[4:1]), .y(ss_lsb));

  a_shreg #(.W(K + 1)) u_areg (
    .clk, .rst_n,
    .load   (ld_ops),
    .din    (a_in),
    .shift  (iter_en),
    .shift2 (skip),
    .a_next1,
    .a_next2
  );

  skip_d u_skip_d (
    .ss (ss_lsb), .sc (sc_lsb),
    .q_cur (q_hat), .n_hat (n_hat[2:1]),
    .a_next1, .a_next2, .allow,
    .skip, .q_next, .a_next
  );

  zero_d #(.W(W)) u_zero_d (.sc(sc), .zero(sc_zero));

  // operand registers N^, B^, D^
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_hat <= '0;
      b_hat <= '0;
      d_hat <= '0;
    end else begin
      if (ld_ops) begin
        n_hat <= W'(n_in) + W'(1);
        b_hat <= W'({b_in, 3'b000});
      end
      if (d_we) d_hat <= sum;
    end
  end

  // carry-save state and the Skip_D flip-flops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss      <= '0;
      sc      <= '0;
      q_hat   <= 1'b0;
      a_hat   <= 1'b0;
      skipped <= 1'b0;
    end else begin
      if (ss_clr) begin
        ss      <= '0;
        sc      <= '0;
        q_hat   <= 1'b0;
        a_hat   <= 1'b0;
        skipped <= 1'b0;
      end else if (ss_we) begin
        ss <= sum;
        sc <= carry;
      end
      if (iter_en) begin
        q_hat   <= q_next;
        a_hat   <= a_next;
        skipped <= skip;
      end
    end
  end

  assign result = ss[K:0];

  // The raw register pair never overflows W bits, so the top carry stays 0.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    ss_we |-> !(m1_y[W-1] && m2_y[W-1]));
endmodule
