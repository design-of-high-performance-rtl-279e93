// Skip detector Skip_D.
//
// In iteration i the CCSA adds SS[i] + SC[i] + x, x chosen by (A_i, q_i).
// Skip_D looks only at the three low bits of SS[i] and SC[i], at q_i and
// at the low bits of N^, and predicts, in the same cycle:
//   q_{i+1}    = SS[i+1]_0 xor SC[i+1]_0                     (eq. 3/4)
//   skip_{i+1} = not(A_{i+1} or q_{i+1} or SS[i+1]_0)        (eq. 2/8)
//   q_{i+2}    = SS[i+2]_0 xor SC[i+2]_0 when i+1 is skipped (eq. 5/6)
// and hands the flip-flops the selects for the next cycle:
// (q^, A^) = (q_{i+2}, A_{i+2}) if skip_{i+1}, else (q_{i+1}, A_{i+1}).
//
// Because B^ = 8B has its three low bits zero and D^ = N^ + B^, the low
// bits of x are x_j = q_i & N^_j for j < 3, with N^_0 = 0. Then
//   SS[i+1]_0 = SS[i]_1 ^ SC[i]_1 ^ x_1,   SC[i+1]_0 = SS[i]_0 & SC[i]_0,
//   SS[i+1]_1 = SS[i]_2 ^ SC[i]_2 ^ x_2,   SC[i+1]_1 = maj(SS[i]_1, SC[i]_1, x_1).
// The published equations drop x_1 on the premise that N^_1 = 0. With
// N^ = N + 1 that holds only for N = 3 mod 4, so this module keeps the
// x_1 = q_i & N^_1 term; for N^_1 = 0 it reduces exactly to eqs. (4), (6)
// and (8). allow gates the skip off where the control part forbids it
// (the last loop iteration, and outside the loop). Combinational.
module skip_d (
  input  logic [2:0] ss,       // SS[i] bits 2:0 (from M5)
  input  logic [2:0] sc,       // SC[i] bits 2:0 (from M4)
  input  logic       q_cur,    // q_i (the q^ flip-flop)
  input  logic [2:1] n_hat,    // N^ bits 2:1
  input  logic       a_next1,  // A_{i+1}
  input  logic       a_next2,  // A_{i+2}
  input  logic       allow,    // skipping permitted in this iteration
  output logic       skip,     // skip_{i+1}
  output logic       q_next,   // next q^
  output logic       a_next    // next A^
);
  logic x1, x2, ss1_0, sc1_0, ss1_1, sc1_1, q1, q2;

  always_comb begin
    x1     = q_cur & n_hat[1];
    x2     = q_cur & n_hat[2];
    ss1_0  = ss[1] ^ sc[1] ^ x1;
    sc1_0  = ss[0] & sc[0];
    ss1_1  = ss[2] ^ sc[2] ^ x2;
    sc1_1  = (ss[1] & sc[1]) | (x1 & (ss[1] ^ sc[1]));
    q1     = ss1_0 ^ sc1_0;
    q2     = ss1_1 ^ sc1_1;
    skip   = allow & ~(a_next1 | q1 | ss1_0);
    q_next = skip ? q2 : q1;
    a_next = skip ? a_next2 : a_next1;
  end
endmodule
