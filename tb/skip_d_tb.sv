// Exhaustive testbench of the skip detector over all 1024 input
// combinations. The reference works on integers: with x = q_i * N^ (low
// three bits, N^_0 = 0) the quotient bits are bits of T = SS + SC + x,
//   q_{i+1} = T[1],   q_{i+2} = T[2] when iteration i+1 is skipped,
// and the skip needs A_{i+1} = 0 and both carry-save bits of
// SS[i+1]_0 / SC[i+1]_0 (the bit-1 sum and the bit-0 carry) at zero.
module skip_d_tb;
  logic [2:0] ss, sc;
  logic q_cur, a_next1, a_next2, allow;
  logic [2:1] n_hat;
  logic skip, q_next, a_next;
  int checks = 0, failures = 0, n_skips = 0;

  skip_d dut (.ss, .sc, .q_cur, .n_hat, .a_next1, .a_next2, .allow, .skip, .q_next, .a_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, t;
    logic s1_0, c1_0, exp_skip, exp_q, exp_a;
    for (int v = 0; v < 1024; v++) begin
      {ss, sc, q_cur, n_hat, a_next1, a_next2, allow} = 12'(v);
      #1;
      x = q_cur ? int'({n_hat, 1'b0}) : 0;
      t = int'(ss) + int'(sc) + x;
      s1_0 = ss[1] ^ sc[1] ^ x[1];        // sum bit 1 -> SS[i+1]_0
      c1_0 = ss[0] & sc[0];               // carry of bit 0 -> SC[i+1]_0
      exp_skip = allow && !a_next1 && !s1_0 && !c1_0;
      exp_q = exp_skip ? t[2] : t[1];
      exp_a = exp_skip ? a_next2 : a_next1;
      checks++;
      if (skip != exp_skip || q_next != exp_q || a_next != exp_a) begin
        failures++;
        $display("FAIL v=%0d skip=%b/%b q=%b/%b a=%b/%b", v, skip, exp_skip, q_next, exp_q, a_next, exp_a);
      end
      if (skip) n_skips++;
    end
    checks++;
    if (n_skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
