// End-to-end testbench of the Montgomery multiplier at k = 32.
//
// Drives complete Montgomery multiplications through the multiplier and
// checks each result against plain wide-integer arithmetic:
//   S < 2N   and   (S * 2^(k+2)) mod N == (A * B) mod N.
// It checks the precomputed register D^ = (N + 1) + 8B, and runs an
// independent word-level model of the carry-save loop (same skip rule,
// written with whole-vector operations), checking that the multiplier
// takes exactly the predicted number of cycles from start to done: precomputation, loop with skips, and conversion.
// Counted mechanisms, each of which must occur: a skipped iteration, each
// of the four x selections (0, N^, B^, D^), 1F_CSA and 2H_CSA cycles, a
// Zero_D completion, moduli with N^_1 = 0 and N^_1 = 1, and a result that
// is fed back as the next operand.
// Reduced size: 120 multiplications with random odd moduli.
module scs_mm_new_tb;
  localparam int unsigned K    = 32;
  localparam int unsigned NOPS = 60;
  localparam int unsigned WW   = 2*K + 16;   // reference arithmetic width

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K:0]   a_in = '0, b_in = '0;
  logic [K-1:0] n_in = '0;
  logic         busy, done;
  logic [K:0]   result;

  int checks = 0, failures = 0;
  int n_skip = 0, n_sel[4] = '{0, 0, 0, 0}, n_1f = 0, n_2h = 0, n_zero = 0;
  int n_n1_0 = 0, n_n1_1 = 0, n_chain = 0;
  int n_ops = 0, tot_cycles = 0, tot_loop = 0;

  always #5 clk = ~clk;

  scs_mm_new #(.K(K)) dut (
    .clk, .rst_n, .start, .a_in, .b_in, .n_in, .busy, .done, .result
  );

  // mechanism counters, sampled on the internal control signals
  always @(posedge clk) if (rst_n) begin
    if (dut.iter_en && dut.skip) n_skip++;
    if (dut.iter_en) tot_loop++;
    if (dut.iter_en) n_sel[{dut.a_hat, dut.q_hat}]++;
    if (dut.ss_we && dut.alpha) n_1f++;
    if (dut.ss_we && !dut.alpha) n_2h++;
    if (dut.d_we || (dut.u_ctrl.st == scs_mm_pkg::ST_CONV && dut.sc_zero)) n_zero++;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WW-1:0] rand_wide();
    logic [WW-1:0] v = '0;
    for (int i = 0; i < WW; i += 32) v = (v << 32) | WW'($urandom);
    return v;
  endfunction

  // two serial half-adder carry-save steps on whole vectors
  function automatic void two_ha(inout logic [WW-1:0] s, inout logic [WW-1:0] c);
    logic [WW-1:0] s1, c1;
    s1 = s ^ c;  c1 = (s & c) << 1;
    s  = s1 ^ c1; c = (s1 & c1) << 1;
  endfunction

  // predicted cycles from the start edge to the done cycle
  function automatic int model_cycles(logic [K:0] a, logic [K:0] b, logic [K-1:0] n);
    logic [WW-1:0] nh, bh, dh, s, c, x, sum, cy;
    int cyc, i;
    logic qv, av;
    nh = WW'(n) + 1;
    bh = WW'(b) << 3;
    cyc = 1;                       // PRE_INIT
    s = nh; c = bh; two_ha(s, c);
    cyc++;                         // PRE_CONV cycle that sees SC = 0
    while (c != 0) begin two_ha(s, c); cyc++; end
    dh = s;
    s = '0; c = '0; qv = 1'b0; av = 1'b0; i = -1;
    while (i <= int'(K) + 4) begin
      cyc++;
      x = ({qv, av} == 2'b00) ? '0 : ({qv, av} == 2'b10) ? nh :
          ({qv, av} == 2'b01) ? bh : dh;
      sum = s ^ c ^ x;
      cy  = (s & c) | (s & x) | (c & x);
      s = sum >> 1; c = cy;        // SS[i+1], SC[i+1]
      qv = s[0] ^ c[0];
      av = (i + 1 <= int'(K)) ? a[i+1] : 1'b0;
      if (i + 1 <= int'(K) + 4 && !av && !s[0] && !c[0]) begin
        s = s >> 1; c = c >> 1;    // iteration i+1 skipped
        qv = s[0] ^ c[0];
        av = (i + 2 <= int'(K)) ? a[i+2] : 1'b0;
        i += 2;
      end else begin
        i += 1;
      end
    end
    cyc++;                         // CONV_SHIFT
    two_ha(s, c);
    cyc++;                         // CONV cycle that sees SC = 0
    while (c != 0) begin two_ha(s, c); cyc++; end
    cyc++;                         // DONE
    return cyc;
  endfunction

  task automatic run_one(logic [K:0] a, logic [K:0] b, logic [K-1:0] n, output logic [K:0] s_out);
    logic [WW-1:0] lhs, rhs;
    int cyc, exp_cyc;
    exp_cyc = model_cycles(a, b, n);
    @(negedge clk);
    a_in = a; b_in = b; n_in = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    s_out = result;
    n_ops++;
    tot_cycles += cyc;
    lhs = (WW'(result) << (K + 2)) % WW'(n);
    rhs = (WW'(a) * WW'(b)) % WW'(n);
    checks += 4;
    if ((K+6)'(dut.d_hat) != (K+6)'(WW'(n) + 1 + (WW'(b) << 3))) begin
      failures++;
      $display("FAIL precomputed D^ = %h", dut.d_hat);
    end
    if (lhs != rhs) begin
      failures++;
      $display("FAIL value: A=%h B=%h N=%h S=%h", a, b, n, result);
    end
    if (WW'(result) >= 2 * WW'(n)) begin
      failures++;
      $display("FAIL range: S=%h N=%h", result, n);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL cycles: got %0d expected %0d", cyc, exp_cyc);
    end
    if (n[1]) n_n1_0++; else n_n1_1++;   // N^ = N+1: bit 1 is 0 iff N = 3 mod 4
  endtask

  initial begin
    logic [K-1:0] n;
    logic [K:0]   a, b, s, prev;
    logic [WW-1:0] two_n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < int'(NOPS); t++) begin
      // odd modulus; mostly with the top bit set, sometimes smaller
      n = K'(rand_wide()) | K'(1);
      if (t % 4 != 3) n[K-1] = 1'b1;
      if (t == 0) n = '1;
      two_n = 2 * WW'(n);
      a = (K+1)'(rand_wide() % two_n);
      b = (K+1)'(rand_wide() % two_n);
      if (t == 1) a = '0;
      if (t == 2) begin a = (K+1)'(two_n - 1); b = (K+1)'(two_n - 1); end
      if (t == 3) b = '0;
      run_one(a, b, n, s);
      // feed the result back as the next multiplicand
      prev = s;
      a = (K+1)'(rand_wide() % two_n);
      run_one(a, prev, n, s);
      n_chain++;
    end
    checks += 8;
    if (n_skip == 0)   begin failures++; $display("FAIL: no skipped iteration"); end
    for (int j = 0; j < 4; j++)
      if (n_sel[j] == 0) begin failures++; $display("FAIL: x selection %0d never used", j); end
    if (n_1f == 0)     begin failures++; $display("FAIL: no 1F_CSA cycle"); end
    if (n_2h == 0)     begin failures++; $display("FAIL: no 2H_CSA cycle"); end
    if (n_zero == 0)   begin failures++; $display("FAIL: no Zero_D completion"); end
    if (n_n1_0 == 0 || n_n1_1 == 0) begin failures++; $display("FAIL: N^_1 not covered both ways"); end
    if (n_chain == 0)  begin failures++; $display("FAIL: no chained operation"); end
    $display("mechanisms: skip=%0d x0=%0d xN=%0d xB=%0d xD=%0d 1F=%0d 2H=%0d zero=%0d",
             n_skip, n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_1f, n_2h, n_zero);
    $display("average per multiplication: %0d cycles start-to-done, %0d loop cycles (k+6 = %0d without skipping)",
             tot_cycles / n_ops, tot_loop / n_ops, K + 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
