// Testbench of the control part at K = 16. It plays the datapath:
// Zero_D reports SC = 0 after a chosen number of cycles in each
// conversion, and the skip input follows a random pattern (only where
// allow is high). It checks the phase sequence and its outputs: M1/M2
// selects and alpha per phase, D^ written exactly once, the loop covering
// iterations -1 .. K+4 with one cycle per executed iteration, the shift
// by two after a skip, busy, and the single done pulse.
module scs_ctrl_tb;
  import scs_mm_pkg::*;
  localparam int unsigned K = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic sc_zero = 1'b0, skip = 1'b0, skipped = 1'b0;
  opsel_e m12_sel;
  logic alpha, ld_ops, ss_we, ss_clr, d_we, iter_en, allow, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scs_ctrl #(.K(K)) dut (.clk, .rst_n, .start, .sc_zero, .skip, .skipped,
    .m12_sel, .alpha, .ld_ops, .ss_we, .ss_clr, .d_we, .iter_en, .allow, .busy, .done);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_1(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int pre_len, conv_len, i, n_iter, n_skip;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      pre_len = $urandom % 5; conv_len = $urandom % 5;
      @(negedge clk);
      expect_1(!busy, "idle");
      start = 1'b1;
      #1 expect_1(ld_ops, "ld_ops with start");
      @(negedge clk);
      start = 1'b0;
      // PRE_INIT
      expect_1(m12_sel == OP_CONST && !alpha && ss_we && busy, "pre_init");
      @(negedge clk);
      // PRE_CONV
      for (int c = 0; c < pre_len; c++) begin
        expect_1(m12_sel == OP_DIRECT && !alpha && ss_we && !d_we, "pre_conv");
        @(negedge clk);
      end
      sc_zero = 1'b1; #1;
      expect_1(d_we && ss_clr && !ss_we, "D^ write");
      @(negedge clk);
      sc_zero = 1'b0;
      // LOOP: iterations -1 .. K+4
      i = -1; n_iter = 0; n_skip = 0; skipped = 1'b0;
      while (i <= int'(K) + 4) begin
        #1;
        expect_1(iter_en && alpha && ss_we, "loop");
        expect_1(m12_sel == (skipped ? OP_SHR2 : OP_SHR1), "loop shift");
        expect_1(allow == (i + 1 <= int'(K) + 4), "allow");
        skip = allow && ($urandom % 3 == 0);
        #1;
        n_iter++;
        @(negedge clk);
        skipped = skip;
        if (skip) n_skip++;
        i += skip ? 2 : 1;
        skip = 1'b0;
      end
      expect_1(n_iter + n_skip == int'(K) + 6, "iteration count");
      // CONV_SHIFT
      #1;
      expect_1(!iter_en && !alpha && ss_we && m12_sel == (skipped ? OP_SHR2 : OP_SHR1), "conv_shift");
      @(negedge clk);
      for (int c = 0; c < conv_len; c++) begin
        expect_1(m12_sel == OP_DIRECT && !alpha && ss_we && !done, "conv");
        @(negedge clk);
      end
      sc_zero = 1'b1; #1;
      expect_1(!ss_we && !done, "conv end");
      @(negedge clk);
      sc_zero = 1'b0;
      expect_1(done && busy, "done pulse");
      @(negedge clk);
      expect_1(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
