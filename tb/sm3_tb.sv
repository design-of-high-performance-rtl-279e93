// Testbench of the simplified multiplexer SM3 at W = 20: for each
// (A^, q^) the output must be A^*B^ + q^*N^ when D^ = N^ + B^ (the
// relation the multiplier maintains), checked arithmetically, and D^
// must be taken as given when both selects are 1.
module sm3_tb;
  localparam int unsigned W = 20;
  logic a_hat, q_hat;
  logic [W-1:0] n_hat, b_hat, d_hat, x;
  int checks = 0, failures = 0;

  sm3 #(.W(W)) dut (.a_hat, .q_hat, .n_hat, .b_hat, .d_hat, .x);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      n_hat = W'($urandom) >> 2;
      b_hat = W'($urandom) >> 2;
      d_hat = (t % 2 == 0) ? n_hat + b_hat : W'($urandom);
      for (int s = 0; s < 4; s++) begin
        {a_hat, q_hat} = 2'(s);
        #1;
        checks++;
        if (a_hat && q_hat) begin
          if (x != d_hat) begin failures++; $display("FAIL D sel"); end
        end else if (x != (a_hat ? b_hat : '0) + (q_hat ? n_hat : '0)) begin
          failures++; $display("FAIL sel=%0d x=%h", s, x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
