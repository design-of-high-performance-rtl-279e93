// Testbench of the one-level configurable carry-save adder at W = 40.
// 1F_CSA (alpha = 1): sum + carry must equal a + b + x, carry[0] = 0.
// 2H_CSA (alpha = 0): sum + carry must equal a + b, and the result must be
// two half-adder steps deep: the carry vector of a second 2H step on the
// outputs has to be the same as four serial two-input steps would give.
// Operands are random and kept small enough that the sums fit in W bits.
module ccsa_tb;
  localparam int unsigned W = 40;
  logic alpha;
  logic [W-1:0] a, b, x, sum, carry;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.alpha, .a, .b, .x, .sum, .carry);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd(int bits);
    logic [63:0] r = {$urandom, $urandom};
    return W'(r & ((64'd1 << bits) - 1));
  endfunction

  initial begin
    logic [W-1:0] s1, c1, s2, c2;
    for (int t = 0; t < 2000; t++) begin
      alpha = 1'b1;
      a = rnd(W - 2); b = rnd(W - 2); x = rnd(W - 2);
      #1;
      checks++;
      if (sum + carry != a + b + x || carry[0]) begin
        failures++; $display("FAIL 1F a=%h b=%h x=%h", a, b, x);
      end
      alpha = 1'b0;
      a = rnd(W - 1); b = rnd(W - 1);
      #1;
      // reference: two serial half-adder steps on whole vectors
      s1 = a ^ b;   c1 = (a & b) << 1;
      s2 = s1 ^ c1; c2 = (s1 & c1) << 1;
      checks++;
      if (sum != s2 || carry != c2 || sum + carry != a + b) begin
        failures++; $display("FAIL 2H a=%h b=%h sum=%h carry=%h", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
