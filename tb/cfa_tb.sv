// Exhaustive testbench of the configurable full-adder cell.
// alpha = 1: s + 2c must equal a + b + x, and hc = a & b.
// alpha = 0: the cell is two half adders: s = a ^ b ^ cin, c = (a ^ b) & cin,
// so s + 2c + 2hc = a + b + cin with at most one of c, hc set.
module cfa_tb;
  logic alpha, a, b, x, cin, s, c, hc;
  int checks = 0, failures = 0;

  cfa dut (.alpha, .a, .b, .x, .cin, .s, .c, .hc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {alpha, a, b, x, cin} = 5'(v);
      #1;
      checks++;
      if (alpha) begin
        if (int'(s) + 2 * int'(c) != int'(a) + int'(b) + int'(x) || hc != (a & b)) begin
          failures++; $display("FAIL FA mode v=%0d s=%b c=%b hc=%b", v, s, c, hc);
        end
      end else begin
        if (int'(s) + 2 * int'(c) + 2 * int'(hc) != int'(a) + int'(b) + int'(cin) ||
            (c & hc) || hc != (a & b)) begin
          failures++; $display("FAIL 2HA mode v=%0d s=%b c=%b hc=%b", v, s, c, hc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
