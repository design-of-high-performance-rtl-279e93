// Testbench of the 4-to-1 operand multiplexer (M1/M2) at W = 24:
// every select code on random data against the shift it stands for.
module opmux4_tb;
  import scs_mm_pkg::*;
  localparam int unsigned W = 24;
  opsel_e sel;
  logic [W-1:0] r, k, y, exp_y;
  int checks = 0, failures = 0;

  opmux4 #(.W(W)) dut (.sel, .r, .k, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      r = W'($urandom); k = W'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = opsel_e'(s);
        #1;
        case (s)
          0: exp_y = W'(r / 2);
          1: exp_y = W'(r / 4);
          2: exp_y = r;
          default: exp_y = k;
        endcase
        checks++;
        if (y != exp_y) begin
          failures++; $display("FAIL sel=%0d r=%h k=%h y=%h", s, r, k, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
