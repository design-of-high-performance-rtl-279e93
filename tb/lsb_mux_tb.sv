// Exhaustive testbench of the 3-bit 2-to-1 multiplexer (M4/M5): the output
// must be the low three bits of the register divided by 2 or by 4.
module lsb_mux_tb;
  logic shr2;
  logic [4:0] reg_v;
  logic [2:0] y;
  int checks = 0, failures = 0;

  lsb_mux dut (.shr2, .r(reg_v[4:1]), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {shr2, reg_v} = 6'(v);
      #1;
      checks++;
      if (y != 3'((shr2 ? reg_v / 4 : reg_v / 2) % 8)) begin
        failures++; $display("FAIL shr2=%b r=%b y=%b", shr2, reg_v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
