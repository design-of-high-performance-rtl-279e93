// Testbench of the zero detector at W = 48: all zeros, every one-hot
// value, and random values.
module zero_d_tb;
  localparam int unsigned W = 48;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.sc, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    #1;
    checks++;
    if (zero != (sc == '0)) begin failures++; $display("FAIL sc=%h zero=%b", sc, zero); end
  endtask

  initial begin
    sc = '0; chk();
    for (int j = 0; j < int'(W); j++) begin sc = '0; sc[j] = 1'b1; chk(); end
    for (int t = 0; t < 100; t++) begin sc = {$urandom, $urandom}; chk(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
