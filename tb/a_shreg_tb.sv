// Testbench of the A shift register at W = 33: loads a random A, then
// shifts by one or two at random and checks that the two outputs are
// always A_{p} and A_{p+1} of a position p tracked by the testbench,
// reading zero beyond the top bit.
module a_shreg_tb;
  localparam int unsigned W = 33;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, shift2 = 1'b0;
  logic [W-1:0] din = '0;
  logic a_next1, a_next2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  a_shreg #(.W(W)) dut (.clk, .rst_n, .load, .din, .shift, .shift2, .a_next1, .a_next2);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_at(logic [W-1:0] v, int p);
    return (p < int'(W)) ? v[p] : 1'b0;
  endfunction

  initial begin
    logic [W-1:0] a;
    int p;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      a = {$urandom, $urandom};
      @(negedge clk);
      din = a; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      p = 0;
      while (p < int'(W) + 3) begin
        checks++;
        if (a_next1 != bit_at(a, p) || a_next2 != bit_at(a, p + 1)) begin
          failures++; $display("FAIL p=%0d", p);
        end
        shift = ($urandom % 4) != 0; shift2 = $urandom % 2;
        @(negedge clk);
        if (shift) p += shift2 ? 2 : 1;
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
