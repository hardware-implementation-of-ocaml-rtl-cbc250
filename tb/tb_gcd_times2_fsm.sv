// tb_gcd_times2_fsm: runs the compiled gcd(10,11) * 2 machine and checks the
// result (2) and the number of ticks: one for entering the gcd state, one per
// subtraction step taken in it (counted by a software replay of the guards)
// and one for the final transition to the done state, which writes result.
module tb_gcd_times2_fsm;
  logic clk = 0, rst = 1, start = 0, done;
  logic [31:0] result;
  int checks = 0, failures = 0;
  gcd_times2_fsm dut (.clk, .rst, .start, .done, .result);
  always #5 clk = ~clk;
  initial begin
    int x, y, ticks, n;
    x = 10; y = 11; ticks = 2;
    while (x != y) begin if (x > y) x -= y; else y -= x; ticks++; end
    @(posedge clk); rst <= 0;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; n = 1;
      while (!done && n < 1000) begin @(negedge clk); n++; end
      checks++;
      if (result != 32'(2 * x) || n != ticks) begin
        failures++; $display("FAIL result=%0d after %0d ticks, expected %0d after %0d", result, n, 2*x, ticks);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
