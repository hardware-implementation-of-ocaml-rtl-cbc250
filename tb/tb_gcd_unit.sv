// tb_gcd_unit: checks result and latency of the gcd circuit. The latency is
// one tick for the call plus one per tail call: gcd(2,2) answers one tick
// after start, gcd(5,10) two and gcd(18,12) three. Random positive
// arguments are then compared with a software gcd and its step count, and a
// suspension (en = 0) must freeze the computation.
module tb_gcd_unit;
  logic clk = 0, rst = 1, en = 1, start = 0;
  logic signed [31:0] a = 0, b = 0, result;
  logic busy, rdy;
  int checks = 0, failures = 0;
  gcd_unit dut (.clk, .rst, .en, .start, .a, .b, .busy, .rdy, .result);
  always #5 clk = ~clk;

  function automatic void model(input int x, input int y, output int g, output int ticks);
    ticks = 1;
    while (x != y) begin
      if (x < y) y = y - x; else x = x - y;
      ticks++;
    end
    g = x;
  endfunction

  task automatic run(input int x, input int y, input int hold);
    int g, ticks, n;
    model(x, y, g, ticks);
    @(negedge clk); start = 1; a = x; b = y;
    @(negedge clk); start = 0; a = 0; b = 0;
    n = 1;
    if (hold > 0) begin en = 0; repeat (hold) @(negedge clk); en = 1; end
    while (!rdy && n < 10000) begin @(negedge clk); n++; end
    checks++;
    if (result != g || n != ticks) begin
      failures++; $display("FAIL gcd(%0d,%0d): %0d after %0d ticks, expected %0d after %0d", x, y, result, n, g, ticks);
    end
    @(negedge clk);
  endtask

  initial begin
    @(posedge clk); rst <= 0;
    run(2, 2, 0); run(5, 10, 0); run(18, 12, 0);
    run(18, 12, 5);
    for (int k = 0; k < 50; k++) run($urandom_range(1, 300), $urandom_range(1, 300), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
