// tb_sum_main: replays the published seven-tick trace (i = 2,1,-3,2,-1,-2,3
// giving x, y, z) and then random inputs against a software model of the
// three registers, including the one updated only when i <= 0.
module tb_sum_main;
  logic clk = 0, rst = 1;
  logic signed [31:0] i, x, y, z;
  int checks = 0, failures = 0;
  sum_main dut (.clk, .rst, .en(1'b1), .i, .x, .y, .z);
  always #5 clk = ~clk;
  int ti [7] = '{2, 1, -3, 2, -1, -2, 3};
  int tx [7] = '{2, 3, 0, 2, 1, -1, 2};
  int ty [7] = '{2, 5, 5, 7, 8, 7, 9};
  int tz [7] = '{42, 42, -10, 42, -20, -30, 42};
  initial begin
    int mx, my, mz;
    i = 0;
    @(posedge clk); rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 7; t++) begin
      i = ti[t]; #1;
      checks++;
      if (x != tx[t] || y != ty[t] || z != tz[t]) begin
        failures++; $display("FAIL trace t%0d: x=%0d y=%0d z=%0d", t, x, y, z);
      end
      @(negedge clk);
    end
    mx = 2; my = 9; mz = -30;
    for (int t = 0; t < 100; t++) begin
      i = $signed($urandom_range(0, 20)) - 10; #1;
      mx += i; my += mx;
      if (!(i > 0)) mz += -10;
      checks++;
      if (x != mx || y != my || z != ((i > 0) ? 42 : mz)) begin
        failures++; $display("FAIL random t%0d", t);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
