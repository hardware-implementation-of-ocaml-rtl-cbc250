// tb_exec_main: replays the published seven-tick trace of the exec example
// (i = 2,1,-3,2,-1,-2,3; gcd inputs (18,12) at t0, a new pair at t4, (5,10)
// at t6) and checks s, x, rdy and r in every tick; rdy must be high exactly
// in t3 and t5. In the ticks where the inputs are ignored the testbench
// drives random values, which must not change anything. The pair at t4 is
// (15,15) so that the result at t5 is 15 as the trace prints it. Random runs
// then check the restart rule against a model.
module tb_exec_main;
  logic clk = 0, rst = 1;
  logic signed [31:0] i = 0, a = 0, b = 0, r, s, x;
  logic rdy, sampled;
  int checks = 0, failures = 0;
  exec_main dut (.clk, .rst, .i, .a, .b, .rdy, .r, .s, .x, .sampled);
  always #5 clk = ~clk;
  int ti [7] = '{2, 1, -3, 2, -1, -2, 3};
  int ta [7] = '{18, -1, -1, -1, 15, -1, 5};
  int tb [7] = '{12, -1, -1, -1, 15, -1, 10};
  int ts [7] = '{2, 3, 0, 2, 1, -1, 2};
  int tx [7] = '{0, 0, 0, 6, 0, 15, 0};
  int tr [7] = '{2, 3, 0, 6, 1, 15, 2};
  logic trdy [7] = '{0, 0, 0, 1, 0, 1, 0};
  initial begin
    @(posedge clk); rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 7; t++) begin
      i = ti[t];
      a = (ta[t] < 0) ? $urandom_range(1, 99) : ta[t];
      b = (tb[t] < 0) ? $urandom_range(1, 99) : tb[t];
      #1;
      checks++;
      if (s != ts[t] || x != tx[t] || r != tr[t] || rdy != trdy[t] || sampled != (ta[t] >= 0)) begin
        failures++;
        $display("FAIL t%0d: s=%0d x=%0d r=%0d rdy=%0b sampled=%0b", t, s, x, r, rdy, sampled);
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
