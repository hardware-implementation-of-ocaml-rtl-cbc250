// tb_gcd_example: checks example() tick by tick against its published trace
// (start in t0): x = 2 and y = 3 from t1, z = 5 from t3, x2 = 5 from t5,
// x1 = 6 and s = 11 in t6, where done is high. Also checks that nothing is
// valid before its tick, and that a second call repeats the trace.
module tb_gcd_example;
  logic clk = 0, rst = 1, start = 0, done;
  logic [3:0] valid;
  logic signed [31:0] x, y, z, x1, x2, s;
  int checks = 0, failures = 0;
  gcd_example dut (.clk, .rst, .start, .done, .valid, .x, .y, .z, .x1, .x2, .s);
  always #5 clk = ~clk;
  // expected valid bits per tick t0..t6 (bit0 x, bit1 z, bit2 x1, bit3 x2)
  logic [3:0] ev [7] = '{4'b0000, 4'b0001, 4'b0001, 4'b0011, 4'b0011, 4'b1011, 4'b1111};
  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    @(posedge clk); rst <= 0;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk);
      for (int t = 0; t < 7; t++) begin
        start = (t == 0);
        #1;
        chk($sformatf("valid t%0d = %b", t, valid), valid == ev[t]);
        chk($sformatf("done t%0d", t), done == (t == 6));
        if (valid[0]) chk("x,y", x == 2 && y == 3);
        if (valid[1]) chk("z", z == 5);
        if (valid[3]) chk("x2", x2 == 5);
        if (valid[2]) chk("x1", x1 == 6);
        if (t == 6)   chk("s", s == 11);
        @(negedge clk);
      end
      start = 0;
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
