// tb_gcd_glue: calls the gcd glue with OCaml integer values and checks the
// returned value (integer mark set, gcd in the payload) and its latency,
// which must equal the gcd step count plus one, against a software model.
module tb_gcd_glue;
  import vm_pkg::*;
  logic clk = 0, rst = 1, en = 1, start = 0, done;
  value_t v1, v2, result;
  int checks = 0, failures = 0;
  gcd_glue dut (.clk, .rst, .en, .start, .v1, .v2, .done, .result);
  always #5 clk = ~clk;
  initial begin
    int x, y, g, ticks, n, p, q;
    v1 = VAL_UNIT; v2 = VAL_UNIT;
    @(posedge clk); rst <= 0;
    for (int k = 0; k < 60; k++) begin
      x = (k == 0) ? 84 : $urandom_range(1, 500);
      y = (k == 0) ? 126 : $urandom_range(1, 500);
      g = x; ticks = 1;
      begin p = x; q = y; while (p != q) begin if (p < q) q -= p; else p -= q; ticks++; end g = p; end
      @(negedge clk); start = 1; v1 = val_long(long_t'(x)); v2 = val_long(long_t'(y));
      @(negedge clk); start = 0; v1 = VAL_UNIT; v2 = VAL_UNIT; n = 1;
      while (!done && n < 5000) begin @(negedge clk); n++; end
      checks++;
      if (result != val_long(long_t'(g)) || n != ticks) begin
        failures++; $display("FAIL gcd(%0d,%0d) -> %0d (int=%0b) in %0d ticks", x, y, result.n, result.is_int, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
