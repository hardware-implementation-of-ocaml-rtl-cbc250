// tb_sum_reg: drives random inputs and call enables into the cumulative
// sum and compares its output, in every tick, with a software running sum
// (the output is the sum after adding the current input when enabled).
module tb_sum_reg;
  logic clk = 0, rst = 1, en;
  logic signed [31:0] i, out;
  int checks = 0, failures = 0;
  longint model;
  sum_reg dut (.clk, .rst, .en, .i, .out);
  always #5 clk = ~clk;
  initial begin
    en = 0; i = 0; model = 0;
    @(posedge clk); rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      en = 1'($urandom);
      i  = $signed($urandom_range(0, 2000)) - 1000;
      #1;
      checks++;
      if (out != 32'(en ? model + i : model)) begin
        failures++; $display("FAIL t=%0d out=%0d", t, out);
      end
      if (en) model = model + i;
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
