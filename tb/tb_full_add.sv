// tb_full_add: exhaustive check of the full adder against a + b + ci.
module tb_full_add;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  full_add dut (.a, .b, .ci, .s, .co);
  initial begin
    for (int k = 0; k < 8; k++) begin
      {a, b, ci} = 3'(k);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++; $display("FAIL a=%0b b=%0b ci=%0b s=%0b co=%0b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
