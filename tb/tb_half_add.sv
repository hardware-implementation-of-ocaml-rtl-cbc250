// tb_half_add: exhaustive check of the half adder against a + b.
module tb_half_add;
  logic a, b, s, co;
  int checks = 0, failures = 0;
  half_add dut (.a, .b, .s, .co);
  initial begin
    for (int k = 0; k < 4; k++) begin
      {a, b} = 2'(k);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++; $display("FAIL a=%0b b=%0b s=%0b co=%0b", a, b, s, co);
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
