// tb_reactive_main: runs the default program through the reactive wrapper
// (with a smaller heap so that collection is frequent) while pressing
// button1 at random. Checks in every tick: all LEDs off while button1 is
// pressed, red = machine busy, green = stopped, blue = stopped with 42.
// Checks that pressing button1 freezes the program counter, that green and
// blue light at the end with result 42, and that the value of button2 seen
// by the program (global 9) is the one driven.
module tb_reactive_main;
  import vm_pkg::*;
  logic clk = 0, rst = 1, button1 = 0, button2 = 1;
  logic led_red, led_green, led_blue;
  value_t vm_result;
  vm_err_e vm_error;
  int checks = 0, failures = 0, n_red = 0, n_freeze = 0, led_bad = 0;
  logic [15:0] pc_prev;
  logic b1_prev = 0, force_b1 = 0;
  reactive_main #(.RAM_SIZE(8192), .CODE_SIZE(1024), .HEAP_SIZE(1000)) dut (
    .clk, .rst, .button1, .button2, .led_red, .led_green, .led_blue, .vm_result, .vm_error);
  always #5 clk = ~clk;
  function automatic void chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction
  // LED rule and freeze, sampled just before each clock edge
  always @(negedge clk) if (!rst) begin
    if (button1) begin
      if (led_red || led_green || led_blue) led_bad++;
    end else begin
      if (led_red != dut.vm_busy || led_green != dut.vm_stop ||
          led_blue != (dut.vm_stop && vm_result.n == 42)) led_bad++;
      if (led_red) n_red++;
    end
    if (b1_prev && button1) begin
      if (dut.u_vm.u_interp.r.pc != pc_prev) led_bad++;
      n_freeze++;
    end
    b1_prev = button1;
    pc_prev = dut.u_vm.u_interp.r.pc;
    if (force_b1) button1 = 1;
    else if (!led_green) button1 = ($urandom_range(0, 7) == 0);
    else button1 = 0;
  end
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    wait (led_green);
    @(negedge clk); #1;
    chk("no LED rule violation / freeze violation", led_bad == 0);
    chk("green and blue at the end", led_green && led_blue && !led_red);
    chk("result 42", vm_result == val_long(42));
    chk("no error", vm_error == ERR_NONE);
    chk("button2 read by the program", dut.u_vm.u_ram.mem[1 + 9] == val_long(1));
    chk("red seen while running", n_red > 1000);
    chk("button1 presses seen", n_freeze > 100);
    force_b1 = 1; @(negedge clk); @(negedge clk); #1;
    chk("all off under button1 after stop", !led_red && !led_green && !led_blue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
