// reactive_main: a reactive application around the OCaml virtual machine,
// driving three LEDs from two buttons. Called every tick:
//   if button1 then (false,false,false)
//   else let (stop,busy,result) = ocaml_vm(button2) in
//        (busy, stop, stop && long_val(result) == 42)
// While button1 is pressed the machine is not called, so its execution is
// suspended and all LEDs are off. Otherwise red shows busy, green shows that
// the program has finished, and blue that it finished with the integer 42.
// button2 is passed to the machine, where the program can read it.
// The LED outputs are combinational in the buttons and the machine's state.
//
// Follows the published design in: the application: button1
// switches the LEDs off and suspends the machine; red = busy, green = stop,
// blue = stop and result 42; button2 is the machine's argument.
// Choices made here: modelling the suspended call as a clock enable, and the
// observation outputs.
module reactive_main
  import vm_pkg::*;
#(
  parameter int unsigned RAM_SIZE    = 16384,
  parameter int unsigned CODE_SIZE   = 4096,
  parameter int unsigned STACK_START = 1000,
  parameter int unsigned HEAP_START  = 4000,
  parameter int unsigned HEAP_SIZE   = 6000,
  parameter string       CODE_FILE   = "rtl/vm_prog_default.hex"
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    button1,
  input  logic    button2,
  output logic    led_red,
  output logic    led_green,
  output logic    led_blue,
  output value_t  vm_result,   // for observation
  output vm_err_e vm_error
);
  logic vm_stop, vm_busy;

  ocaml_vm #(
    .RAM_SIZE(RAM_SIZE), .CODE_SIZE(CODE_SIZE), .STACK_START(STACK_START),
    .HEAP_START(HEAP_START), .HEAP_SIZE(HEAP_SIZE), .CODE_FILE(CODE_FILE)
  ) u_vm (
    .clk, .rst, .en(!button1), .in_bit(button2),
    .stop(vm_stop), .busy(vm_busy), .result(vm_result), .error(vm_error));

  always_comb begin
    if (button1) begin
      led_red = 1'b0; led_green = 1'b0; led_blue = 1'b0;
    end else begin
      led_red   = vm_busy;
      led_green = vm_stop;
      led_blue  = vm_stop && (vm_result.n == 42);
    end
  end
endmodule
