// ocaml_fpga_top: the whole design on one chip.
// The main design is the reactive application of reactive_main: an OCaml
// virtual machine with garbage collector and hardware external functions,
// controlled by two buttons and shown on three LEDs. Next to it, with their
// own ports, stand the small synchronous circuits that introduce the
// programming model the machine is built with:
//   full_add        combinational full adder from two half adders
//   sum_main        three instances of a cumulative-sum register
//   gcd_example     sequential and parallel composition of gcd calls
//   exec_main       an interactive counter beside a step-by-step gcd
//   gcd_times2_fsm  the state machine of gcd(10,11) * 2
// All share clk and a synchronous, active-high rst.
//
// Follows the published design in: the reactive application and the example
// circuits.
// Choices made here: placing them side by side with their own ports, one
// clock and a synchronous active-high reset.
module ocaml_fpga_top
  import vm_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // reactive OCaml machine
  input  logic         button1,
  input  logic         button2,
  output logic         led_red,
  output logic         led_green,
  output logic         led_blue,
  output value_t       vm_result,
  output vm_err_e      vm_error,
  // full adder
  input  logic         fa_a, fa_b, fa_ci,
  output logic         fa_s, fa_co,
  // cumulative sums
  input  logic signed [31:0] sm_i,
  output logic signed [31:0] sm_x, sm_y, sm_z,
  // gcd composition example
  input  logic         ge_start,
  output logic         ge_done,
  output logic signed [31:0] ge_x, ge_y, ge_z, ge_s,
  // exec example
  input  logic signed [31:0] em_i, em_a, em_b,
  output logic         em_rdy,
  output logic signed [31:0] em_r,
  // compiled state machine
  input  logic         fsm_start,
  output logic         fsm_done,
  output logic [31:0]  fsm_result
);
  reactive_main u_main (
    .clk, .rst, .button1, .button2, .led_red, .led_green, .led_blue,
    .vm_result, .vm_error);

  full_add u_fa (.a(fa_a), .b(fa_b), .ci(fa_ci), .s(fa_s), .co(fa_co));

  sum_main u_sum (.clk, .rst, .en(1'b1), .i(sm_i), .x(sm_x), .y(sm_y), .z(sm_z));

  gcd_example u_gex (
    .clk, .rst, .start(ge_start), .done(ge_done), .valid(),
    .x(ge_x), .y(ge_y), .z(ge_z), .x1(), .x2(), .s(ge_s));

  exec_main u_exec (
    .clk, .rst, .i(em_i), .a(em_a), .b(em_b), .rdy(em_rdy), .r(em_r),
    .s(), .x(), .sampled());

  gcd_times2_fsm u_fsm (.clk, .rst, .start(fsm_start), .done(fsm_done), .result(fsm_result));
endmodule
