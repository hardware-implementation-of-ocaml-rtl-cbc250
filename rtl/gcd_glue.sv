// gcd_glue: external function that lets an OCaml program call the hardware
// gcd. It takes two OCaml values, converts them to plain integers (long_val),
// runs gcd_unit on them and converts the result back (val_long). The
// machine's state is not touched, so it needs no memory port.
// Timing: start in tick t, the gcd takes one tick per call, and done is high
// for one tick together with result (tick t+1 when a = b).
//
// Follows the published design in: the glue: unwrap both values,
// call gcd, wrap the result.
// Choices made here: that the state argument of the calling convention is
// implicit.
module gcd_glue
  import vm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  logic   start,
  input  value_t v1,
  input  value_t v2,
  output logic   done,
  output value_t result
);
  long_t g;

  gcd_unit #(.W(LONG_W)) u_gcd (
    .clk, .rst, .en, .start,
    .a(v1.n), .b(v2.n),
    .busy(), .rdy(done), .result(g)
  );

  assign result = val_long(g);
endmodule
