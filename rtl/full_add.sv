// full_add: one-bit full adder built from two half_add instances, as in the
// example it follows. The first half adder adds a and b, the second adds the
// carry input to that partial sum, and the carry output is the OR of the two
// partial carries. Combinational, no clock.
//
// Follows the published design in: the example: two half adders,
// carry out = c1 or c2.
// Choices made here: none beyond the SystemVerilog form.
module full_add (
  input  logic a,
  input  logic b,
  input  logic ci,  // carry in
  output logic s,   // sum bit
  output logic co   // carry out
);
  logic s1, c1, c2;
  half_add u_ha0 (.a(a),  .b(b),  .s(s1), .co(c1));
  half_add u_ha1 (.a(ci), .b(s1), .s(s),  .co(c2));
  assign co = c1 | c2;
endmodule
