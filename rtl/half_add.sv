// half_add: one-bit half adder, the smallest combinational example circuit.
// The sum is the exclusive-or of the two inputs and the carry is their
// conjunction, exactly as the example defines them. Purely combinational:
// outputs follow the inputs in the same clock tick.
//
// Follows the published design in: the example: s = a xor b, co = a
// and b.
// Choices made here: none beyond the SystemVerilog form.
module half_add (
  input  logic a,
  input  logic b,
  output logic s,   // sum bit
  output logic co   // carry out
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
