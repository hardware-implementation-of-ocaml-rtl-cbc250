// sum_reg: cumulative sum, the "reg update last 0" example.
// A register that starts at 0 is updated with s + i in every tick in which
// the call is active (en = 1). The output is the value of the register after
// the update, so it is combinational in i: out = acc + i in the same tick.
// When en = 0 the register holds and out shows its current value.
// Reset is synchronous and puts the register back to its initial value 0.
//
// Follows the published design in: the function: a register
// starting at 0, updated with s + i, output is the updated value in the same
// tick.
// Choices made here: the width W = 32, the synchronous reset, and the en
// input that models a call not made in a tick.
module sum_reg #(
  parameter int unsigned W = 32   // ECLAT "int" is int<32>
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,   // the call is on the active control path
  input  logic signed [W-1:0] i,
  output logic signed [W-1:0] out
);
  logic signed [W-1:0] acc_q;

  assign out = en ? acc_q + i : acc_q;

  always_ff @(posedge clk) begin
    if (rst)     acc_q <= '0;
    else if (en) acc_q <= acc_q + i;
  end
endmodule
