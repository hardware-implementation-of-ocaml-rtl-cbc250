// sum_main: the example main that calls sum three times.
// x = sum(i); y = sum(x); z = if i > 0 then 42 else sum(-10).
// Each call is its own sum_reg instance with its own register. The third
// instance is only updated in ticks where i <= 0, because a conditional
// activates one branch only. All outputs are combinational in i and the
// three registers; en lets a caller suspend the whole function.
//
// Follows the published design in: the program and its seven-tick
// trace, including that the sum(-10) register only advances when its branch
// is taken.
// Choices made here: the width and the reset.
module sum_main #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] i,
  output logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] z
);
  localparam logic signed [W-1:0] K42    = 42;
  localparam logic signed [W-1:0] KMINUS = -10;

  logic                cond;
  logic signed [W-1:0] z_else;

  assign cond = (i > 0);

  sum_reg #(.W(W)) u_sum_x (.clk, .rst, .en(en),         .i(i),      .out(x));
  sum_reg #(.W(W)) u_sum_y (.clk, .rst, .en(en),         .i(x),      .out(y));
  sum_reg #(.W(W)) u_sum_z (.clk, .rst, .en(en & ~cond), .i(KMINUS), .out(z_else));

  assign z = cond ? K42 : z_else;
endmodule
