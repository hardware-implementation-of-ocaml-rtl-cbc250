// exec_main: a reactive main that mixes an instantaneous function with a
// long-running one through "exec".
//   let s = sum(i) in let (x,rdy) = exec gcd(a,b) default 0 in
//   let r = if rdy then x else s in (rdy,r)
// sum(i) is updated in every tick. The gcd computation advances one step per
// tick; inputs a and b are only read in the tick a computation starts (the
// first tick after reset and the tick after each result) and are ignored
// otherwise. In the tick the result arrives rdy is high for one tick and x is
// the result; in all other ticks x is the default 0 and r is s.
//
// Follows the published design in: the program: sum(i) every tick,
// exec gcd(a,b) default 0, r = rdy ? x : s, and its trace.
// Choices made here: the width, the sampled output, and reading the trace's
// tick-4 inputs as (15,15), the only pair consistent with the result 15 it
// prints in tick 5.
module exec_main #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] i,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                rdy,
  output logic signed [W-1:0] r,
  output logic signed [W-1:0] s,       // exposed for observation
  output logic signed [W-1:0] x,
  output logic                sampled  // a and b are read in this tick
);
  logic                busy;
  logic signed [W-1:0] g;

  sum_reg  #(.W(W)) u_sum (.clk, .rst, .en(1'b1), .i(i), .out(s));
  gcd_unit #(.W(W)) u_gcd (.clk, .rst, .en(1'b1), .start(!busy), .a(a), .b(b),
                           .busy(busy), .rdy(rdy), .result(g));

  assign sampled = !busy;
  assign x       = rdy ? g : '0;
  assign r       = rdy ? x : s;
endmodule
