// gcd_unit: the tail-recursive gcd function as a circuit.
//   let rec gcd(a,b) = if a < b then gcd(a,b-a) else if a > b then gcd(a-b,b) else a
// Every call, the direct one and each tail call, costs one clock tick: a
// start in tick t loads the arguments, and from tick t+1 on the body is
// evaluated once per tick. When a = b the body returns at once: rdy is high
// and result holds a in that same tick, so gcd(2,2) answers in tick t+1,
// gcd(5,10) in t+2 and gcd(18,12) in t+3.
// start is accepted while the unit is idle or in the tick it answers, which
// lets a caller chain calls without a gap. Arguments are assumed positive;
// with a zero argument the recursion, like the source function, never ends.
//
// Follows the published design in: the tail-recursive gcd: one tick
// for the call and one per recursive call.
// Choices made here: the width W = 32, the start/busy/rdy handshake and the
// restart in the tick of rdy.
module gcd_unit #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,      // clock enable: the call advances only when high
  input  logic                start,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                busy,    // a call is in progress
  output logic                rdy,     // result valid in this tick
  output logic signed [W-1:0] result
);
  logic                run_q;
  logic signed [W-1:0] a_q, b_q;

  assign busy   = run_q;
  assign rdy    = run_q && (a_q == b_q);
  assign result = a_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
    end else if (!en) begin
      // suspended: hold everything
    end else if (start && (!run_q || rdy)) begin
      run_q <= 1'b1;
      a_q   <= a;
      b_q   <= b;
    end else if (run_q) begin
      if (a_q < b_q)      b_q   <= b_q - a_q;
      else if (a_q > b_q) a_q   <= a_q - b_q;
      else                run_q <= 1'b0;
    end
  end
endmodule
