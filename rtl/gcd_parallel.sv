// gcd_parallel: external function that calls gcd N times in parallel with
// the same arguments, as the let/and/in construct does: N copies of gcd_unit
// are instantiated side by side and started in the same tick. The function
// returns the sum of the N results, as an OCaml value, so that it equals
// what a loop of N sequential gcd calls that adds up their results returns.
// Interface: the same as gcd_glue. start in tick t; all copies take the same
// number of ticks, and done is high for one tick when every copy has
// answered (tick t+1 when a = b), with result = N * gcd(a, b).
//
// Follows the published design in: N = 16 calls of gcd in parallel
// with the same arguments, through let/and/in.
// Choices made here: that the N results are added up, and that done waits
// for all copies.
module gcd_parallel
  import vm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  logic   start,
  input  value_t v1,
  input  value_t v2,
  output logic   done,
  output value_t result
);
  logic  [N-1:0] rdy;
  long_t         g [N];
  long_t         sum;

  for (genvar i = 0; i < N; i++) begin : g_par
    gcd_unit #(.W(LONG_W)) u_gcd (
      .clk, .rst, .en, .start,
      .a(v1.n), .b(v2.n),
      .busy(), .rdy(rdy[i]), .result(g[i])
    );
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum = sum + g[i];
  end

  assign done   = &rdy;
  assign result = val_long(sum);
endmodule
