// gcd_example: the function example() that shows sequential and parallel
// composition of non-instantaneous calls.
//   let x = gcd(2,2) in let y = x + 1 in let z = gcd(5,10) in
//   let x1 = gcd(18,12) and x2 = gcd(5,10) in let s = x1 + x2 in (x,y,z,s)
// Two gcd_unit instances exist because the parallel binding needs two
// copies; the sequential calls reuse the first one. A let binding starts
// its continuation in the tick its value arrives, so with start in tick t0
// x arrives in t1 (and y with it), z in t3, x2 in t5, x1 in t6, and s and
// done in t6. The parallel branches meet at the "in": the first result is
// held in a register until the other arrives. valid bits tell which of the
// outputs already hold their value.
//
// Follows the published design in: the function and its
// tick-by-tick trace: x at t1, z at t3, x2 at t5, x1 and s = 11 at t6.
// Choices made here: the valid flags, the holding register of the parallel
// join and the start input.
module gcd_example #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,    // call example()
  output logic                done,     // (x,y,z,s) complete in this tick
  output logic        [3:0]   valid,    // bit 0 x (and y), 1 z, 2 x1, 3 x2
  output logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] z,
  output logic signed [W-1:0] x1,
  output logic signed [W-1:0] x2,
  output logic signed [W-1:0] s
);
  typedef enum logic [1:0] {P_IDLE, P_X, P_Z, P_PAR} phase_e;
  phase_e phase_q;

  logic                st0, st1, rdy0, rdy1;
  logic signed [W-1:0] a0, b0, a1, b1, r0, r1;
  logic signed [W-1:0] x_q, z_q, x1_q, x2_q;
  logic        [3:0]   valid_q;

  gcd_unit #(.W(W)) u_gcd0 (.clk, .rst, .en(1'b1), .start(st0), .a(a0), .b(b0),
                            .busy(), .rdy(rdy0), .result(r0));
  gcd_unit #(.W(W)) u_gcd1 (.clk, .rst, .en(1'b1), .start(st1), .a(a1), .b(b1),
                            .busy(), .rdy(rdy1), .result(r1));

  // which branch results are present in this tick (stored or arriving now)
  logic have_x1, have_x2;
  assign have_x1 = valid_q[2] || (phase_q == P_PAR && rdy0);
  assign have_x2 = valid_q[3] || (phase_q == P_PAR && rdy1);

  always_comb begin
    st0 = 1'b0; a0 = '0; b0 = '0;
    st1 = 1'b0; a1 = '0; b1 = '0;
    unique case (phase_q)
      P_IDLE: if (start) begin st0 = 1'b1; a0 = 2;  b0 = 2;  end
      P_X:    if (rdy0)  begin st0 = 1'b1; a0 = 5;  b0 = 10; end
      P_Z:    if (rdy0)  begin
                st0 = 1'b1; a0 = 18; b0 = 12;
                st1 = 1'b1; a1 = 5;  b1 = 10;
              end
      default: ;
    endcase
  end

  assign x     = (phase_q == P_X && rdy0) ? r0 : x_q;
  assign y     = x + 1;
  assign z     = (phase_q == P_Z && rdy0) ? r0 : z_q;
  assign x1    = (phase_q == P_PAR && rdy0) ? r0 : x1_q;
  assign x2    = (phase_q == P_PAR && rdy1) ? r1 : x2_q;
  assign done  = (phase_q == P_PAR) && have_x1 && have_x2;
  assign s     = x1 + x2;
  // valid reads zero while idle: results of the previous call stay on the
  // value outputs but are not flagged as belonging to a new call
  assign valid = (phase_q == P_IDLE) ? 4'b0000 : valid_q | {(phase_q == P_PAR && rdy1), (phase_q == P_PAR && rdy0),
                            (phase_q == P_Z && rdy0),   (phase_q == P_X && rdy0)};

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q <= P_IDLE;
      x_q <= '0; z_q <= '0; x1_q <= '0; x2_q <= '0;
      valid_q <= '0;
    end else begin
      unique case (phase_q)
        P_IDLE: if (start) begin phase_q <= P_X; valid_q <= '0; end
        P_X:    if (rdy0) begin x_q <= r0; valid_q[0] <= 1'b1; phase_q <= P_Z; end
        P_Z:    if (rdy0) begin z_q <= r0; valid_q[1] <= 1'b1; phase_q <= P_PAR; end
        P_PAR: begin
          if (rdy0) begin x1_q <= r0; valid_q[2] <= 1'b1; end
          if (rdy1) begin x2_q <= r1; valid_q[3] <= 1'b1; end
          if (done) phase_q <= P_IDLE;
        end
        default: phase_q <= P_IDLE;
      endcase
    end
  end
endmodule
