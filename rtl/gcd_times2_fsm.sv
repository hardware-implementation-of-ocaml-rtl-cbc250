// gcd_times2_fsm: the state machine a compiler produces for gcd(10,11) * 2.
// One state, GCD, stands for the tail-recursive function. Entering it
// assigns a := A_INIT and b := B_INIT and pauses one tick. In GCD, each tick
// takes exactly one guarded transition: a > b gives a := a - b, a < b gives
// b := b - a (both loop back), and a = b leaves with result := a * 2.
// IDLE and DONE are added around the diagram so that the computation can be
// started (start) and its end observed (done, a level that stays high).
//
// Follows the published design in: the state machine: the entry
// transition loads 10 and 11, the two guarded self-loops subtract, and the
// exit transition stores a * 2.
// Choices made here: the idle state waiting for start and the done state
// holding the result.
module gcd_times2_fsm #(
  parameter int unsigned   W      = 32,
  parameter logic [W-1:0]  A_INIT = 10,
  parameter logic [W-1:0]  B_INIT = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         done,
  output logic [W-1:0] result
);
  typedef enum logic [1:0] {S_IDLE, S_GCD, S_DONE} state_e;
  state_e       state_q;
  logic [W-1:0] a_q, b_q;

  assign done = (state_q == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      a_q     <= '0;
      b_q     <= '0;
      result  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE:
          if (start) begin
            a_q     <= A_INIT;
            b_q     <= B_INIT;
            state_q <= S_GCD;
          end
        S_GCD:
          if (a_q > b_q)      a_q <= a_q - b_q;
          else if (a_q < b_q) b_q <= b_q - a_q;
          else begin
            result  <= a_q << 1;
            state_q <= S_DONE;
          end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
