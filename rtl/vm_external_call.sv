// vm_external_call: dispatches the interpreter's C_CALL instructions to the
// external functions built in hardware. The interpreter raises start for one
// tick with the primitive number and up to five arguments (the accumulator
// first, then the stack slots); the selected function runs and done is high
// for one tick with the result. Primitive table (vm_pkg):
//   PRIM_GCD    gcd_glue(a1, a2)       integer gcd
//   PRIM_LENGTH list_length(a1)        length of an OCaml list
//   PRIM_INPUT  the machine's input bit, as an OCaml bool
//   PRIM_GCD16  gcd_parallel(a1, a2)   16 gcd in parallel, results summed
// An unknown primitive number answers the unit value in the next tick.
// The memory port is used only by list_length, while the interpreter waits.
//
// Follows the published design in: that C_CALL dispatches to hardware
// functions, the gcd and list-length functions, and gcd called 16 times
// in parallel.
// Choices made here: the primitive numbers, the input-bit primitive and the
// busy/done handshake.
module vm_external_call
  import vm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     start,
  input  logic [7:0] prim,
  input  value_t   args [N_EXT_ARGS],
  input  logic     in_bit,      // input of the machine, readable by the program
  output logic     busy,
  output logic     done,
  output value_t   result,
  output ram_req_t req,
  input  value_t   rdata
);
  logic [7:0] prim_q;
  logic       simple_q;          // one-tick primitive pending
  logic       gcd_start, len_start, g16_start;
  logic       gcd_done,  len_done,  g16_done;
  value_t     gcd_res,   g16_res;
  long_t      len_res;

  assign gcd_start = en && start && (prim == 8'(PRIM_GCD));
  assign len_start = en && start && (prim == 8'(PRIM_LENGTH));
  assign g16_start = en && start && (prim == 8'(PRIM_GCD16));

  gcd_glue u_gcd (.clk, .rst, .en, .start(gcd_start), .v1(args[0]), .v2(args[1]),
                  .done(gcd_done), .result(gcd_res));

  gcd_parallel #(.N(16)) u_g16 (.clk, .rst, .en, .start(g16_start), .v1(args[0]), .v2(args[1]),
                               .done(g16_done), .result(g16_res));

  list_length u_len (.clk, .rst, .en, .start(len_start), .lst(args[0]),
                     .done(len_done), .len(len_res), .req(req), .rdata(rdata));

  always_comb begin
    done   = 1'b0;
    result = VAL_UNIT;
    if (busy) begin
      unique case (prim_q)
        8'(PRIM_GCD):    begin done = gcd_done; result = gcd_res; end
        8'(PRIM_LENGTH): begin done = len_done; result = val_long(len_res); end
        8'(PRIM_GCD16):  begin done = g16_done; result = g16_res; end
        8'(PRIM_INPUT):  begin done = simple_q; result = val_long(long_t'(in_bit)); end
        default:         begin done = simple_q; result = VAL_UNIT; end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      prim_q   <= '0;
      simple_q <= 1'b0;
    end else if (en) begin
      if (start && !busy) begin
        busy     <= 1'b1;
        prim_q   <= prim;
        simple_q <= 1'b1;
      end else if (done) begin
        busy     <= 1'b0;
        simple_q <= 1'b0;
      end
    end
  end
endmodule
