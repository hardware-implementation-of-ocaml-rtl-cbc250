// list_length: external function computing the length of an OCaml list held
// in the value memory, written as the tail-recursive loop
//   aux(lst, acc) = if is_empty(lst) then acc else aux(list_tail(lst), acc+1)
// is_empty is instantaneous (the empty list is the integer 0, any other
// value a pointer). list_tail reads the second field of the cons cell, a
// memory read of two ticks. Each loop iteration therefore takes two ticks:
// tick A tests the list and issues the read of the tail, tick B takes the
// tail from rdata and counts. done is high for one tick with the length.
// Interface: start/lst in, done/len out, and a read-only ram_req_t port.
//
// Follows the published design in: the tail-recursive loop with
// is_empty and list_tail, and the list cell layout (header, head, tail).
// Choices made here: two ticks per element, set by the memory read latency.
module list_length
  import vm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     start,
  input  value_t   lst,
  output logic     done,
  output long_t    len,
  output ram_req_t req,
  input  value_t   rdata
);
  typedef enum logic [1:0] {L_IDLE, L_TEST, L_TAIL} state_e;
  state_e state_q;
  value_t cur_q;
  long_t  acc_q;

  logic empty;
  assign empty = cur_q.is_int;
  assign done  = (state_q == L_TEST) && empty;
  assign len   = acc_q;

  always_comb begin
    req = '0;
    if (state_q == L_TEST && !empty) begin
      req.en   = 1'b1;
      req.addr = 16'(cur_q.n + 1);   // field 1 of the cons cell: the tail
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= L_IDLE;
      cur_q   <= VAL_UNIT;
      acc_q   <= '0;
    end else if (en) begin
      unique case (state_q)
        L_IDLE: if (start) begin
          cur_q   <= lst;
          acc_q   <= '0;
          state_q <= L_TEST;
        end
        L_TEST: state_q <= empty ? L_IDLE : L_TAIL;
        L_TAIL: begin
          cur_q   <= rdata;
          acc_q   <= acc_q + 1'b1;
          state_q <= L_TEST;
        end
        default: state_q <= L_IDLE;
      endcase
    end
  end
endmodule
