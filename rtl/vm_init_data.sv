// vm_init_data: loads the program's global data into the value memory.
// After start it writes, one word per tick, the header of the global-data
// block (N_GLOBALS fields, tag 0) at DATA_START and then the N_GLOBALS
// initial global values at DATA_START+1 onwards; done rises in the tick after
// the last write and stays high. The initial values come from DATA_FILE (hex
// words in the value encoding: integer in bits 31:1, mark in bit 0); with an
// empty file name every global starts as the integer 0.
// Interface: a ram_req_t write port; it never reads.
//
// Follows the published design in: that global data is loaded into the value
// memory before execution.
// Choices made here: the layout (header, then the globals), the number of
// globals (64) and the one-write-per-tick sequence.
module vm_init_data
  import vm_pkg::*;
#(
  parameter int unsigned N_GLOBALS  = 64,
  parameter int unsigned DATA_START = 0,
  parameter string       DATA_FILE  = ""
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     start,
  output logic     busy,
  output logic     done,
  output ram_req_t req
);
  value_t init_mem [N_GLOBALS];

  initial begin
    for (int k = 0; k < N_GLOBALS; k++) init_mem[k] = VAL_UNIT;
    if (DATA_FILE != "") $readmemh(DATA_FILE, init_mem);
  end

  logic [$clog2(N_GLOBALS+2)-1:0] k_q;  // 0: header, 1..N: globals

  always_comb begin
    req       = '0;
    req.en    = busy;
    req.we    = busy;
    req.addr  = 16'(DATA_START + int'(k_q));
    req.wdata = (k_q == 0) ? mk_header(N_GLOBALS, 8'd0, HDR_WHITE)
                           : init_mem[k_q - 1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      k_q  <= '0;
    end else if (en) begin
      if (start && !busy && !done) begin
        busy <= 1'b1;
        k_q  <= '0;
      end else if (busy) begin
        if (int'(k_q) == N_GLOBALS) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        k_q <= k_q + 1'b1;
      end
    end
  end
endmodule
