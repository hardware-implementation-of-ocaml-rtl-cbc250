// vm_ram: the global value memory of the virtual machine.
// One array of OCaml values (integer + mark bit) holds the global data, the
// stack and both heap semi-spaces. It has a single port, so all accesses are
// sequential. A read sets the read pointer in tick t and its word is on rdata
// in tick t+1 (two ticks in all); rdata then holds until the next read. A
// write takes effect at the end of the tick it is issued in. Every word starts
// as the integer 0, which is the declared initial element of the array.
// en = 0 freezes the memory (suspension of the whole machine).
//
// Follows the published design in: one array of 16384 values, initialised to
// the integer 0, accessed sequentially (read in two ticks, write in one).
// Choices made here: the clock enable and the request struct.
module vm_ram
  import vm_pkg::*;
#(
  parameter int unsigned RAM_SIZE = 16384
) (
  input  logic     clk,
  input  logic     en,
  input  ram_req_t req,
  output value_t   rdata
);
  localparam int unsigned AW = $clog2(RAM_SIZE);

  value_t mem [RAM_SIZE];

  initial begin
    for (int k = 0; k < RAM_SIZE; k++) mem[k] = VAL_UNIT;
  end

  always_ff @(posedge clk) begin
    if (en && req.en) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      else        rdata <= mem[req.addr[AW-1:0]];
    end
  end

`ifndef SYNTHESIS
  // every address the machine issues must lie inside the array
  always_ff @(posedge clk) begin
    if (en && req.en) assert (int'(req.addr) < RAM_SIZE)
      else $error("vm_ram: address %0d out of range", req.addr);
  end
`endif
endmodule
