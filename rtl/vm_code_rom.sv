// vm_code_rom: the global array "code" holding the program's bytecode.
// Each instruction is stored as a sequence of 32-bit integers: the opcode
// followed by its operands (for example 19, 2 is POP 2). The contents are
// fixed when the design is built: they are read from CODE_FILE, a text file
// of hexadecimal words, one per line. The ROM has one synchronous read port
// with the same timing as vm_ram: the address given in tick t selects the
// word seen on rdata in tick t+1. en = 0 freezes the output.
//
// Follows the published design in: the bytecode held as a sequence of
// integers, opcode then operands.
// Choices made here: the size (4096 words), the hex image format and filling
// unused words with STOP.
module vm_code_rom #(
  parameter int unsigned CODE_SIZE = 4096,
  parameter string       CODE_FILE = "rtl/vm_prog_default.hex"
) (
  input  logic                         clk,
  input  logic                         en,
  input  logic [$clog2(CODE_SIZE)-1:0] addr,
  output logic [31:0]                  rdata
);
  logic [31:0] rom [CODE_SIZE];

  initial begin
    for (int k = 0; k < CODE_SIZE; k++) rom[k] = 32'd144;  // STOP
    $readmemh(CODE_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= rom[addr];
  end
endmodule
