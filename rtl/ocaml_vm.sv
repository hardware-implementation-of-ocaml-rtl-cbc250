// ocaml_vm: the OCaml virtual machine as one reactive block.
// It is meant to be clocked every tick by its caller; each tick it advances
// the bytecode execution by one step. After reset it first loads the global
// data (vm_init_data) and then runs the program stored in the code memory
// from address 0 until STOP.
//
// Inside: the interpreter (vm_interp), the garbage collector (vm_gc), the
// external-call unit with its hardware functions (vm_external_call), the
// code memory (vm_code_rom) and a single value memory (vm_ram) shared by
// global data, stack and the two heap semi-spaces. Only one unit uses the
// memory port at a time: the loader while it runs, the collector while it
// runs, the external-call unit while a C_CALL is pending, the interpreter
// otherwise. The interpreter is idle during each of the other three.
//
// Outputs: stop is high once the program has ended (STOP, or an error shown
// on error); result is the accumulator, which holds the program's result at
// STOP; busy is high while an instruction is being processed and low in the
// tick each instruction completes and after the end. in_bit is an input the
// program can read through the PRIM_INPUT external function. en = 0
// suspends the whole machine (no state changes), as when the caller does not
// take the branch that calls it.
//
// Follows the published design in: the machine as a function with outputs
// stop and busy (busy tied to the internal completion of each instruction),
// one value memory, a code memory, a data loader and an external-call
// dispatcher.
// Choices made here: the en input for suspension, the input bit, the result
// and error outputs, and the priority of the memory port.
module ocaml_vm
  import vm_pkg::*;
#(
  parameter int unsigned RAM_SIZE    = 16384,
  parameter int unsigned CODE_SIZE   = 4096,
  parameter int unsigned DATA_START  = 0,
  parameter int unsigned STACK_START = 1000,
  parameter int unsigned HEAP_START  = 4000,
  parameter int unsigned HEAP_SIZE   = 6000,
  parameter int unsigned N_GLOBALS   = 64,
  parameter string       CODE_FILE   = "rtl/vm_prog_default.hex",
  parameter string       DATA_FILE   = ""
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  logic    in_bit,
  output logic    stop,
  output logic    busy,
  output value_t  result,
  output vm_err_e error
);
  // memory map must fit (checked at elaboration)
  if (HEAP_START + 2 * HEAP_SIZE > RAM_SIZE || STACK_START >= HEAP_START ||
      DATA_START + N_GLOBALS + 1 > STACK_START) begin : g_map_check
    $error("ocaml_vm: memory map does not fit in RAM_SIZE");
  end

  ram_req_t init_req, interp_req, gc_req, ext_req, ram_req;
  value_t   ram_rdata;
  logic     init_busy, init_done;

  logic [$clog2(CODE_SIZE)-1:0] code_addr;
  logic [31:0]                  code_rdata;

  logic        gc_start, gc_busy, gc_done;
  logic [15:0] gc_from, gc_to, gc_sp, gc_free;
  value_t      gc_accu, gc_env, gc_accu_out, gc_env_out;

  logic        ext_start, ext_busy, ext_done;
  logic [7:0]  ext_prim;
  value_t      ext_args [N_EXT_ARGS];
  value_t      ext_result;

  logic        running, stopped, instr_done;

  vm_init_data #(.N_GLOBALS(N_GLOBALS), .DATA_START(DATA_START), .DATA_FILE(DATA_FILE)) u_init (
    .clk, .rst, .en, .start(1'b1), .busy(init_busy), .done(init_done), .req(init_req));

  vm_code_rom #(.CODE_SIZE(CODE_SIZE), .CODE_FILE(CODE_FILE)) u_code (
    .clk, .en, .addr(code_addr), .rdata(code_rdata));

  // requests made while reset is held come from unreset state: ignore them
  vm_ram #(.RAM_SIZE(RAM_SIZE)) u_ram (.clk, .en(en && !rst), .req(ram_req), .rdata(ram_rdata));

  vm_interp #(
    .CODE_SIZE(CODE_SIZE), .DATA_START(DATA_START), .STACK_START(STACK_START),
    .HEAP_START(HEAP_START), .HEAP_SIZE(HEAP_SIZE)
  ) u_interp (
    .clk, .rst, .en, .start(init_done),
    .code_addr, .code_rdata,
    .req(interp_req), .rdata(ram_rdata),
    .gc_start, .gc_from, .gc_to, .gc_sp, .gc_accu, .gc_env,
    .gc_done, .gc_accu_out, .gc_env_out, .gc_free,
    .ext_start, .ext_prim, .ext_args, .ext_done, .ext_result,
    .running, .stopped, .instr_done, .error, .accu_out(result));

  vm_gc #(.SEMI_SIZE(HEAP_SIZE), .STACK_END(HEAP_START), .GLOB_BASE(DATA_START + 1),
          .N_GLOBALS(N_GLOBALS)) u_gc (
    .clk, .rst, .en, .start(gc_start), .from_base(gc_from), .to_base(gc_to),
    .sp(gc_sp), .accu_in(gc_accu), .env_in(gc_env), .busy(gc_busy), .done(gc_done),
    .accu_out(gc_accu_out), .env_out(gc_env_out), .free_out(gc_free),
    .req(gc_req), .rdata(ram_rdata));

  vm_external_call u_ext (
    .clk, .rst, .en, .start(ext_start), .prim(ext_prim), .args(ext_args),
    .in_bit, .busy(ext_busy), .done(ext_done), .result(ext_result),
    .req(ext_req), .rdata(ram_rdata));

  always_comb begin
    if (init_busy)     ram_req = init_req;
    else if (gc_busy)  ram_req = gc_req;
    else if (ext_busy) ram_req = ext_req;
    else               ram_req = interp_req;
  end

  assign stop = stopped;
  assign busy = running && !instr_done;

`ifndef SYNTHESIS
  // only the current owner of the memory port may drive it
  always_ff @(posedge clk) begin
    if (en && !rst) begin
      assert (!(gc_busy && interp_req.en)) else $error("ocaml_vm: interpreter used memory during GC");
      assert (!(ext_busy && interp_req.en)) else $error("ocaml_vm: interpreter used memory during C_CALL");
    end
  end
`endif
endmodule
