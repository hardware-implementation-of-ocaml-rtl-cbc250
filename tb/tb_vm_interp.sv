// tb_vm_interp: runs an instruction-coverage program on the interpreter,
// with the value memory, code memory, collector and external-call unit
// around it, and checks the 22 results the program stores in its globals:
// integer arithmetic, logic, shifts and comparisons, the conditional
// branches, SWITCH on integers and block tags, blocks and vectors
// (MAKEBLOCK, VECTLENGTH, GET/SETVECTITEM, GET/SETFIELD, OFFSETREF,
// GETGLOBALFIELD), ASSIGN, and a nested exception that is re-raised.
// Expected values are worked out by hand from OCaml's semantics.
module tb_vm_interp;
  import vm_pkg::*;
  localparam int unsigned CODE_SIZE = 512;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  ram_req_t interp_req, gc_req, ext_req, ram_req;
  value_t   rdata;
  logic [$clog2(CODE_SIZE)-1:0] code_addr;
  logic [31:0] code_rdata;
  logic gc_start, gc_busy, gc_done, ext_start, ext_busy, ext_done;
  logic [15:0] gc_from, gc_to, gc_sp, gc_free;
  value_t gc_accu, gc_env, gc_accu_out, gc_env_out, ext_result;
  value_t ext_args [N_EXT_ARGS];
  logic [7:0] ext_prim;
  logic running, stopped, instr_done;
  vm_err_e error;
  value_t accu;

  vm_code_rom #(.CODE_SIZE(CODE_SIZE), .CODE_FILE("tb/vm_prog_ops.hex")) u_code (
    .clk, .en(1'b1), .addr(code_addr), .rdata(code_rdata));
  vm_ram #(.RAM_SIZE(16384)) u_ram (.clk, .en(!rst), .req(ram_req), .rdata(rdata));
  vm_interp #(.CODE_SIZE(CODE_SIZE)) dut (
    .clk, .rst, .en(1'b1), .start(!rst),
    .code_addr, .code_rdata, .req(interp_req), .rdata,
    .gc_start, .gc_from, .gc_to, .gc_sp, .gc_accu, .gc_env,
    .gc_done, .gc_accu_out, .gc_env_out, .gc_free,
    .ext_start, .ext_prim, .ext_args, .ext_done, .ext_result,
    .running, .stopped, .instr_done, .error, .accu_out(accu));
  vm_gc u_gc (.clk, .rst, .en(1'b1), .start(gc_start), .from_base(gc_from), .to_base(gc_to),
    .sp(gc_sp), .accu_in(gc_accu), .env_in(gc_env), .busy(gc_busy), .done(gc_done),
    .accu_out(gc_accu_out), .env_out(gc_env_out), .free_out(gc_free),
    .req(gc_req), .rdata);
  vm_external_call u_ext (.clk, .rst, .en(1'b1), .start(ext_start), .prim(ext_prim),
    .args(ext_args), .in_bit(1'b0), .busy(ext_busy), .done(ext_done),
    .result(ext_result), .req(ext_req), .rdata);

  assign ram_req = gc_busy ? gc_req : ext_busy ? ext_req : interp_req;

  always #5 clk = ~clk;

  task automatic expect_global(input int g, input int v);
    value_t got;
    got = u_ram.mem[1 + g];
    checks++;
    if (!(got.is_int && int'(got.n) == v)) begin
      failures++;
      $display("FAIL: global %0d = %0d (int=%0b), expected %0d", g, int'(got.n), got.is_int, v);
    end
  endtask

  int n_instr = 0;
  always @(posedge clk) if (instr_done) n_instr++;

  initial begin
    int exp_g [22] = '{-93, 42, -4, -1, 11, 40, -10, 1, 45, 2, 77, 102, 201,
                       3, 30, 55, 66, 15, -1, 121, 5, 110};
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (stopped);
    @(posedge clk);
    $display("instructions=%0d", n_instr);
    checks++;
    if (error != ERR_NONE) begin failures++; $display("FAIL: error %0d at pc %0d", error, dut.r.ipc); end
    checks++;
    if (!(accu.is_int && accu.n == 42)) begin failures++; $display("FAIL: final accu"); end
    for (int g = 0; g < 22; g++) if (g != 18) expect_global(g, exp_g[g]);
    // global 18 holds the vector block [15; 55; 66]
    begin
      value_t b;
      b = u_ram.mem[1 + 18];
      checks++;
      if (b.is_int || u_ram.mem[b.n] != val_long(15) || u_ram.mem[b.n+1] != val_long(55)
          || u_ram.mem[b.n+2] != val_long(66) || hdr_size(u_ram.mem[b.n-1]) != 3) begin
        failures++; $display("FAIL: vector block contents");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
