// tb_ocaml_vm: runs the default program on the virtual machine with a heap
// of 1000 words per semi-space, so that the collector runs many times, and
// checks the final result (42), the globals the program leaves behind, that
// collections and external calls happened, that a suspension (en = 0)
// freezes the machine, and that busy drops once per instruction.

module tb_ocaml_vm;
  import vm_pkg::*;
  logic clk = 0, rst = 1, en = 1, in_bit = 1;
  logic stop, busy;
  value_t result;
  vm_err_e error;
  int checks = 0, failures = 0;
  int cycles = 0, n_gc = 0, n_ext = 0, n_instr = 0, n_idle = 0;

  ocaml_vm #(.HEAP_SIZE(1000), .RAM_SIZE(8192), .CODE_SIZE(1024)) dut (
    .clk, .rst, .en, .in_bit, .stop, .busy, .result, .error);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.gc_start && en) n_gc++;
    if (dut.ext_start && en) n_ext++;
    if (dut.instr_done && en) n_instr++;
    if (!busy && !stop && en && dut.running) n_idle++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // suspend for a while in the middle of the run
    repeat (2000) @(posedge clk);
    begin
      logic [15:0] pc0;
      en <= 0;
      @(posedge clk);
      pc0 = dut.u_interp.r.pc;
      repeat (50) @(posedge clk);
      check("suspension freezes pc", dut.u_interp.r.pc == pc0);
      en <= 1;
    end
    wait (stop);
    @(posedge clk);
    $display("cycles=%0d instr=%0d gc=%0d ext=%0d err=%0d result=%0d",
             cycles, n_instr, n_gc, n_ext, error, int'(result.n));
    check("no error", error == ERR_NONE);
    check("result is 42", result.is_int && result.n == 42);
    check("length of l = 10", dut.u_ram.mem[1+8] == val_long(10));
    check("partial application = 42", dut.u_ram.mem[1+5] == val_long(42));
    check("exception handler value = 7", dut.u_ram.mem[1+6] == val_long(7));
    check("gcd_glue = 42", dut.u_ram.mem[1+7] == val_long(42));
    check("input bit read", dut.u_ram.mem[1+9] == val_long(1));
    check("collector ran", n_gc >= 5);
    check("3 external calls", n_ext == 3);
    check("busy low once per instruction", n_idle == n_instr);
    check("stop leaves busy low", !busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
