// tb_ocaml_fpga_top: end-to-end test of the whole design at its default
// sizes (16384-word memory, 3000-word stack, two 6000-word semi-spaces).
// The default OCaml program runs on the machine while button1 is pressed at
// random; at the same time the example circuits are driven with their
// published traces. Every mechanism is counted and the test fails if one of
// them never happened:
//   gc         collections started by a full heap
//   c_gcd, c_length, c_input   each external function called
//   raise      exception raised and caught (PUSHTRAP/RAISE)
//   restart    partial application (closure made by GRAB, resumed by RESTART)
//   appterm    tail calls
//   suspend    ticks with button1 pressed while the program runs (pc frozen)
//   led_r/g/b  each LED lit
//   exec_rdy   exec example results (with restart of the gcd)
//   par_gcd    both gcd units of the composition example busy in one tick
//   fsm_done   compiled state machine finished
//   fa, sums   full adder and cumulative sum checks
module tb_ocaml_fpga_top;
  import vm_pkg::*;
  logic clk = 0, rst = 1, button1 = 0, button2 = 1;
  logic led_red, led_green, led_blue;
  value_t vm_result;
  vm_err_e vm_error;
  logic fa_a = 0, fa_b = 0, fa_ci = 0, fa_s, fa_co;
  logic signed [31:0] sm_i = 0, sm_x, sm_y, sm_z;
  logic ge_start = 0, ge_done;
  logic signed [31:0] ge_x, ge_y, ge_z, ge_s;
  logic signed [31:0] em_i = 0, em_a = 0, em_b = 0, em_r;
  logic em_rdy, fsm_start = 0, fsm_done;
  logic [31:0] fsm_result;
  int checks = 0, failures = 0;

  ocaml_fpga_top dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // ------------------------------------------------------------ counters
  int n_gc = 0, n_gcd = 0, n_len = 0, n_in = 0, n_raise = 0, n_restart = 0, n_appterm = 0;
  int n_suspend = 0, n_red = 0, n_green = 0, n_blue = 0, n_exec = 0, n_par = 0, n_fsm = 0;
  int n_fa = 0, n_sum = 0, n_ge = 0, led_bad = 0, freeze_bad = 0;
  logic [15:0] pc_prev;
  logic b1_prev = 0, vm_done = 0;
  always @(posedge clk) if (!rst) begin
    if (!button1) begin
      if (dut.u_main.u_vm.gc_start) n_gc++;
      if (dut.u_main.u_vm.ext_start && dut.u_main.u_vm.ext_prim == 8'(PRIM_GCD))    n_gcd++;
      if (dut.u_main.u_vm.ext_start && dut.u_main.u_vm.ext_prim == 8'(PRIM_LENGTH)) n_len++;
      if (dut.u_main.u_vm.ext_start && dut.u_main.u_vm.ext_prim == 8'(PRIM_INPUT))  n_in++;
      if (dut.u_main.u_vm.instr_done) begin
        case (opcode_e'(dut.u_main.u_vm.u_interp.r.op))
          RAISE:   n_raise++;
          RESTART: n_restart++;
          APPTERM, APPTERM1, APPTERM2, APPTERM3: n_appterm++;
          default: ;
        endcase
      end
    end
    if (dut.u_gex.u_gcd0.busy && dut.u_gex.u_gcd1.busy) n_par++;
  end
  always @(negedge clk) if (!rst) begin
    if (button1) begin
      if (led_red || led_green || led_blue) led_bad++;
      if (b1_prev && dut.u_main.u_vm.u_interp.r.pc != pc_prev) freeze_bad++;
      if (!led_green && dut.u_main.u_vm.running) n_suspend++;
    end
    if (led_red) n_red++;
    if (led_green) n_green++;
    if (led_blue) n_blue++;
    b1_prev = button1;
    pc_prev = dut.u_main.u_vm.u_interp.r.pc;
    button1 = vm_done ? 1'b0 : ($urandom_range(0, 15) == 0);
  end

  // ------------------------------------------------------- example traces
  int ti [7] = '{2, 1, -3, 2, -1, -2, 3};
  int tx [7] = '{2, 3, 0, 2, 1, -1, 2};
  int ty [7] = '{2, 5, 5, 7, 8, 7, 9};
  int tz [7] = '{42, 42, -10, 42, -20, -30, 42};
  int ea [7] = '{18, 1, 1, 1, 15, 1, 5};
  int eb [7] = '{12, 1, 1, 1, 15, 1, 10};
  int er [7] = '{2, 3, 0, 6, 1, 15, 2};
  logic erdy [7] = '{0, 0, 0, 1, 0, 1, 0};

  task automatic run_examples();
    int n;
    // cumulative sums and exec example, same input i, trace from t0 (the
    // first tick after reset)
    for (int t = 0; t < 7; t++) begin
      sm_i = ti[t]; em_i = ti[t]; em_a = ea[t]; em_b = eb[t]; #1;
      chk($sformatf("sum_main t%0d", t), sm_x == tx[t] && sm_y == ty[t] && sm_z == tz[t]);
      chk($sformatf("exec t%0d", t), em_r == er[t] && em_rdy == erdy[t]);
      n_sum++;
      if (em_rdy) n_exec++;
      @(negedge clk);
    end
    // full adder, exhaustive
    for (int k = 0; k < 8; k++) begin
      {fa_a, fa_b, fa_ci} = 3'(k); #1;
      chk("full adder", {fa_co, fa_s} == 2'(int'(fa_a) + int'(fa_b) + int'(fa_ci)));
      n_fa++;
    end
    @(negedge clk);
    // gcd composition: start, done six ticks later with s = 11
    ge_start = 1; @(negedge clk); ge_start = 0; n = 1;
    while (!ge_done && n < 100) begin @(negedge clk); n++; end
    chk("gcd example", n == 6 && ge_x == 2 && ge_y == 3 && ge_z == 5 && ge_s == 11);
    n_ge++;
    // state machine
    fsm_start = 1; @(negedge clk); fsm_start = 0; n = 1;
    while (!fsm_done && n < 100) begin @(negedge clk); n++; end
    chk("gcd_times2 state machine", fsm_result == 2);
    if (fsm_done) n_fsm++;
  endtask

  initial begin
    int cycles;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    run_examples();
    // let the machine finish
    cycles = 0;
    while (!led_green && cycles < 5000000) begin @(negedge clk); cycles++; end
    vm_done = 1;
    repeat (2) @(negedge clk); #1;
    $display("gc=%0d gcd=%0d length=%0d input=%0d raise=%0d restart=%0d appterm=%0d suspend=%0d",
             n_gc, n_gcd, n_len, n_in, n_raise, n_restart, n_appterm, n_suspend);
    $display("red=%0d green=%0d blue=%0d exec_rdy=%0d par_gcd=%0d fsm=%0d fa=%0d sums=%0d ge=%0d",
             n_red, n_green, n_blue, n_exec, n_par, n_fsm, n_fa, n_sum, n_ge);
    chk("program finished with 42", led_green && led_blue && vm_result == val_long(42));
    chk("no machine error", vm_error == ERR_NONE);
    chk("LEDs off under button1", led_bad == 0);
    chk("pc frozen under button1", freeze_bad == 0);
    chk("button2 seen by the program", dut.u_main.u_vm.u_ram.mem[1 + 9] == val_long(1));
    chk("mechanism gc",       n_gc > 0);
    chk("mechanism c_gcd",    n_gcd > 0);
    chk("mechanism c_length", n_len > 0);
    chk("mechanism c_input",  n_in > 0);
    chk("mechanism raise",    n_raise > 0);
    chk("mechanism restart",  n_restart > 0);
    chk("mechanism appterm",  n_appterm > 0);
    chk("mechanism suspend",  n_suspend > 0);
    chk("mechanism led_red",  n_red > 0);
    chk("mechanism led_green", n_green > 0);
    chk("mechanism led_blue", n_blue > 0);
    chk("mechanism exec_rdy", n_exec == 2);
    chk("mechanism par_gcd",  n_par > 0);
    chk("mechanism fsm_done", n_fsm > 0);
    chk("mechanism fa",       n_fa == 8);
    chk("mechanism sums",     n_sum == 7);
    chk("mechanism gcd_example", n_ge == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
