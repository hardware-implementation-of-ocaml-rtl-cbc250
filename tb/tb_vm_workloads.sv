// tb_vm_workloads: runs a workload program on the virtual machine at its
// default memory sizes and checks what it computes:
//   - map2 of the gcd external function over [18;2;5;1] and [12;2;10;8]
//     gives [6;2;5;1] (global 3), filtering out the 1s gives [6;2;5]
//     (global 4), and the length external function returns 3 (global 5);
//   - Takeuchi's function tak 18 12 6 = 7 (global 6 and the final accu),
//     a deep general recursion of 63609 calls;
//   - gcd 2000 7 = 1 computed by a tail-recursive bytecode function
//     (global 8) and by the gcd external function (global 9). The ticks of
//     both are measured (from the end of the preceding SETGLOBAL to the end
//     of the SETGLOBAL that stores the result) and the hardware function
//     must be faster;
//   - Apply: h = compose succ (compose double pred) built by partial
//     application, iter h 20 2 = 2^20 + 1 (global 16);
//   - BST: inserting 1..200 in increasing order gives a tree whose right
//     spine holds 1..200 with empty left subtrees (global 20, walked in
//     memory); searching 200 finds it and 1000 does not (globals 21, 22).
//     The insertions allocate about 80,000 words, so the collector must run;
//   - Share: the list 1..100 (global 23) is filtered by a function that
//     raises an exception when it removes nothing, so the unchanged tail is
//     returned instead of copied. Removing 50 gives a list whose cells after
//     49 are the original cells (global 26); removing 1000 gives back the
//     original list itself (global 27). The exception value and the element
//     to remove (global 25) are own choices;
//   - Queens: the number of solutions of the 8 queens problem, 92 (global
//     28), by a list-based search; a software model gives the same count;
//   - gcd 2000 7 called 16 times by a bytecode loop that adds the results
//     (global 35) and once through the 16-way parallel gcd external function
//     (global 36): both give 16, and the parallel function must be more than
//     1000 times faster, the figure given for this comparison.
// The lists are checked by walking them in the value memory. The testbench
// also reports ticks, instructions and calls, and checks the number of
// calls to tak against a software count.
module tb_vm_workloads;
  import vm_pkg::*;
  logic clk = 0, rst = 1, en = 1, in_bit = 0;
  logic stop, busy;
  value_t result;
  vm_err_e error;
  int checks = 0, failures = 0;
  longint cycles = 0, n_instr = 0, n_tak = 0;
  longint t_set [64];
  int n_gc = 0;
  ocaml_vm #(.CODE_FILE("tb/vm_prog_bench.hex")) dut (
    .clk, .rst, .en, .in_bit, .stop, .busy, .result, .error);
  always #5 clk = ~clk;

  function automatic void chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // software model of the number of calls of tak
  function automatic int tak_calls(input int x, input int y, input int z, output int r);
    int a, b, c, n;
    if (!(y < x)) begin r = z; return 1; end
    n = 1;
    n += tak_calls(x - 1, y, z, a);
    n += tak_calls(y - 1, z, x, b);
    n += tak_calls(z - 1, x, y, c);
    n += tak_calls(a, b, c, r) - 1;   // the tail call reuses the frame but is a call
    return n + 1;
  endfunction

  // compare an OCaml list in memory with an expected sequence
  function automatic logic list_is(input value_t l, input int exp [], input string name);
    value_t cur = l;
    for (int k = 0; k < exp.size(); k++) begin
      if (cur.is_int) begin $display("%s: too short at %0d", name, k); return 0; end
      if (dut.u_ram.mem[int'(cur.n)] != val_long(long_t'(exp[k]))) begin
        $display("%s: element %0d = %0d", name, k, dut.u_ram.mem[int'(cur.n)].n); return 0;
      end
      cur = dut.u_ram.mem[int'(cur.n) + 1];
    end
    return cur == val_long(0);
  endfunction

  // the tree: Node = (left, key, right), Leaf = 0
  function automatic logic bst_ok(input value_t t);
    value_t cur = t;
    for (int k = 1; k <= 200; k++) begin
      if (cur.is_int) return 0;
      if (dut.u_ram.mem[int'(cur.n)] != val_long(0) ||
          dut.u_ram.mem[int'(cur.n) + 1] != val_long(long_t'(k))) return 0;
      cur = dut.u_ram.mem[int'(cur.n) + 2];
    end
    return cur == val_long(0);
  endfunction

  // tak is entered at its GRAB (code address 590, after RESTART at 589)
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.gc_start) n_gc++;
    if (dut.instr_done) begin
      n_instr++;
      if (opcode_e'(dut.u_interp.r.op) == GRAB && dut.u_interp.r.ipc == 16'd590) n_tak++;
      if (opcode_e'(dut.u_interp.r.op) == SETGLOBAL) t_set[dut.u_interp.r.a1] = cycles;
    end
  end

  // software model of the queens count: columns of the queens placed so far
  function automatic int queens_model(input int n, input int k, input int qs []);
    int total = 0;
    if (k == 0) return 1;
    for (int q = 1; q <= n; q++) begin
      logic ok = 1;
      foreach (qs[i]) if (qs[i] == q || qs[i] == q + i + 1 || qs[i] == q - i - 1) ok = 0;
      if (ok) total += queens_model(n, k - 1, {q, qs});
    end
    return total;
  endfunction

  // walk n tail links of a list in memory
  function automatic value_t drop_n(input value_t l, input int n);
    value_t cur = l;
    for (int k = 0; k < n && !cur.is_int; k++) cur = dut.u_ram.mem[int'(cur.n) + 1];
    return cur;
  endfunction

  initial begin
    int tr, calls;
    int exp_all [], exp_no50 [];
    exp_all = new [100]; exp_no50 = new [99];
    for (int k = 0; k < 100; k++) exp_all[k] = k + 1;
    for (int k = 0; k < 99; k++) exp_no50[k] = k < 49 ? k + 1 : k + 2;
    calls = tak_calls(18, 12, 6, tr);
    repeat (2) @(posedge clk); rst <= 0;
    wait (stop);
    @(posedge clk);
    $display("ticks=%0d instructions=%0d tak calls=%0d (model %0d) ticks/instr=%0.2f",
             cycles, n_instr, n_tak, calls, real'(cycles) / real'(n_instr));
    chk("no error", error == ERR_NONE);
    chk("map2 gcd_ext = [6;2;5;1]", list_is(dut.u_ram.mem[1 + 3], '{6, 2, 5, 1}, "map2"));
    chk("filter (<> 1) = [6;2;5]", list_is(dut.u_ram.mem[1 + 4], '{6, 2, 5}, "filter"));
    chk("length = 3", dut.u_ram.mem[1 + 5] == val_long(3));
    chk("tak 18 12 6 = 7", dut.u_ram.mem[1 + 6] == val_long(long_t'(tr)) && tr == 7);
    chk("final accu = 7", result == val_long(7));
    chk("tak call count", n_tak == calls);
    $display("gcd 2000 7: bytecode %0d ticks, external function %0d ticks, ratio %0.1f",
             t_set[8] - t_set[6], t_set[9] - t_set[8], real'(t_set[8] - t_set[6]) / real'(t_set[9] - t_set[8]));
    chk("bytecode gcd = 1", dut.u_ram.mem[1 + 8] == val_long(1));
    chk("external gcd = 1", dut.u_ram.mem[1 + 9] == val_long(1));
    chk("apply: iter h 20 2 = 1048577", dut.u_ram.mem[1 + 16] == val_long(1048577));
    chk("bst: right spine 1..200", bst_ok(dut.u_ram.mem[1 + 20]));
    chk("bst: mem 200 = true", dut.u_ram.mem[1 + 21] == val_long(1));
    chk("bst: mem 1000 = false", dut.u_ram.mem[1 + 22] == val_long(0));
    $display("collections=%0d, bst ticks=%0d", n_gc, t_set[22] - t_set[16]);
    chk("share: input list 1..100", list_is(dut.u_ram.mem[1 + 23], exp_all, "share in"));
    chk("share: without 50", list_is(dut.u_ram.mem[1 + 26], exp_no50, "share out"));
    chk("share: tail after 50 is shared",
        drop_n(dut.u_ram.mem[1 + 26], 49) == drop_n(dut.u_ram.mem[1 + 23], 50) &&
        drop_n(dut.u_ram.mem[1 + 26], 48) != drop_n(dut.u_ram.mem[1 + 23], 48));
    chk("share: nothing removed gives the same list", dut.u_ram.mem[1 + 27] == dut.u_ram.mem[1 + 23]);
    $display("share ticks=%0d", t_set[27] - t_set[22]);
    $display("queens 8: %0d solutions (model %0d), ticks=%0d, collections so far=%0d",
             dut.u_ram.mem[1 + 28].n, queens_model(8, 8, '{}), t_set[28] - t_set[27], n_gc);
    $display("gcd 2000 7 called 16 times: bytecode %0d ticks, 16-way parallel external function %0d ticks, ratio %0.1f",
             t_set[35] - t_set[34], t_set[36] - t_set[35], real'(t_set[35] - t_set[34]) / real'(t_set[36] - t_set[35]));
    chk("16 x gcd in bytecode = 16", dut.u_ram.mem[1 + 35] == val_long(16));
    chk("16-way parallel gcd = 16", dut.u_ram.mem[1 + 36] == val_long(16));
    chk("parallel gcd over 1000 times faster", (t_set[36] - t_set[35]) * 1000 < (t_set[35] - t_set[34]));
    chk("queens 8 = 92", dut.u_ram.mem[1 + 28] == val_long(92) && queens_model(8, 8, '{}) == 92);
    chk("collector ran", n_gc > 0);
    chk("external gcd faster", (t_set[9] - t_set[8]) * 10 < (t_set[8] - t_set[6]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
