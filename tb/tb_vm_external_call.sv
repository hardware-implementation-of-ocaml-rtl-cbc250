// tb_vm_external_call: calls each external function through the dispatcher:
// gcd and the 16-way parallel gcd on random integers, length on a list in memory, the input bit in both
// states, and an unknown primitive number, which must return unit in one
// tick. Results are compared with software models; busy must be high from
// the tick after start until done.
module tb_vm_external_call;
  import vm_pkg::*;
  logic clk = 0, rst = 1, en = 1, start = 0, in_bit = 0, busy, done;
  logic [7:0] prim = 0;
  value_t args [N_EXT_ARGS];
  value_t result, rdata;
  ram_req_t req;
  int checks = 0, failures = 0;
  vm_external_call dut (.clk, .rst, .en, .start, .prim, .args, .in_bit, .busy, .done,
                        .result, .req, .rdata);
  vm_ram #(.RAM_SIZE(1024)) ram (.clk, .en(en && !rst), .req, .rdata);
  always #5 clk = ~clk;

  task automatic call(input int p, input value_t a0, input value_t a1, input value_t expected,
                      input string what);
    int n;
    @(negedge clk); start = 1; prim = 8'(p); args[0] = a0; args[1] = a1;
    @(negedge clk); start = 0; prim = 8'hee; args[0] = VAL_UNIT; args[1] = VAL_UNIT; n = 1;
    while (!done && n < 5000) begin
      checks++; if (!busy) begin failures++; $display("FAIL %s: busy low while waiting", what); end
      @(negedge clk); n++;
    end
    checks++;
    if (!done || result != expected) begin
      failures++; $display("FAIL %s: result %0d (int %0b)", what, result.n, result.is_int);
    end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL %s: busy after done", what); end
  endtask

  initial begin
    int x, y;
    value_t head;
    for (int k = 0; k < N_EXT_ARGS; k++) args[k] = VAL_UNIT;
    @(posedge clk); rst <= 0;
    for (int k = 0; k < 20; k++) begin
      x = $urandom_range(1, 400); y = $urandom_range(1, 400);
      begin int p, q; p = x; q = y; while (p != q) if (p < q) q -= p; else p -= q;
        call(PRIM_GCD, val_long(long_t'(x)), val_long(long_t'(y)), val_long(long_t'(p)), "gcd"); end
    end
    for (int k = 0; k < 5; k++) begin
      x = $urandom_range(1, 400); y = $urandom_range(1, 400);
      begin int p, q; p = x; q = y; while (p != q) if (p < q) q -= p; else p -= q;
        call(PRIM_GCD16, val_long(long_t'(x)), val_long(long_t'(y)), val_long(long_t'(16 * p)), "gcd16"); end
    end
    head = val_long(0);
    for (int k = 0; k < 9; k++) begin
      ram.mem[100 + 3 * k] = mk_header(2, 8'd0, HDR_WHITE);
      ram.mem[101 + 3 * k] = val_long(long_t'(k));
      ram.mem[102 + 3 * k] = head;
      head = val_ptr(101 + 3 * k);
    end
    call(PRIM_LENGTH, head, VAL_UNIT, val_long(9), "length 9");
    call(PRIM_LENGTH, val_long(0), VAL_UNIT, val_long(0), "length []");
    in_bit = 1; call(PRIM_INPUT, VAL_UNIT, VAL_UNIT, val_long(1), "input 1");
    in_bit = 0; call(PRIM_INPUT, VAL_UNIT, VAL_UNIT, val_long(0), "input 0");
    call(77, val_long(3), VAL_UNIT, VAL_UNIT, "unknown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
