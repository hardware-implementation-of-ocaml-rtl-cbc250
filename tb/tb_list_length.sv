// tb_list_length: builds OCaml lists of random length (cons cells of size 2,
// tag 0, scattered in a memory) and checks the length returned and the
// latency of two ticks per element plus one for the final test of the empty
// list. The empty list itself must answer 0 one tick after start.
module tb_list_length;
  import vm_pkg::*;
  logic clk = 0, rst = 1, en = 1, start = 0, done;
  value_t lst, rdata;
  long_t len;
  ram_req_t req;
  int checks = 0, failures = 0;
  list_length dut (.clk, .rst, .en, .start, .lst, .done, .len, .req, .rdata);
  vm_ram #(.RAM_SIZE(1024)) ram (.clk, .en(en && !rst), .req, .rdata);
  always #5 clk = ~clk;
  initial begin
    int n, ticks, addr;
    value_t head;
    lst = VAL_UNIT;
    @(posedge clk); rst <= 0;
    for (int rep = 0; rep < 30; rep++) begin
      n = (rep == 0) ? 0 : (rep == 1) ? 1 : $urandom_range(0, 100);
      head = val_long(0);
      // cells of list element k at 3*k+4 (header), 3*k+5 (head), 3*k+6 (tail);
      // built back to front, with payload values that look like pointers
      for (int k = n - 1; k >= 0; k--) begin
        addr = 3 * k + 5 + 16 * (rep % 3);
        ram.mem[addr - 1] = mk_header(2, 8'd0, HDR_WHITE);
        ram.mem[addr]     = val_ptr($urandom_range(0, 1000));
        ram.mem[addr + 1] = head;
        head = val_ptr(addr);
      end
      @(negedge clk); start = 1; lst = head;
      @(negedge clk); start = 0; lst = VAL_UNIT; ticks = 1;
      if (rep == 5) begin en = 0; repeat (7) @(negedge clk); en = 1; end
      while (!done && ticks < 1000) begin @(negedge clk); ticks++; end
      checks++;
      if (len != long_t'(n) || ticks != 2 * n + 1) begin
        failures++; $display("FAIL n=%0d len=%0d ticks=%0d", n, len, ticks);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
