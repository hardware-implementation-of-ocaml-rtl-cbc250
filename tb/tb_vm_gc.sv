// tb_vm_gc: builds random heaps in a small from-space and checks the copy
// made by the collector. Each heap has up to 14 blocks of 1..4 fields with
// random tags (some no-scan blocks holding words that look like pointers),
// fields that are integers, pointers to other blocks (so sharing and cycles
// occur), or pointers outside the heap. Roots are accu, env, the stack slots
// above sp and the globals. After done the testbench walks the old graph (its
// own copy) and the new one side by side and checks:
//   - every root and field maps to a block in to-space with the same header
//     size and tag and the same integer fields;
//   - sharing is preserved (one old block maps to exactly one new block);
//   - no-scan contents and pointers outside from-space are unchanged;
//   - free_out - to_base equals the words of the reachable blocks, so
//     garbage is not copied;
//   - nothing outside to-space, the roots and from-space headers is written.
// The collector is run alternately in both directions between the spaces.
module tb_vm_gc;
  import vm_pkg::*;
  localparam int SEMI = 100, FROM = 100, TO = 200, STACK_END = 60, SP = 56, NG = 4;
  logic clk = 0, rst = 1, en = 1, start = 0, busy, done;
  logic [15:0] from_base, to_base, sp, free_out;
  value_t accu_in, env_in, accu_out, env_out, rdata;
  ram_req_t req;
  int checks = 0, failures = 0;
  vm_gc #(.SEMI_SIZE(SEMI), .STACK_END(STACK_END), .GLOB_BASE(1), .N_GLOBALS(NG)) dut
    (.clk, .rst, .en, .start, .from_base, .to_base, .sp, .accu_in, .env_in, .busy, .done,
     .accu_out, .env_out, .free_out, .req, .rdata);
  vm_ram #(.RAM_SIZE(512)) ram (.clk, .en(en && !rst), .req, .rdata);
  always #5 clk = ~clk;

  value_t old_mem [512];
  int     newof [512];        // old field-0 address -> new field-0 address
  int     nblk, baddr [14], bsize [14];
  logic   reach [14];
  int     bad_writes;

  // writes outside to-space, root slots and from-space headers/field 0
  always @(posedge clk) if (busy && req.en && req.we) begin
    if (!((req.addr >= to_base && req.addr < to_base + SEMI) ||
          (req.addr >= SP && req.addr < STACK_END) || (req.addr >= 1 && req.addr <= NG) ||
          (req.addr >= from_base && req.addr < from_base + SEMI)))
      bad_writes++;
  end

  function automatic void chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  function automatic value_t rand_value();
    int c = $urandom_range(0, 9);
    if (c < 3) return val_long(long_t'($urandom_range(0, 999)) - 500);
    if (c == 3) return val_ptr(20);                      // outside the heap
    return val_ptr(baddr[$urandom_range(0, nblk - 1)]);
  endfunction

  function automatic int blk_of(int a);
    for (int k = 0; k < nblk; k++) if (baddr[k] == a) return k;
    return -1;
  endfunction

  // compare old value o with new value v, descending into blocks
  function automatic void walk(value_t o, value_t v, string where);
    int k, na;
    if (o.is_int || int'(o.n) < from_base || int'(o.n) >= from_base + SEMI) begin
      chk($sformatf("%s kept", where), v == o);
      return;
    end
    na = int'(v.n);
    chk($sformatf("%s in to-space (%0d)", where, na),
        !v.is_int && na > to_base && na < to_base + SEMI);
    if (newof[int'(o.n)] >= 0) begin
      chk($sformatf("%s sharing", where), newof[int'(o.n)] == na);
      return;
    end
    newof[int'(o.n)] = na;
    k = blk_of(int'(o.n));
    reach[k] = 1;
    chk($sformatf("%s header", where),
        hdr_size(ram.mem[na - 1]) == hdr_size(old_mem[int'(o.n) - 1]) &&
        hdr_tag(ram.mem[na - 1]) == hdr_tag(old_mem[int'(o.n) - 1]) &&
        hdr_colour(ram.mem[na - 1]) == HDR_WHITE);
    for (int f = 0; f < bsize[k]; f++) begin
      if (hdr_tag(old_mem[int'(o.n) - 1]) >= NO_SCAN_TAG)
        chk($sformatf("%s raw field %0d", where, f), ram.mem[na + f] == old_mem[int'(o.n) + f]);
      else
        walk(old_mem[int'(o.n) + f], ram.mem[na + f], $sformatf("%s.%0d", where, f));
    end
  endfunction

  initial begin
    int a, n, words, reach_words;
    value_t roots_old [2 + (STACK_END - SP) + NG];
    @(posedge clk); rst <= 0;
    for (int rep = 0; rep < 40; rep++) begin
      from_base = 16'((rep % 2) ? TO : FROM);
      to_base   = 16'((rep % 2) ? FROM : TO);
      sp = 16'(SP);
      for (int k = 0; k < 512; k++) ram.mem[k] = val_long(long_t'(k));
      // lay out the blocks
      nblk = $urandom_range(1, 14); a = from_base;
      for (int k = 0; k < nblk; k++) begin
        bsize[k] = $urandom_range(1, 4); baddr[k] = a + 1; a += bsize[k] + 1; reach[k] = 0;
      end
      for (int k = 0; k < nblk; k++) begin
        logic [7:0] tag = ($urandom_range(0, 4) == 0) ? 8'd252 : 8'($urandom_range(0, 3));
        ram.mem[baddr[k] - 1] = mk_header(bsize[k], tag, HDR_WHITE);
        for (int f = 0; f < bsize[k]; f++) ram.mem[baddr[k] + f] = rand_value();
      end
      accu_in = rand_value(); env_in = rand_value();
      for (int s = SP; s < STACK_END; s++) ram.mem[s] = rand_value();
      for (int g = 1; g <= NG; g++) ram.mem[g] = rand_value();
      for (int k = 0; k < 512; k++) begin old_mem[k] = ram.mem[k]; newof[k] = -1; end
      bad_writes = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; n = 1;
      if (rep == 3) begin en = 0; repeat (9) @(negedge clk); en = 1; end
      while (!done && n < 20000) begin @(negedge clk); n++; end
      // done is a one-tick pulse; the outputs were sampled in that tick
      chk("done", n < 20000);
      walk(accu_in, accu_out, "accu");
      walk(env_in, env_out, "env");
      for (int s = SP; s < STACK_END; s++) walk(old_mem[s], ram.mem[s], $sformatf("stack%0d", s));
      for (int g = 1; g <= NG; g++) walk(old_mem[g], ram.mem[g], $sformatf("glob%0d", g));
      reach_words = 0;
      for (int k = 0; k < nblk; k++) if (reach[k]) reach_words += bsize[k] + 1;
      chk($sformatf("free %0d = to + %0d", free_out, reach_words), int'(free_out) == int'(to_base) + reach_words);
      chk("no stray writes", bad_writes == 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
