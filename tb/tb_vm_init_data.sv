// tb_vm_init_data: records the write requests of the data loader and checks
// the header (size N_GLOBALS, tag 0) at DATA_START, the globals in order
// (four from a test file, the rest integer 0), one write per tick, done after
// the last write, and that en low stalls the sequence. A default-size
// instance without a file must write 64 zero globals.
module tb_vm_init_data;
  import vm_pkg::*;
  logic clk = 0, rst = 1, en = 1, start = 0;
  logic busy, done, busy_d, done_d;
  ram_req_t req, req_d;
  int checks = 0, failures = 0;
  value_t mem [32];
  int nwr = 0, nwr_d = 0, zero_d = 0;
  value_t exp_g [6];
  vm_init_data #(.N_GLOBALS(6), .DATA_START(10), .DATA_FILE("tb/tb_init_data_test.hex")) dut
    (.clk, .rst, .en, .start, .busy, .done, .req);
  vm_init_data dut_d (.clk, .rst, .en(1'b1), .start, .busy(busy_d), .done(done_d), .req(req_d));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && en && req.en) begin
    if (req.we && req.addr < 32) mem[req.addr] <= req.wdata;
    nwr <= nwr + 1;
  end
  always @(posedge clk) if (!rst && req_d.en && req_d.we) begin
    nwr_d <= nwr_d + 1;
    if (req_d.addr >= 1 && req_d.wdata == val_long(0)) zero_d <= zero_d + 1;
  end
  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    int n;
    exp_g = '{value_t'(32'h55), value_t'(32'h2), value_t'(32'hfffffffd), value_t'(32'hfa1),
              val_long(0), val_long(0)};
    for (int k = 0; k < 32; k++) mem[k] = value_t'(32'hffffffff);
    @(posedge clk); rst <= 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 1;
    repeat (3) @(negedge clk);
    en = 0; repeat (5) @(negedge clk); en = 1;
    while (!done && n < 100) begin @(negedge clk); n++; end
    chk($sformatf("writes = %0d", nwr), nwr == 7);
    chk("header", mem[10] == mk_header(6, 8'd0, HDR_WHITE));
    for (int k = 0; k < 6; k++) chk($sformatf("global %0d = %h", k, mem[11 + k]), mem[11 + k] == exp_g[k]);
    chk("no stray writes", mem[9] == value_t'(32'hffffffff) && mem[17] == value_t'(32'hffffffff));
    chk("done holds, not busy", done && !busy);
    repeat (60) @(negedge clk);
    chk($sformatf("default instance writes %0d / zeros %0d", nwr_d, zero_d), nwr_d == 65 && zero_d == 64 && done_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
