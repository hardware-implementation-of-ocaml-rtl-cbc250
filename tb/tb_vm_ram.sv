// tb_vm_ram: random single-port traffic against a software array. A read
// issued in tick t must show its word on rdata in tick t+1 and keep it until
// the next read; writes land in the tick they are issued; with en low the
// memory ignores requests and rdata holds.
module tb_vm_ram;
  import vm_pkg::*;
  localparam int N = 256;
  logic clk = 0, en = 1;
  ram_req_t req;
  value_t rdata, model [N], expect_q;
  logic have = 0;
  int checks = 0, failures = 0;
  vm_ram #(.RAM_SIZE(N)) dut (.clk, .en, .req, .rdata);
  always #5 clk = ~clk;
  initial begin
    for (int k = 0; k < N; k++) model[k] = VAL_UNIT;
    req = '0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      // check the result of the previous read
      if (have) begin
        checks++;
        if (rdata != expect_q) begin failures++; $display("FAIL t%0d rdata=%h expected %h", t, rdata, expect_q); end
      end
      en = ($urandom_range(0, 9) != 0);
      req.en = 1'($urandom); req.we = 1'($urandom);
      req.addr = 16'($urandom_range(0, N - 1));
      req.wdata = value_t'($urandom);
      @(posedge clk); #1;
      if (en && req.en) begin
        if (req.we) model[req.addr] = req.wdata;
        else begin expect_q = model[req.addr]; have = 1; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
