// tb_vm_code_rom: loads an eight-word test image and checks every word, the
// one-tick read latency, that addresses beyond the image read STOP (144),
// and that rdata holds while en is low. A second instance at the default
// size loads the default program and must not start with STOP.
module tb_vm_code_rom;
  logic clk = 0, en = 1;
  logic [6:0] addr = 0;
  logic [11:0] addr_d = 0;
  logic [31:0] rdata, rdata_d;
  int checks = 0, failures = 0;
  logic [31:0] img [8] = '{32'h0000000a, 32'h00000013, 32'hdeadbeef, 32'h00000001,
                           32'h12345678, 32'h00000090, 32'h0000ffff, 32'h80000000};
  vm_code_rom #(.CODE_SIZE(128), .CODE_FILE("tb/tb_code_rom_test.hex")) dut
    (.clk, .en, .addr, .rdata);
  vm_code_rom dut_default (.clk, .en(1'b1), .addr(addr_d), .rdata(rdata_d));
  always #5 clk = ~clk;
  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); addr = 7'(a);
      @(negedge clk);
      chk($sformatf("word %0d = %h", a, rdata), rdata == ((a < 8) ? img[a] : 32'd144));
    end
    @(negedge clk); addr = 2; @(negedge clk);
    en = 0; addr = 4; @(negedge clk); @(negedge clk);
    chk("hold while en low", rdata == img[2]);
    en = 1; @(negedge clk);
    chk("read after en", rdata == img[4]);
    addr_d = 0; @(negedge clk);
    chk("default program present", rdata_d != 32'd144);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
