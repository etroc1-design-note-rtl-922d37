// tb_pixel_digital: writes the pixel's TDC words into its hit buffer with
// we=1 and an advancing address, reads them back through the SRO output
// (oe_sro), checks the one-clock DMRO output buffer and its enable, and
// that test_ro swaps in the test pattern.
module tb_pixel_digital;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  word_t tdc, sro, dmro, prev;
  logic test_ro, we, oe_sro, en_dmro;
  logic [3:0] cfg;
  logic [7:0] addr;
  word_t hist [256];

  pixel_digital dut (.clk(clk), .rst_n(rst_n), .tdc_data(tdc), .test_ro(test_ro), .cfg_ro(cfg),
                     .we(we), .addr(addr), .oe_sro(oe_sro), .en_dmro(en_dmro),
                     .sro_dout(sro), .dmro_dout(dmro));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    test_ro = 0; we = 1; oe_sro = 0; en_dmro = 1; cfg = 4'h5; addr = 0; tdc = 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      tdc = 30'($urandom);
      addr = 8'(i);
      hist[addr] = tdc;
      prev = tdc;
      @(negedge clk);
      chk(dmro == prev, "DMRO buffer holds last clock's word");
    end
    en_dmro = 0;
    #1 chk(dmro == '0, "DMRO output disabled");
    we = 0; oe_sro = 1;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      tdc = 30'($urandom);   // must not be written
      @(negedge clk);
      chk(sro == hist[a], $sformatf("SRO read %0d", a));
    end
    oe_sro = 0;
    #1 chk(sro == '0, "SRO output disabled");
    test_ro = 1; en_dmro = 1;
    @(negedge clk);
    chk(dmro[29:16] == {10'b1010101010, 4'h5}, "test pattern reaches DMRO buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
