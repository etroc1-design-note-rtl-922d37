// tb_i2c_slave: the slave with slave-A power-up defaults at address
// 7'b0000011 (A1=A0=1), clocked at 40 MHz-equivalent, driven by the
// behavioural master (SCL half period 16 clocks). Checks:
//  - all 32 configuration bytes read back their defaults after reset;
//  - a burst write of random bytes to 0x00..0x1F shows up on cfg and
//    reads back, also in single-byte reads;
//  - status bytes 0x20..0x2F read the stat input; 0x30 reads chip ID/rev;
//  - a write to 0x25 (read-only) changes nothing;
//  - another device address is not acknowledged and changes nothing;
//  - with one of the three register copies forced to a wrong value, cfg
//    and the read-back still show the written value (majority vote).
module tb_i2c_slave;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic scl, sda, sda_oe;
  logic [255:0] cfg;
  logic [127:0] stat;
  logic [7:0] d [64];
  logic [7:0] v;
  logic ack;
  logic [255:0] written;
  localparam logic [6:0] DEV = 7'b0000011;

  i2c_slave #(.CFG_DEFAULT(REGA_DEFAULT), .CHIP_ID(4'h5), .CHIP_REV(4'hA)) dut (
    .clk(clk), .rst_n(rst_n), .dev_addr(DEV), .scl(scl), .sda_in(sda), .sda_oe(sda_oe),
    .cfg(cfg), .stat(stat));

  i2c_master_bfm #(.HP(160)) m (.scl(scl), .sda(sda), .slave_oe(sda_oe));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) stat[8*i +: 8] = 8'($urandom);
    #22 rst_n = 1;
    #200;
    chk(cfg == REGA_DEFAULT, "cfg defaults");
    m.read_bytes(DEV, 8'h00, d, 32, ack);
    chk(ack, "read acknowledged");
    for (int i = 0; i < 32; i++) chk(d[i] == REGA_DEFAULT[8*i +: 8], $sformatf("default byte %0d = %h", i, d[i]));
    // burst write
    for (int i = 0; i < 32; i++) begin d[i] = 8'($urandom); written[8*i +: 8] = d[i]; end
    m.write_bytes(DEV, 8'h00, d, 32, ack);
    chk(ack, "write acknowledged");
    chk(cfg == written, "cfg after burst write");
    m.read_bytes(DEV, 8'h00, d, 32, ack);
    for (int i = 0; i < 32; i++) chk(d[i] == written[8*i +: 8], $sformatf("read back byte %0d", i));
    for (int k = 0; k < 5; k++) begin
      int a = $urandom_range(0, 31);
      m.read_reg(DEV, 8'(a), v, ack);
      chk(ack && v == written[8*a +: 8], $sformatf("single read %0d", a));
    end
    // status and ID
    m.read_bytes(DEV, 8'h20, d, 17, ack);
    for (int i = 0; i < 16; i++) chk(d[i] == stat[8*i +: 8], $sformatf("status byte %0d", i));
    chk(d[16] == 8'h5A, "chip ID and revision");
    // read-only write ignored
    m.write_reg(DEV, 8'h25, 8'h00, ack);
    chk(cfg == written, "write to status address ignored");
    // wrong device address
    m.write_reg(7'b1111111, 8'h03, ~written[8*3 +: 8], ack);
    chk(!ack, "other address not acknowledged");
    chk(cfg == written, "other address changes nothing");
    // single-copy upset
    force dut.cfg_b = ~written;
    #100;
    chk(cfg == written, "majority vote hides one upset copy");
    m.read_reg(DEV, 8'h07, v, ack);
    chk(v == written[8*7 +: 8], "read-back with one upset copy");
    release dut.cfg_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
