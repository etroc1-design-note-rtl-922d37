// tb_etroc1_standalone: end-to-end test of the standalone pixel. Time is
// scaled: the 1.28 GHz clock has a period of 2 units, 40 MHz of 64.
// The pixel is configured over I2C at 7'b1001110 and its serial output is
// checked with an independent receiver (header alignment, descrambling).
// Steps:
//  1. power-up defaults of registers 0x00..0x0F, dll_late at 0x20 and the
//     identification byte at 0x30 read back;
//  2. TDC data (default configuration): the words fed to the pixel come out
//     scrambled, in order, one per 40 MHz clock;
//  3. readout test mode (register 0x00 bit 1) with a tag in register
//     0x0E[3:0]: {10'b1010101010, tag, counter} with a counter advancing by
//     one per word;
//  4. OE_DMRO (register 0x0F bit 6) cleared: all-zero words;
//  5. scrambler off (register 0x06 bit 1): the raw words appear on the line;
//  6. PRBS7 test mode (register 0x06 bit 4);
//  7. DMRO reset (register 0x06 bit 0) holds the serial output still;
//  8. the discriminator output pad follows discri only while EN_DiscriOut
//     (register 0x0F bit 3) is set.
// Each mechanism is counted and must have happened.
module tb_etroc1_standalone;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, e40 = 0, e320 = 0, rst_n = 1;
  logic scl, sda, sda_oe;
  word_t tdc = '0;
  logic dout, clkto, tclk, tstr, discri = 1'b0, discri_out;
  logic [255:0] cfg;
  localparam logic [6:0] DEV = 7'b1001110;

  etroc1_standalone dut (
    .clk1g28(clk), .clk40_ext(e40), .clk320_ext(e320), .rst_n(rst_n),
    .scl(scl), .sda_in(sda), .sda_oe(sda_oe), .tdc_data(tdc), .dll_late(1'b1),
    .discri(discri), .discri_out(discri_out),
    .dout(dout), .clkto(clkto), .tdc_clk40(tclk), .tdc_strobe(tstr), .cfg(cfg));

  i2c_master_bfm #(.HP(640)) m (.scl(scl), .sda(sda), .slave_oe(sda_oe));

  logic rx_clear = 0, locked, wvalid, dvalid;
  logic [31:0] rword;
  logic [29:0] descr;
  int bad_hdr;
  ser_rx rx (.clk_bit(clk), .din(dout), .clear(rx_clear), .locked(locked), .wvalid(wvalid),
             .word(rword), .descr(descr), .dvalid(dvalid), .bad_hdr(bad_hdr));

  always #1 clk = ~clk;
  int t = 0;
  always begin
    #1 t++;
    e320 = ((t + 3) % 8) < 4;
    e40  = ((t + 3) % 64) < 32;
  end

  // TDC words: {4'hA, running count} with a random offset, new every clock
  int unsigned tbase;
  int tcount = 0;
  always @(posedge dut.clk40) begin
    tcount <= tcount + 1;
    tdc    <= {4'hA, 26'(tbase + tcount)};
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  word_t rxq [$];
  logic [31:0] rawq [$];
  logic collecting = 0;
  always @(posedge clk) if (wvalid && collecting) begin
    rawq.push_back(rword);
    if (dvalid) rxq.push_back(descr);
  end

  logic bits [$];
  logic collect_bits = 0;
  always @(negedge clk) if (collect_bits) bits.push_back(dout);

  int n_cfg = 0, n_tdc = 0, n_test = 0, n_oe = 0, n_noscr = 0, n_prbs = 0, n_rst = 0, n_discri = 0;
  logic [7:0] d [64];
  logic ack;

  task automatic wr(input logic [7:0] a, input logic [7:0] v);
    logic k;
    m.write_reg(DEV, a, v, k);
    chk(k, $sformatf("I2C write %h acknowledged", a));
  endtask

  task automatic relock();
    rx_clear = 1;
    repeat (70) @(posedge clk);
    rx_clear = 0;
    wait (locked && dvalid);
  endtask

  task automatic collect(input int n);
    rxq.delete(); rawq.delete(); collecting = 1;
    repeat (n) @(posedge dut.clk40);
    collecting = 0;
  endtask

  initial begin
    tbase = $urandom;
    #3 rst_n = 0;
    #41 rst_n = 1;
    repeat (100) @(posedge dut.clk40);
    // 1. defaults
    m.read_bytes(DEV, 8'h00, d, 16, ack);
    d = m.rd_buf;
    chk(ack, "read acknowledged");
    for (int i = 0; i < 16; i++)
      chk(d[i] == REGS_DEFAULT[8*i +: 8], $sformatf("register %0h default %h", i, d[i]));
    m.read_bytes(DEV, 8'h20, d, 1, ack);
    chk(m.rd_buf[0] == 8'h01, "dll_late at 0x20");
    m.read_bytes(DEV, 8'h30, d, 1, ack);
    chk(m.rd_buf[0] == 8'h10, "identification byte at 0x30");
    n_cfg++;
    // 2. TDC data
    relock();
    collect(200);
    chk(rxq.size() > 180, $sformatf("%0d TDC words received", rxq.size()));
    for (int i = 0; i < rxq.size(); i++) begin
      chk(rxq[i][29:26] == 4'hA, $sformatf("TDC word %h", rxq[i]));
      if (i > 0) chk(rxq[i][25:0] == rxq[i-1][25:0] + 26'd1, "TDC words in order");
    end
    chk(bad_hdr == 0, "no header errors");
    n_tdc++;
    // 3. test mode with a tag
    begin
      logic [3:0] tag = 4'($urandom);
      wr(8'h0E, {4'h0, tag});
      wr(8'h00, 8'h1E);
      repeat (10) @(posedge dut.clk40);
      collect(200);
      chk(rxq.size() > 180, "test-mode words received");
      for (int i = 0; i < rxq.size(); i++) begin
        chk(rxq[i][29:16] == {10'b1010101010, tag}, $sformatf("test word %h, tag %h", rxq[i], tag));
        if (i > 0) chk(rxq[i][15:0] == rxq[i-1][15:0] + 16'd1, "test counter +1 per word");
      end
      n_test++;
    end
    // 4. OE_DMRO off
    wr(8'h0F, 8'h16);
    repeat (10) @(posedge dut.clk40);
    collect(100);
    chk(rxq.size() > 90, "words with OE_DMRO off");
    foreach (rxq[i]) chk(rxq[i] == '0, $sformatf("OE_DMRO off gives zero words, got %h", rxq[i]));
    n_oe++;
    wr(8'h0F, 8'h56);
    wr(8'h00, 8'h1C);
    // 5. scrambler off
    wr(8'h06, 8'h81);
    repeat (10) @(posedge dut.clk40);
    collect(100);
    chk(rawq.size() > 90, "raw words received");
    for (int i = 0; i < rawq.size(); i++) begin
      chk(rawq[i][31:30] == 2'b10 && rawq[i][29:26] == 4'hA, $sformatf("unscrambled word %h", rawq[i]));
      if (i > 0) chk(rawq[i][25:0] == rawq[i-1][25:0] + 26'd1, "unscrambled words in order");
    end
    n_noscr++;
    // 6. PRBS7
    wr(8'h06, 8'h93);
    repeat (10) @(posedge dut.clk40);
    bits.delete(); collect_bits = 1;
    repeat (1000) @(posedge clk);
    collect_bits = 0;
    begin
      int bad = 0, ones = 0;
      for (int n = 7; n < bits.size(); n++) begin
        if (bits[n] != (bits[n-6] ^ bits[n-7])) bad++;
        ones += bits[n];
      end
      chk(bad == 0 && ones > 300, "PRBS7 on the serial output");
    end
    n_prbs++;
    // 7. DMRO reset
    wr(8'h06, 8'h82);
    repeat (10) @(posedge dut.clk40);
    bits.delete(); collect_bits = 1;
    repeat (500) @(posedge clk);
    collect_bits = 0;
    begin
      int changes = 0;
      for (int n = 1; n < bits.size(); n++) changes += (bits[n] != bits[n-1]);
      chk(changes == 0, $sformatf("serial output still in DMRO reset (%0d changes)", changes));
    end
    n_rst++;
    // 8. discriminator output
    for (int i = 0; i < 8; i++) begin
      discri = 1'($urandom); #5 chk(discri_out == 1'b0, "DiscriOut off by default");
    end
    wr(8'h0F, 8'h5E);
    for (int i = 0; i < 8; i++) begin
      discri = 1'($urandom); #5 chk(discri_out == discri, "DiscriOut follows the discriminator");
    end
    n_discri++;
    chk(n_discri > 0 && n_cfg > 0 && n_tdc > 0 && n_test > 0 && n_oe > 0 && n_noscr > 0 && n_prbs > 0 && n_rst > 0,
        "every mechanism exercised");
    $display("mechanisms: cfg=%0d tdc=%0d test=%0d oe=%0d noscr=%0d prbs=%0d rst=%0d discri=%0d",
             n_cfg, n_tdc, n_test, n_oe, n_noscr, n_prbs, n_rst, n_discri);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
