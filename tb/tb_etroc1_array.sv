// tb_etroc1_array: end-to-end test of the pixel array logic. Time is
// scaled: the 1.28 GHz clock has a period of 2 units, 40 MHz of 64.
// Everything is configured over I2C (slave A at 7'b0000010, slave B at
// 7'b1111101) and every result is read from the serial output dout through
// an independent receiver (header alignment, descrambling). Steps:
//  1. power-up defaults read back from both slaves, dll_late at 0x20;
//  2. test-pattern mode (enableMon), per-pixel tags in VTHIn[3:0], simple
//     readout with ROI 16'h9201, BC0 then L1ACC five clocks later: the frame
//     must be SOF {18'h25555, 12'd4}, 4 x 256 test words of pixels
//     15, 9, 12, 0 (readout order) with consecutive counters ending at the same count for
//     every pixel, and EOF: 1026 words;
//  3. diagnostic readout of pixel 9 (row 1, column 2): its tag and a
//     counter advancing by one per word;
//  4. TDC-data mode: the words the bench feeds to pixel 9 come out in order;
//  5. PRBS7 test mode on the serial line;
//  6. discriminator output select (EN_DiscriOut), valid and invalid codes.
// Each mechanism is counted and must have happened.
module tb_etroc1_array;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, e40 = 0, e320 = 0, rst_n = 1, bc0 = 0, l1acc = 0;
  logic scl_a, sda_a, oe_a, scl_b, sda_b, oe_b;
  word_t tdc [NPIX];
  logic [NPIX-1:0] discri = '0;
  logic dll_late = 1'b1;
  logic dout, clkto, dout_discri, tclk, tstr;
  logic [255:0] cfg_a, cfg_b;
  localparam logic [6:0] DEVA = 7'b0000010, DEVB = 7'b1111101;

  etroc1_array dut (
    .clk1g28(clk), .clk40_ext(e40), .clk320_ext(e320), .rst_n(rst_n), .bc0(bc0), .l1acc(l1acc),
    .a0_a(1'b0), .a1_a(1'b1), .scl_a(scl_a), .sda_a_in(sda_a), .sda_a_oe(oe_a),
    .a0_b(1'b1), .a1_b(1'b0), .scl_b(scl_b), .sda_b_in(sda_b), .sda_b_oe(oe_b),
    .tdc_data(tdc), .discri(discri), .dll_late(dll_late), .dout(dout), .clkto(clkto),
    .discri_out(dout_discri), .tdc_clk40(tclk), .tdc_strobe(tstr), .cfg_a(cfg_a), .cfg_b(cfg_b));

  i2c_master_bfm #(.HP(640)) ma (.scl(scl_a), .sda(sda_a), .slave_oe(oe_a));
  i2c_master_bfm #(.HP(640)) mb (.scl(scl_b), .sda(sda_b), .slave_oe(oe_b));

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
    e320 = ((t + 5) % 8) < 4;
    e40  = ((t + 5) % 64) < 32;
  end

  // TDC words: {pixel, running count}, new every readout clock
  int tcount = 0;
  always @(posedge dut.clk40) begin
    tcount <= tcount + 1;
    for (int p = 0; p < NPIX; p++) tdc[p] <= {4'(p), 26'(tcount)};
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #40000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // collected payloads
  word_t rxq [$];
  logic  collecting = 0;
  always @(posedge clk) if (wvalid && dvalid && collecting) rxq.push_back(descr);

  logic bits [$];
  logic collect_bits = 0;
  always @(negedge clk) if (collect_bits) bits.push_back(dout);

  int n_sro = 0, n_dmro = 0, n_tdc = 0, n_prbs = 0, n_bc0 = 0, n_discri = 0, n_cfg = 0;

  task automatic wr(input logic [6:0] dev, input logic [7:0] a, input logic [7:0] v);
    logic ack;
    if (dev == DEVA) ma.write_reg(dev, a, v, ack); else mb.write_reg(dev, a, v, ack);
    chk(ack, $sformatf("I2C write %h:%h acknowledged", dev, a));
  endtask

  task automatic relock();
    rx_clear = 1;
    repeat (70) @(posedge clk);
    rx_clear = 0;
    wait (locked && dvalid);
  endtask

  logic [7:0] d [64];
  logic ack;
  logic [159:0] vth;

  initial begin
    for (int p = 0; p < NPIX; p++) tdc[p] = '0;
    #3 rst_n = 0;
    #37 rst_n = 1;
    repeat (100) @(posedge dut.clk40);
    // 1. defaults
    ma.read_bytes(DEVA, 8'h00, d, 33, ack);
    d = ma.rd_buf;
    chk(ack, "slave A read");
    for (int i = 0; i < 32; i++) chk(d[i] == REGA_DEFAULT[8*i +: 8], $sformatf("REG_A_%h default %h", 8'(i), d[i]));
    chk(d[32][0] == 1'b1, "dll_late readable at REG_A_20");
    mb.read_bytes(DEVB, 8'h00, d, 12, ack);
    d = mb.rd_buf;
    chk(ack, "slave B read");
    for (int i = 0; i < 12; i++) chk(d[i] == REGB_DEFAULT[8*i +: 8], $sformatf("REG_B_%h default", i));
    n_cfg++;
    // 2. test pattern, tags, SRO
    wr(DEVB, 8'h00, 8'h1E);                      // enableMon = 1
    for (int p = 0; p < NPIX; p++) vth[10*p +: 10] = 10'h200 | 10'(p);
    for (int i = 0; i < 20; i++) d[i] = vth[8*i +: 8];
    ma.write_bytes(DEVA, 8'h0A, d, 20, ack);
    chk(ack, "VTHIn burst write");
    wr(DEVA, 8'h1E, 8'h01);
    wr(DEVA, 8'h1F, 8'h92);                      // ROI = 16'h9201
    wr(DEVA, 8'h07, 8'h41);                      // RO_SEL = 1 (SRO)
    chk(cfg_a[8*'h1E +: 16] == 16'h9201 && cfg_a[8*'h0A +: 160] == vth && cfg_b[7:0] == 8'h1E,
        $sformatf("configuration written: roi %h cfg_b0 %h", cfg_a[8*'h1E +: 16], cfg_b[7:0]));
    relock();
    repeat (300) @(posedge dut.clk40);
    rxq.delete(); collecting = 1;
    @(negedge dut.clk40) bc0 = 1;
    @(negedge dut.clk40) bc0 = 0;
    repeat (4) @(negedge dut.clk40);
    l1acc = 1;
    @(negedge dut.clk40) l1acc = 0;
    repeat (1100) @(posedge dut.clk40);
    collecting = 0;
    begin
      int s = -1, e = -1;
      for (int i = 0; i < rxq.size(); i++) begin
        if (s < 0 && rxq[i][29:12] == 18'h25555) s = i;
        if (s >= 0 && e < 0 && rxq[i] == 30'h2EADBEFF) e = i;
      end
      chk(s >= 0 && e > s, "frame with SOF and EOF received");
      if (s >= 0 && e > s) begin
        logic [3:0] order [4] = '{4'd15, 4'd9, 4'd12, 4'd0};
        logic [15:0] last_cnt;
        chk(rxq[s][11:0] == 12'd4, $sformatf("L1ACC_ID %0d, expected 4", rxq[s][11:0]));
        n_bc0++;
        chk(e - s + 1 == 1026, $sformatf("frame length %0d, expected 1026", e - s + 1));
        for (int q = 0; q < 4; q++)
          for (int w = 0; w < 256; w++) begin
            word_t x;
            x = rxq[s + 1 + 256*q + w];
            chk(x[29:20] == 10'b1010101010 && x[19:16] == order[q],
                $sformatf("frame word %0d: %h (pixel %0d)", 256*q + w, x, order[q]));
            if (w > 0) chk(x[15:0] == last_cnt + 16'd1, "consecutive counter in buffer");
            if (w == 255 && q > 0) chk(x[15:0] == rxq[s + 256][15:0], "all buffers end at the same count");
            last_cnt = x[15:0];
          end
        n_sro++;
      end
    end
    // 3. diagnostic readout of pixel 9
    wr(DEVA, 8'h07, 8'h22);                      // RO_SEL=0, DMRO_COL=2, row 1
    repeat (20) @(posedge dut.clk40);
    rxq.delete(); collecting = 1;
    repeat (100) @(posedge dut.clk40);
    collecting = 0;
    chk(rxq.size() > 90, "diagnostic stream words");
    for (int i = 0; i < rxq.size(); i++) begin
      chk(rxq[i][29:16] == {10'b1010101010, 4'd9}, $sformatf("DMRO word %h from pixel 9", rxq[i]));
      if (i > 0) chk(rxq[i][15:0] == rxq[i-1][15:0] + 16'd1, "one word per clock");
    end
    n_dmro++;
    // 4. TDC data mode
    wr(DEVB, 8'h00, 8'h1C);                      // enableMon = 0
    repeat (20) @(posedge dut.clk40);
    rxq.delete(); collecting = 1;
    repeat (100) @(posedge dut.clk40);
    collecting = 0;
    for (int i = 0; i < rxq.size(); i++) begin
      chk(rxq[i][29:26] == 4'd9, "TDC word from pixel 9");
      if (i > 0) chk(rxq[i][25:0] == rxq[i-1][25:0] + 26'd1, "TDC words in order");
    end
    n_tdc++;
    // 5. PRBS7
    wr(DEVB, 8'h06, 8'h49);                      // TestMode_DMRO = 1
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
    // 6. discriminator output select
    wr(DEVA, 8'h04, 8'b0100_0100);               // row 2, column 2 -> pixel 10
    discri = 16'h0400; #10 chk(dout_discri == 1'b1, "DiscriOut of pixel 10");
    discri = 16'hFBFF; #10 chk(dout_discri == 1'b0, "other pixels masked");
    wr(DEVA, 8'h04, 8'b0000_0111);               // invalid column code
    discri = 16'hFFFF; #10 chk(dout_discri == 1'b0, "several columns disable the output");
    n_discri++;
    chk(n_cfg > 0 && n_sro > 0 && n_dmro > 0 && n_tdc > 0 && n_prbs > 0 && n_bc0 > 0 && n_discri > 0,
        "every mechanism exercised");
    $display("mechanisms: cfg=%0d sro=%0d dmro=%0d tdc=%0d prbs=%0d bc0=%0d discri=%0d",
             n_cfg, n_sro, n_dmro, n_tdc, n_prbs, n_bc0, n_discri);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
