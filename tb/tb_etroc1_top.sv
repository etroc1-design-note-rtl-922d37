// tb_etroc1_top: end-to-end test of the whole chip model at its default
// sizes (16 pixels, 256-word buffers, 30-bit words): the pixel array, the
// standalone pixel and the TDC test block, each with its own clocks, I2C bus
// and serial receiver. Time is scaled: 1.28 GHz has a period of 2 units,
// 40 MHz of 64. The three parts run concurrently:
//  - array: test-pattern mode with per-pixel tags, then two simple-readout
//    frames, ROI 16'h9201 (1026 words, L1ACC_ID 4 after BC0) and the
//    largest one, ROI 16'hFFFF (4098 words, every pixel in readout order),
//    then the diagnostic readout of a random pixel;
//  - standalone pixel: TDC words and readout test words on its serial line;
//  - TDC test block: monitor status readback and its serial data.
// Each mechanism (configuration, BC0 / L1ACC_ID, frame, pixel order,
// diagnostic readout, standalone data, monitor readback, TDC test data) is
// counted and must have happened.
module tb_etroc1_top;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, e40 = 0, e320 = 0, rst_n = 1, bc0 = 0, l1acc = 0;
  logic scl_a, sda_a, oe_a, scl_b, sda_b, oe_b, scl_s, sda_s, oe_s, scl_t, sda_t, oe_t;
  word_t tdc_a [NPIX];
  word_t tdc_s, tdc_t;
  tdc_mon_t mon;
  logic dout_a, dout_s, dout_t;
  logic unused_clkto_a, unused_discri, unused_tc_a, unused_ts_a, unused_clkto_s, unused_tc_s,
        unused_ts_s, unused_dout_s, unused_c40_t, unused_tc_t, unused_ts_t;
  logic [255:0] cfg_a, cfg_b, cfg_s, cfg_t;

  etroc1_top dut (
    .clk1g28_a(clk), .clk40_a(e40), .clk320_a(e320), .rstn_a(rst_n), .bc0_a(bc0), .l1acc_a(l1acc),
    .a0_a(1'b0), .a1_a(1'b1), .scl_a_a(scl_a), .sda_a_a_in(sda_a), .sda_a_a_oe(oe_a),
    .a0_b_a(1'b1), .a1_b_a(1'b0), .scl_b_a(scl_b), .sda_b_a_in(sda_b), .sda_b_a_oe(oe_b),
    .tdc_data_a(tdc_a), .discri_a('0), .dll_late_a(1'b0), .dout_a(dout_a), .clkto_a(unused_clkto_a),
    .discri_out_a(unused_discri), .tdc_clk40_a(unused_tc_a), .tdc_strobe_a(unused_ts_a),
    .cfg_a_a(cfg_a), .cfg_b_a(cfg_b),
    .clk1g28_s(clk), .clk40_s(e40), .clk320_s(e320), .rstn_s(rst_n), .scl_s(scl_s),
    .sda_s_in(sda_s), .sda_s_oe(oe_s), .tdc_data_s(tdc_s), .dll_late_s(1'b0), .discri_s(1'b1), .discri_out_s(unused_dout_s), .dout_s(dout_s),
    .clkto_s(unused_clkto_s), .tdc_clk40_s(unused_tc_s), .tdc_strobe_s(unused_ts_s), .cfg_s(cfg_s),
    .clk1g28_t(clk), .clk40_t(e40), .clk320_t(e320), .rstn_t(rst_n), .a0_t(1'b0), .scl_t(scl_t),
    .sda_t_in(sda_t), .sda_t_oe(oe_t), .tdc_data_t(tdc_t), .tdc_mon_t_in(mon), .dout_t(dout_t),
    .clk40_out_t(unused_c40_t), .tdc_clk40_t(unused_tc_t), .tdc_strobe_t(unused_ts_t), .cfg_t(cfg_t));

  i2c_master_bfm #(.HP(640)) ma (.scl(scl_a), .sda(sda_a), .slave_oe(oe_a));
  i2c_master_bfm #(.HP(640)) mb (.scl(scl_b), .sda(sda_b), .slave_oe(oe_b));
  i2c_master_bfm #(.HP(640)) ms (.scl(scl_s), .sda(sda_s), .slave_oe(oe_s));
  i2c_master_bfm #(.HP(640)) mt (.scl(scl_t), .sda(sda_t), .slave_oe(oe_t));

  logic clr_a = 0, lk_a, wv_a, dv_a, lk_s, wv_s, dv_s, lk_t, wv_t, dv_t;
  logic [31:0] w_a, w_s, w_t;
  logic [29:0] d_a, d_s, d_t;
  int bh_a, bh_s, bh_t;
  ser_rx rxa (.clk_bit(clk), .din(dout_a), .clear(clr_a), .locked(lk_a), .wvalid(wv_a),
              .word(w_a), .descr(d_a), .dvalid(dv_a), .bad_hdr(bh_a));
  ser_rx rxs (.clk_bit(clk), .din(dout_s), .clear(1'b0), .locked(lk_s), .wvalid(wv_s),
              .word(w_s), .descr(d_s), .dvalid(dv_s), .bad_hdr(bh_s));
  ser_rx rxt (.clk_bit(clk), .din(dout_t), .clear(1'b0), .locked(lk_t), .wvalid(wv_t),
              .word(w_t), .descr(d_t), .dvalid(dv_t), .bad_hdr(bh_t));

  always #1 clk = ~clk;
  int t = 0;
  always begin
    #1 t++;
    e320 = ((t + 5) % 8) < 4;
    e40  = ((t + 5) % 64) < 32;
  end

  int tcount = 0;
  always @(posedge dut.u_array.clk40) begin
    tcount <= tcount + 1;
    for (int p = 0; p < NPIX; p++) tdc_a[p] <= {4'(p), 26'(tcount)};
    tdc_s <= {4'h5, 26'(tcount)};
    tdc_t <= {4'h7, 26'(tcount)};
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #60000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  word_t qa [$], qs [$], qt [$];
  logic ca = 0, cs = 0, ct = 0;
  always @(posedge clk) begin
    if (wv_a && dv_a && ca) qa.push_back(d_a);
    if (wv_s && dv_s && cs) qs.push_back(d_s);
    if (wv_t && dv_t && ct) qt.push_back(d_t);
  end

  int n_cfg = 0, n_bc0 = 0, n_frame = 0, n_order = 0, n_dmro = 0, n_sa = 0, n_mon = 0, n_tt = 0;

  task automatic wa(input logic [7:0] a, input logic [7:0] v);
    logic k;
    ma.write_reg(7'b0000010, a, v, k);
    chk(k, $sformatf("slave A write %h", a));
  endtask

  task automatic wb(input logic [7:0] a, input logic [7:0] v);
    logic k;
    mb.write_reg(7'b1111101, a, v, k);
    chk(k, $sformatf("slave B write %h", a));
  endtask

  // Read one simple-readout frame for the given ROI and check it completely.
  task automatic frame(input logic [15:0] roi, input int lead);
    int s, e, npix;
    logic [3:0] order [$];
    for (int k = 0; k < 16; k++) if (roi[sro_order(4'(k))]) order.push_back(sro_order(4'(k)));
    npix = order.size();
    wa(8'h1E, roi[7:0]);
    wa(8'h1F, roi[15:8]);
    repeat (300) @(posedge dut.u_array.clk40);
    qa.delete(); ca = 1;
    @(negedge dut.u_array.clk40) bc0 = 1;
    @(negedge dut.u_array.clk40) bc0 = 0;
    repeat (lead - 1) @(negedge dut.u_array.clk40);
    l1acc = 1;
    @(negedge dut.u_array.clk40) l1acc = 0;
    repeat (256 * npix + 80) @(posedge dut.u_array.clk40);
    ca = 0;
    s = -1; e = -1;
    for (int i = 0; i < qa.size(); i++) begin
      if (s < 0 && qa[i][29:12] == 18'h25555) s = i;
      if (s >= 0 && e < 0 && qa[i] == 30'h2EADBEFF) e = i;
    end
    chk(s >= 0 && e > s, $sformatf("ROI %h: frame found", roi));
    if (s >= 0 && e > s) begin
      chk(qa[s][11:0] == 12'(lead - 1), $sformatf("ROI %h: L1ACC_ID %0d, expected %0d", roi, qa[s][11:0], lead - 1));
      n_bc0++;
      chk(e - s + 1 == 256 * npix + 2, $sformatf("ROI %h: %0d words, expected %0d", roi, e - s + 1, 256 * npix + 2));
      for (int q = 0; q < npix; q++)
        for (int w = 0; w < 256; w++) begin
          word_t x = qa[s + 1 + 256*q + w];
          chk(x[29:16] == {10'b1010101010, order[q]}, $sformatf("ROI %h word %0d: %h", roi, 256*q + w, x));
          if (w > 0) chk(x[15:0] == qa[s + 256*q + w][15:0] + 16'd1, "buffer counter consecutive");
        end
      n_frame++;
      if (npix > 1) n_order++;
    end
  endtask

  logic [7:0] d [64];
  logic ack;

  initial begin
    for (int p = 0; p < NPIX; p++) tdc_a[p] = '0;
    tdc_s = '0; tdc_t = '0; mon = '0;
    #3 rst_n = 0;
    #40 rst_n = 1;
    repeat (100) @(posedge dut.u_array.clk40);
    fork
      begin : array_part
        logic [159:0] vth;
        wb(8'h00, 8'h1E);
        for (int p = 0; p < NPIX; p++) vth[10*p +: 10] = 10'h200 | 10'(p);
        for (int i = 0; i < 20; i++) d[i] = vth[8*i +: 8];
        ma.write_bytes(7'b0000010, 8'h0A, d, 20, ack);
        chk(ack, "VTHIn burst");
        wa(8'h07, 8'h41);
        chk(cfg_a[8*'h0A +: 160] == vth && cfg_b[7:0] == 8'h1E, "array configured");
        n_cfg++;
        wait (lk_a && dv_a);
        frame(16'h9201, 5);
        frame(16'hFFFF, 3 + $urandom_range(0, 20));
        begin
          int p = $urandom_range(0, 15);
          wa(8'h07, {2'b00, 2'(p / 4), 4'b0001 << (p % 4)});   // RO_SEL 0, column, row enable
          repeat (20) @(posedge dut.u_array.clk40);
          qa.delete(); ca = 1;
          repeat (100) @(posedge dut.u_array.clk40);
          ca = 0;
          chk(qa.size() > 90, "diagnostic words");
          foreach (qa[i]) chk(qa[i][29:16] == {10'b1010101010, 4'(p)}, $sformatf("diagnostic word %h from pixel %0d", qa[i], p));
          n_dmro++;
        end
      end
      begin : standalone_part
        logic k;
        wait (lk_s && dv_s);
        cs = 1;
        repeat (100) @(posedge dut.u_array.clk40);
        cs = 0;
        chk(qs.size() > 90, "standalone words");
        for (int i = 1; i < qs.size(); i++)
          chk(qs[i] == qs[i-1] + 30'd1 && qs[i][29:26] == 4'h5, $sformatf("standalone word %h", qs[i]));
        ms.write_reg(7'b1001110, 8'h00, 8'h1E, k);
        chk(k, "standalone write");
        repeat (20) @(posedge dut.u_array.clk40);
        qs.delete(); cs = 1;
        repeat (100) @(posedge dut.u_array.clk40);
        cs = 0;
        for (int i = 1; i < qs.size(); i++)
          chk(qs[i][29:16] == 14'h2AA0 && qs[i][15:0] == qs[i-1][15:0] + 16'd1, $sformatf("standalone test word %h", qs[i]));
        n_sa++;
      end
      begin : tdc_test_part
        tdc_mon_t x;
        logic [7:0] dt [64];
        logic ack_t;
        x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        mon = x;
        mt.read_bytes(7'b0100010, 8'h20, dt, 15, ack_t);
        chk(ack_t, "TDC test block read");
        chk(mt.rd_buf[1] == x.toa_raw[7:0] && mt.rd_buf[10] == x.tot_raw[7:0] && mt.rd_buf[9][7] == x.hit,
            "monitor readback (raw view by default)");
        n_mon++;
        wait (lk_t && dv_t);
        ct = 1;
        repeat (100) @(posedge dut.u_array.clk40);
        ct = 0;
        chk(qt.size() > 90, "TDC test block words");
        for (int i = 1; i < qt.size(); i++)
          chk(qt[i] == qt[i-1] + 30'd1 && qt[i][29:26] == 4'h7, $sformatf("TDC test word %h", qt[i]));
        n_tt++;
      end
    join
    chk(n_cfg > 0 && n_bc0 > 1 && n_frame > 1 && n_order > 0 && n_dmro > 0 && n_sa > 0 && n_mon > 0 && n_tt > 0,
        "every mechanism exercised");
    $display("mechanisms: cfg=%0d bc0=%0d frame=%0d order=%0d dmro=%0d standalone=%0d monitor=%0d tdc_test=%0d",
             n_cfg, n_bc0, n_frame, n_order, n_dmro, n_sa, n_mon, n_tt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
