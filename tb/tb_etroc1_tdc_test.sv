// tb_etroc1_tdc_test: end-to-end test of the TDC test block. Time is
// scaled: the 1.28 GHz clock has a period of 2 units, 40 MHz of 64.
// The block is configured over I2C at {6'b010001, A0} (A0 = 1 here).
// Steps:
//  1. power-up defaults of registers 0x00..0x0C read back; a wrong A0 gets
//     no acknowledge;
//  2. TDC monitor status 0x20..0x2F read back for random monitor values,
//     with register 0x0B bit 0 at 0 (Cal / code view) and at 1 (TOA / TOT
//     raw view), compared with a byte map written out in this bench;
//  3. serial data (Dataout_Sel = 1): the bench's TDC words come out
//     scrambled, in order, one per 40 MHz clock;
//  4. PRBS7 test mode (register 0x04 bit 3);
//  5. Dataout_Sel = 0 routes the strobe to the output: for a random strobe
//     select word in register 0x06 the output shows one pulse per set bit in
//     every 40 MHz period;
//  6. RO_Resetn cleared (register 0x04 bit 6): the serial output stays still.
// Each mechanism is counted and must have happened.
module tb_etroc1_tdc_test;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, e40 = 0, e320 = 0, rst_n = 1;
  logic scl, sda, sda_oe;
  word_t tdc = '0;
  tdc_mon_t mon;
  logic dout, c40o, tclk, tstr;
  logic [255:0] cfg;
  localparam logic [6:0] DEV = 7'b0100011;

  etroc1_tdc_test dut (
    .clk1g28(clk), .clk40_ext(e40), .clk320_ext(e320), .rst_n(rst_n), .a0(1'b1),
    .scl(scl), .sda_in(sda), .sda_oe(sda_oe), .tdc_data(tdc), .tdc_mon(mon),
    .dout(dout), .clk40_out(c40o), .tdc_clk40(tclk), .tdc_strobe(tstr), .cfg(cfg));

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
    e320 = ((t + 7) % 8) < 4;
    e40  = ((t + 7) % 64) < 32;
  end

  int unsigned tbase;
  int tcount = 0;
  always @(posedge dut.clk40) begin
    tcount <= tcount + 1;
    tdc    <= 30'(tbase + tcount);
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
  logic collecting = 0;
  always @(posedge clk) if (wvalid && dvalid && collecting) rxq.push_back(descr);

  logic bits [$];
  logic collect_bits = 0;
  always @(negedge clk) if (collect_bits) bits.push_back(dout);

  // strobe samples taken half a unit away from every clock edge
  logic stq [$];
  logic collect_st = 0;
  initial begin
    #0.5;
    forever begin
      if (collect_st) stq.push_back(dout);
      #1;
    end
  end

  int n_cfg = 0, n_mon = 0, n_data = 0, n_prbs = 0, n_strobe = 0, n_rst = 0;
  logic [7:0] d [64];
  logic ack;

  task automatic wr(input logic [7:0] a, input logic [7:0] v);
    logic k;
    m.write_reg(DEV, a, v, k);
    chk(k, $sformatf("I2C write %h acknowledged", a));
  endtask

  // Expected status bytes (bench copy of the monitor register map).
  function automatic logic [7:0] exp_stat(input int i, input logic raw, input tdc_mon_t x);
    logic [127:0] all;
    logic [62:0] r63;
    r63 = raw ? x.toa_raw : x.cal_raw;
    if (i == 9) return {x.hit, x.tot_err, x.tot_cnt_a, x.tot_cnt_b};
    if (i == 15) return 8'h00;
    if (!raw) begin
      logic [28:0] codes;
      codes = {x.cal_code, x.toa_code, x.tot_code};
      case (i)
        0: return {1'b0, x.cal_err, x.cal_cnt_a, x.cal_cnt_b};
        1: return codes[7:0];
        2: return codes[15:8];
        3: return codes[23:16];
        4: return {r63[31:29], codes[28:24]};
        5, 6, 7: return r63[8*(i-5)+32 +: 8];
        8: return {1'b0, r63[62:56]};
        10, 11, 12: return r63[8*(i-10) +: 8];
        13: return {3'b000, r63[28:24]};
        default: return {2'b00, x.dbf_qc};
      endcase
    end else begin
      case (i)
        0: return {1'b0, x.toa_err, x.toa_cnt_a, x.toa_cnt_b};
        1, 2, 3, 4, 5, 6, 7: return r63[8*(i-1) +: 8];
        8: return {1'b0, r63[62:56]};
        10, 11, 12, 13: return x.tot_raw[8*(i-10) +: 8];
        default: return {2'b00, x.ro_dbf_qc};
      endcase
    end
  endfunction

  initial begin
    tbase = $urandom;
    mon = '0;
    #5 rst_n = 0;
    #43 rst_n = 1;
    repeat (100) @(posedge dut.clk40);
    // 1. defaults and address
    m.read_bytes(DEV, 8'h00, d, 13, ack);
    d = m.rd_buf;
    chk(ack, "read acknowledged");
    for (int i = 0; i < 13; i++)
      chk(d[i] == REGT_DEFAULT[8*i +: 8], $sformatf("register %0h default %h", i, d[i]));
    m.read_bytes(7'b0100010, 8'h00, d, 1, ack);
    chk(!ack, "other A0 not acknowledged");
    n_cfg++;
    // 2. monitor readback, both views
    for (int rep = 0; rep < 4; rep++) begin
      logic raw = rep[0];
      tdc_mon_t x;
      x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      mon = x;
      wr(8'h0B, {7'b0011111, raw});
      m.read_bytes(DEV, 8'h20, d, 16, ack);
      d = m.rd_buf;
      for (int i = 0; i < 16; i++)
        chk(d[i] == exp_stat(i, raw, x), $sformatf("view %0d status %0h: %h, expected %h", raw, i, d[i], exp_stat(i, raw, x)));
      n_mon++;
    end
    // 3. serial data
    wait (locked && dvalid);
    rxq.delete(); collecting = 1;
    repeat (200) @(posedge dut.clk40);
    collecting = 0;
    chk(rxq.size() > 180, $sformatf("%0d words received", rxq.size()));
    for (int i = 1; i < rxq.size(); i++)
      chk(rxq[i] == rxq[i-1] + 30'd1, $sformatf("words in order: %h after %h", rxq[i], rxq[i-1]));
    n_data++;
    // 4. PRBS7
    wr(8'h04, 8'h59);
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
    // 5. strobe on the output
    for (int rep = 0; rep < 3; rep++) begin
      logic [7:0] s;
      s = 8'($urandom);
      wr(8'h06, s);
      wr(8'h05, 8'h1E);
      repeat (4) @(posedge dut.clk40);
      stq.delete(); collect_st = 1;
      repeat (10 * 32) @(posedge clk);   // ten 40 MHz periods
      collect_st = 0;
      begin
        int rises;
        rises = 0;
        for (int n = 1; n < stq.size(); n++) rises += (stq[n] && !stq[n-1]);
        chk(rises >= 10 * $countones(s) - 1 && rises <= 10 * $countones(s) + 1,
            $sformatf("strobe s=%b: %0d pulses in 10 periods", s, rises));
      end
      wr(8'h05, 8'h1F);
      n_strobe++;
    end
    // 6. readout reset
    wr(8'h04, 8'h11);
    repeat (10) @(posedge dut.clk40);
    bits.delete(); collect_bits = 1;
    repeat (500) @(posedge clk);
    collect_bits = 0;
    begin
      int changes = 0;
      for (int n = 1; n < bits.size(); n++) changes += (bits[n] != bits[n-1]);
      chk(changes == 0, $sformatf("serial output still in reset (%0d changes)", changes));
    end
    n_rst++;
    chk(n_cfg > 0 && n_mon > 0 && n_data > 0 && n_prbs > 0 && n_strobe > 0 && n_rst > 0,
        "every mechanism exercised");
    $display("mechanisms: cfg=%0d mon=%0d data=%0d prbs=%0d strobe=%0d rst=%0d",
             n_cfg, n_mon, n_data, n_prbs, n_strobe, n_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
