// etroc1_tdc_test: digital logic of the ETROC1 TDC test block.
//
// A stand-alone TDC with its own pads: an I2C slave at {6'b010001, A0}
// (configuration bytes 0x00..0x0C, brought out as cfg for the analog parts;
// TDC monitor read-back at 0x20..0x2E through tdc_mon_regs), clock
// selection, a TDC reference strobe generator and a DMRO serializer that
// sends the TDC's 30-bit word (hitFlag | Cal | TOA | TOT order) every
// 40 MHz clock.
//
// Clocks (register 0x05): Clk40M_Sel / Clk320M_Sel = 1 take the 40 MHz /
// 320 MHz clock from the internal divider of the 1.28 GHz input, 0 from the
// off-chip inputs. Clk40M_Psel / Clk320M_Psel = 1 feed the strobe
// generator from the off-chip clocks, 0 from the selected internal ones.
// Pulse_Sel (0x06) chooses the strobe slots. Dataout_Sel = 1 sends the
// serial data on dout, 0 the 320 MHz strobe. clk40_out is the selected
// 40 MHz clock.
// DMRO controls (0x04): ro_testmode (PRBS7), ro_enable, ro_reverse
// (input bit order), ro_resetn, ro_revclk. Register 0x0B bit 0
// (TDCRawData_Sel) picks the monitor view.
// The register map, addresses and selections follow the design note. This
// design's choices: the scrambler is always on (the block has no scrambler
// control bit), ro_enable=0 holds the DMRO in reset, and the strobe
// generator output is also brought out as tdc_strobe.
module etroc1_tdc_test
  import etroc1_pkg::*;
(
  input  logic         clk1g28,
  input  logic         clk40_ext,
  input  logic         clk320_ext,
  input  logic         rst_n,
  input  logic         a0,
  input  logic         scl,
  input  logic         sda_in,
  output logic         sda_oe,
  input  word_t        tdc_data,
  input  tdc_mon_t     tdc_mon,
  output logic         dout,
  output logic         clk40_out,
  output logic         tdc_clk40,
  output logic         tdc_strobe,
  output logic [255:0] cfg
);

  logic div40, div320;
  logic clk40, clk320, p40, p320;
  logic [7:0] ro_ctl, clk_ctl;
  logic [127:0] stat;
  logic ser;

  clk_divider u_div (
    .clk1g28(clk1g28),
    .rst_n  (rst_n),
    .clk40  (div40),
    .clk320 (div320)
  );

  i2c_slave #(.N_CFG(32), .N_STAT(16), .CFG_DEFAULT(REGT_DEFAULT)) u_i2c (
    .clk     (div40),
    .rst_n   (rst_n),
    .dev_addr({I2C_T_PREFIX, a0}),
    .scl     (scl),
    .sda_in  (sda_in),
    .sda_oe  (sda_oe),
    .cfg     (cfg),
    .stat    (stat)
  );

  tdc_mon_regs u_mon (
    .mon    (tdc_mon),
    .raw_sel(cfg[8*'h0B]),
    .stat   (stat)
  );

  assign ro_ctl  = cfg[8*'h04 +: 8];
  assign clk_ctl = cfg[8*'h05 +: 8];

  assign clk40  = clk_ctl[4] ? div40  : clk40_ext;
  assign clk320 = clk_ctl[3] ? div320 : clk320_ext;
  assign p40    = clk_ctl[2] ? clk40_ext  : clk40;
  assign p320   = clk_ctl[1] ? clk320_ext : clk320;

  tdc_strobe_gen u_sg (
    .clk40       (p40),
    .clk320      (p320),
    .s           (cfg[8*'h06 +: 8]),
    .clk40_delay (tdc_clk40),
    .clk320_pulse(tdc_strobe)
  );

  dmro u_dmro (
    .clk_bit  (clk1g28),
    .clk_word (clk40),
    .rst_n    (rst_n & ro_ctl[6] & ro_ctl[4]),
    .rev_data (ro_ctl[5]),
    .rev_clk  (ro_ctl[7]),
    .en_scr   (1'b1),
    .test_mode(ro_ctl[3]),
    .data_in  (tdc_data),
    .data_out (ser)
  );

  assign dout      = clk_ctl[0] ? ser : tdc_strobe;
  assign clk40_out = clk40;

endmodule
