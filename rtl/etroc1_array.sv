// etroc1_array: digital logic of the ETROC1 4x4 pixel array block.
//
// Slow control: two I2C slaves, A at {5'b00000, A1, A0} and B at
// {5'b11111, A1, A0}, each with 32 configuration bytes (cfg_a, cfg_b, also
// brought out for the analog front ends) and a status area; status byte 0
// of slave A (register 0x20) bit 0 reads dll_late.
//
// Clocks: clock_gen makes the 40 MHz readout clock, the 320 MHz clock and
// the TDC clock / reference strobe from the 1.28 GHz input (or from the
// off-chip 40/320 MHz clocks), controlled by REG_B 0x04..0x06.
//
// Pixels: 16 pixel_digital blocks, pixel index = 4*column + row. Each takes
// its 30-bit TDC word, or its test pattern when enableMon (REG_B 0x00 bit 1)
// is set; the test pattern's 4-bit tag is the low 4 bits of the pixel's
// threshold code VTHIn.
//
// Readout: two schemes share the DMRO serializer, chosen by RO_SEL
// (REG_A 0x07 bit 6):
//  - diagnostic (RO_SEL=0): OE_DMRO_Row (REG_A 0x07[3:0]) enables the
//    output buffers of one row, DMRO_COL (0x07[5:4]) picks one column bus,
//    so one pixel's words stream out continuously, one per 40 MHz clock.
//  - simple (RO_SEL=1): sro_controller fills the pixel hit buffers and, on
//    L1ACC, sends a frame SOF / the buffers of the ROI pixels / EOF.
// The DMRO serializer sends 32-bit words at 1.28 Gb/s on dout, with the
// REG_B 0x06 controls (scrambler, REVCLK, REVData, PRBS7 test mode).
//
// Discriminator output: EN_DiscriOut (REG_A 0x04) selects one pixel's
// discriminator output for DiscriOut: bits [7:4] pick the row, [3:0] the
// column; the output is 0 unless exactly one column bit is set.
//
// Everything follows the design note's block diagrams and register map;
// the reset of the readout logic by rst_n (the RSTN pad) is asynchronous,
// the DMRO column buses are ORs of the enabled pixel buffers, and several
// row bits set at once (an invalid setting) OR the rows together.
module etroc1_array
  import etroc1_pkg::*;
(
  input  logic           clk1g28,
  input  logic           clk40_ext,
  input  logic           clk320_ext,
  input  logic           rst_n,
  input  logic           bc0,
  input  logic           l1acc,
  input  logic           a0_a,
  input  logic           a1_a,
  input  logic           scl_a,
  input  logic           sda_a_in,
  output logic           sda_a_oe,
  input  logic           a0_b,
  input  logic           a1_b,
  input  logic           scl_b,
  input  logic           sda_b_in,
  output logic           sda_b_oe,
  input  word_t          tdc_data [NPIX],
  input  logic [NPIX-1:0] discri,
  input  logic           dll_late,
  output logic           dout,
  output logic           clkto,
  output logic           discri_out,
  output logic           tdc_clk40,
  output logic           tdc_strobe,
  output logic [255:0]   cfg_a,
  output logic [255:0]   cfg_b
);

  logic clk40, clk320, clk40_sync;

  // ---------------- slow control ----------------
  logic [127:0] stat_a;
  assign stat_a = {127'b0, dll_late};

  i2c_slave #(.N_CFG(32), .N_STAT(16), .CFG_DEFAULT(REGA_DEFAULT)) u_i2c_a (
    .clk     (clk40_sync),
    .rst_n   (rst_n),
    .dev_addr({I2C_A_PREFIX, a1_a, a0_a}),
    .scl     (scl_a),
    .sda_in  (sda_a_in),
    .sda_oe  (sda_a_oe),
    .cfg     (cfg_a),
    .stat    (stat_a)
  );

  i2c_slave #(.N_CFG(32), .N_STAT(16), .CFG_DEFAULT(REGB_DEFAULT)) u_i2c_b (
    .clk     (clk40_sync),
    .rst_n   (rst_n),
    .dev_addr({I2C_B_PREFIX, a1_b, a0_b}),
    .scl     (scl_b),
    .sda_in  (sda_b_in),
    .sda_oe  (sda_b_oe),
    .cfg     (cfg_b),
    .stat    ('0)
  );

  logic [7:0]  en_discri;
  logic [3:0]  oe_dmro_row;
  logic [1:0]  dmro_col;
  logic        ro_sel;
  logic [NPIX-1:0] roi;
  logic        enable_mon;
  logic [7:0]  phase_adj, ref_str_sel, dmro_ctl;

  assign en_discri   = cfg_a[RA_EN_DISCRI*8 +: 8];
  assign oe_dmro_row = cfg_a[RA_RO*8 +: 4];
  assign dmro_col    = cfg_a[RA_RO*8+4 +: 2];
  assign ro_sel      = cfg_a[RA_RO*8+6];
  assign roi         = cfg_a[RA_ROI*8 +: 16];
  assign enable_mon  = cfg_b[RB_TDC*8+1];
  assign phase_adj   = cfg_b[RB_PHASEADJ*8 +: 8];
  assign ref_str_sel = cfg_b[RB_REFSTR*8 +: 8];
  assign dmro_ctl    = cfg_b[RB_DMRO*8 +: 8];

  // ---------------- clocks ----------------
  clock_gen u_clk (
    .clk1g28    (clk1g28),
    .rst_n      (rst_n),
    .clk40_ext  (clk40_ext),
    .clk320_ext (clk320_ext),
    .phase_adj  (phase_adj),
    .ref_str_sel(ref_str_sel),
    .test_clk0  (dmro_ctl[4]),
    .test_clk1  (dmro_ctl[5]),
    .clk_out_sel(dmro_ctl[6]),
    .clk40      (clk40),
    .clk320     (clk320),
    .tdc_clk40  (tdc_clk40),
    .tdc_strobe (tdc_strobe),
    .clkto      (clkto),
    .clk40_sync (clk40_sync)
  );

  // ---------------- pixels ----------------
  logic            we;
  logic [NROW-1:0] oe_row;
  logic [7:0]      addr;
  word_t           sro_pix  [NPIX];
  word_t           dmro_pix [NPIX];
  word_t           sro_bus  [NCOL];
  word_t           dmro_bus [NCOL];

  for (genvar p = 0; p < NPIX; p++) begin : g_pix
    pixel_digital u_pix (
      .clk      (clk40),
      .rst_n    (rst_n),
      .tdc_data (tdc_data[p]),
      .test_ro  (enable_mon),
      .cfg_ro   (cfg_a[RA_VTHIN*8 + 10*p +: 4]),
      .we       (we),
      .addr     (addr),
      .oe_sro   (oe_row[p % NROW]),
      .en_dmro  (oe_dmro_row[p % NROW]),
      .sro_dout (sro_pix[p]),
      .dmro_dout(dmro_pix[p])
    );
  end

  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      sro_bus[c]  = '0;
      dmro_bus[c] = '0;
      for (int r = 0; r < NROW; r++) begin
        sro_bus[c]  = sro_bus[c]  | sro_pix[NROW*c + r];
        dmro_bus[c] = dmro_bus[c] | dmro_pix[NROW*c + r];
      end
    end
  end

  // ---------------- simple readout ----------------
  word_t             sro_dout;
  logic [BCID_W-1:0] bcid;
  logic              sro_busy;

  sro_controller u_sro (
    .clk    (clk40),
    .rst_n  (rst_n),
    .bc0    (bc0),
    .l1acc  (l1acc),
    .roi    (roi),
    .col_bus(sro_bus),
    .we     (we),
    .oe     (oe_row),
    .addr   (addr),
    .dout   (sro_dout),
    .bcid   (bcid),
    .busy   (sro_busy)
  );

  // ---------------- shared DMRO serializer ----------------
  word_t ro_word;
  assign ro_word = ro_sel ? sro_dout : dmro_bus[dmro_col];

  dmro u_dmro (
    .clk_bit  (clk1g28),
    .clk_word (clk40),
    .rst_n    (rst_n),
    .rev_data (dmro_ctl[2]),
    .rev_clk  (dmro_ctl[1]),
    .en_scr   (dmro_ctl[0]),
    .test_mode(dmro_ctl[3]),
    .data_in  (ro_word),
    .data_out (dout)
  );

  // ---------------- discriminator output select ----------------
  always_comb begin
    discri_out = 1'b0;
    if (en_discri[3:0] != 4'b0 && (en_discri[3:0] & (en_discri[3:0] - 4'd1)) == 4'b0) begin
      for (int p = 0; p < NPIX; p++) begin
        if (en_discri[4 + p % NROW] && en_discri[p / NROW]) discri_out = discri_out | discri[p];
      end
    end
  end

endmodule
