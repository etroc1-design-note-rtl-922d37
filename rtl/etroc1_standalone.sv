// etroc1_standalone: digital logic of the ETROC1 standalone (full) pixel.
//
// A single pixel with its own pads: an I2C slave at 7'b1001110 with 16
// configuration bytes in use (cfg, brought out for the analog front end),
// a clock generator, the readout test pattern generator and a DMRO
// serializer sending the pixel's 30-bit word every 40 MHz clock on dout.
// There is no simple readout here.
//
// Register use (byte.bit): 0x00.1 enableMon selects the test pattern (tag =
// VTHIn[3:0], register 0x0E bits 3:0); 0x04 PhaseAdj; 0x05 RefStrSel;
// 0x06: bit0 RSTN_DMRO (active-low DMRO reset, ANDed with rst_n), bit1
// ENScr, bit2 REVCLK, bit3 REVData, bit4 TestMode, bit5 TestCLK0,
// bit6 TestCLK1, bit7 CLKOutSel; 0x0F bit6 OE_DMRO (when 0 the DMRO is fed
// zeros), 0x0F bit3 EN_DiscriOut gates the discriminator output pad
// (discri_out = discri AND EN_DiscriOut). Status register 0x20 bit 0 reads
// dll_late.
// The register map and addresses follow the design note. Feeding zeros when
// OE_DMRO=0 and registering the pixel word once before the DMRO (as the
// array pixels do) are this design's choices.
module etroc1_standalone
  import etroc1_pkg::*;
(
  input  logic         clk1g28,
  input  logic         clk40_ext,
  input  logic         clk320_ext,
  input  logic         rst_n,
  input  logic         scl,
  input  logic         sda_in,
  output logic         sda_oe,
  input  word_t        tdc_data,
  input  logic         dll_late,
  input  logic         discri,
  output logic         discri_out,
  output logic         dout,
  output logic         clkto,
  output logic         tdc_clk40,
  output logic         tdc_strobe,
  output logic [255:0] cfg
);

  logic clk40, clk320, clk40_sync;
  logic [7:0] ctl;
  logic oe_dmro;
  word_t pix_word, pix_q;

  i2c_slave #(.N_CFG(32), .N_STAT(16), .CFG_DEFAULT(REGS_DEFAULT)) u_i2c (
    .clk     (clk40_sync),
    .rst_n   (rst_n),
    .dev_addr(I2C_S_ADDR),
    .scl     (scl),
    .sda_in  (sda_in),
    .sda_oe  (sda_oe),
    .cfg     (cfg),
    .stat    ({127'b0, dll_late})
  );

  assign ctl     = cfg[8*'h06 +: 8];
  assign oe_dmro = cfg[8*'h0F + 6];

  // Discriminator output pad, enabled by EN_DiscriOut (register 0x0F bit 3).
  assign discri_out = discri & cfg[8*'h0F + 3];

  clock_gen u_clk (
    .clk1g28    (clk1g28),
    .rst_n      (rst_n),
    .clk40_ext  (clk40_ext),
    .clk320_ext (clk320_ext),
    .phase_adj  (cfg[8*'h04 +: 8]),
    .ref_str_sel(cfg[8*'h05 +: 8]),
    .test_clk0  (ctl[5]),
    .test_clk1  (ctl[6]),
    .clk_out_sel(ctl[7]),
    .clk40      (clk40),
    .clk320     (clk320),
    .tdc_clk40  (tdc_clk40),
    .tdc_strobe (tdc_strobe),
    .clkto      (clkto),
    .clk40_sync (clk40_sync)
  );

  ro_test_ctrl u_rotest (
    .clk    (clk40),
    .rst_n  (rst_n),
    .cfg    (cfg[8*'h0E +: 4]),
    .test_ro(cfg[8*'h00 + 1]),
    .din    (tdc_data),
    .dout   (pix_word)
  );

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) pix_q <= '0;
    else        pix_q <= oe_dmro ? pix_word : '0;
  end

  dmro u_dmro (
    .clk_bit  (clk1g28),
    .clk_word (clk40),
    .rst_n    (rst_n & ctl[0]),
    .rev_data (ctl[3]),
    .rev_clk  (ctl[2]),
    .en_scr   (ctl[1]),
    .test_mode(ctl[4]),
    .data_in  (pix_q),
    .data_out (dout)
  );

endmodule
