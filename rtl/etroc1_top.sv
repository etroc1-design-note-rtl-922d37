// etroc1_top: the digital logic of the ETROC1 prototype chip.
//
// ETROC1 holds three independent blocks with separate pads, clocks, resets
// and I2C buses, placed here side by side:
//  - the 4x4 pixel array (etroc1_array, ports *_a): two I2C slaves, 16
//    pixel hit buffers, the simple readout controller and the diagnostic
//    readout serializer on one 1.28 Gb/s output;
//  - the standalone pixel (etroc1_standalone, ports *_s);
//  - the TDC test block (etroc1_tdc_test, ports *_t).
// The analog front ends (preamplifier, discriminator, threshold DAC, charge
// injection), the TDCs, the DLL, the differential receivers and the CML
// drivers are outside this logic: the TDC words, discriminator outputs and
// DLL lock status come in as ports, and the configuration bytes that
// control the analog parts go out as ports (cfg_*). Differential pads
// appear as single-ended signals; I2C SDA is split into sda_*_in and a
// pull-low enable sda_*_oe.
module etroc1_top
  import etroc1_pkg::*;
(
  // pixel array
  input  logic            clk1g28_a,
  input  logic            clk40_a,
  input  logic            clk320_a,
  input  logic            rstn_a,
  input  logic            bc0_a,
  input  logic            l1acc_a,
  input  logic            a0_a,
  input  logic            a1_a,
  input  logic            scl_a_a,
  input  logic            sda_a_a_in,
  output logic            sda_a_a_oe,
  input  logic            a0_b_a,
  input  logic            a1_b_a,
  input  logic            scl_b_a,
  input  logic            sda_b_a_in,
  output logic            sda_b_a_oe,
  input  word_t           tdc_data_a [NPIX],
  input  logic [NPIX-1:0] discri_a,
  input  logic            dll_late_a,
  output logic            dout_a,
  output logic            clkto_a,
  output logic            discri_out_a,
  output logic            tdc_clk40_a,
  output logic            tdc_strobe_a,
  output logic [255:0]    cfg_a_a,
  output logic [255:0]    cfg_b_a,
  // standalone pixel
  input  logic            clk1g28_s,
  input  logic            clk40_s,
  input  logic            clk320_s,
  input  logic            rstn_s,
  input  logic            scl_s,
  input  logic            sda_s_in,
  output logic            sda_s_oe,
  input  word_t           tdc_data_s,
  input  logic            dll_late_s,
  input  logic            discri_s,
  output logic            discri_out_s,
  output logic            dout_s,
  output logic            clkto_s,
  output logic            tdc_clk40_s,
  output logic            tdc_strobe_s,
  output logic [255:0]    cfg_s,
  // TDC test block
  input  logic            clk1g28_t,
  input  logic            clk40_t,
  input  logic            clk320_t,
  input  logic            rstn_t,
  input  logic            a0_t,
  input  logic            scl_t,
  input  logic            sda_t_in,
  output logic            sda_t_oe,
  input  word_t           tdc_data_t,
  input  tdc_mon_t        tdc_mon_t_in,
  output logic            dout_t,
  output logic            clk40_out_t,
  output logic            tdc_clk40_t,
  output logic            tdc_strobe_t,
  output logic [255:0]    cfg_t
);

  etroc1_array u_array (
    .clk1g28   (clk1g28_a),
    .clk40_ext (clk40_a),
    .clk320_ext(clk320_a),
    .rst_n     (rstn_a),
    .bc0       (bc0_a),
    .l1acc     (l1acc_a),
    .a0_a      (a0_a),
    .a1_a      (a1_a),
    .scl_a     (scl_a_a),
    .sda_a_in  (sda_a_a_in),
    .sda_a_oe  (sda_a_a_oe),
    .a0_b      (a0_b_a),
    .a1_b      (a1_b_a),
    .scl_b     (scl_b_a),
    .sda_b_in  (sda_b_a_in),
    .sda_b_oe  (sda_b_a_oe),
    .tdc_data  (tdc_data_a),
    .discri    (discri_a),
    .dll_late  (dll_late_a),
    .dout      (dout_a),
    .clkto     (clkto_a),
    .discri_out(discri_out_a),
    .tdc_clk40 (tdc_clk40_a),
    .tdc_strobe(tdc_strobe_a),
    .cfg_a     (cfg_a_a),
    .cfg_b     (cfg_b_a)
  );

  etroc1_standalone u_standalone (
    .clk1g28   (clk1g28_s),
    .clk40_ext (clk40_s),
    .clk320_ext(clk320_s),
    .rst_n     (rstn_s),
    .scl       (scl_s),
    .sda_in    (sda_s_in),
    .sda_oe    (sda_s_oe),
    .tdc_data  (tdc_data_s),
    .dll_late  (dll_late_s),
    .discri    (discri_s),
    .discri_out(discri_out_s),
    .dout      (dout_s),
    .clkto     (clkto_s),
    .tdc_clk40 (tdc_clk40_s),
    .tdc_strobe(tdc_strobe_s),
    .cfg       (cfg_s)
  );

  etroc1_tdc_test u_tdc_test (
    .clk1g28   (clk1g28_t),
    .clk40_ext (clk40_t),
    .clk320_ext(clk320_t),
    .rst_n     (rstn_t),
    .a0        (a0_t),
    .scl       (scl_t),
    .sda_in    (sda_t_in),
    .sda_oe    (sda_t_oe),
    .tdc_data  (tdc_data_t),
    .tdc_mon   (tdc_mon_t_in),
    .dout      (dout_t),
    .clk40_out (clk40_out_t),
    .tdc_clk40 (tdc_clk40_t),
    .tdc_strobe(tdc_strobe_t),
    .cfg       (cfg_t)
  );

endmodule
