// clock_gen: clock generation of the ETROC1 array and standalone pixel.
//
// Baseline path: the 1.28 GHz input is divided to a synchronized 40 MHz
// clock (clk_divider), which the coarse phase shifter uses to make
// phase-shifted 40 MHz and 320 MHz clocks (step 781.25 ps, set by
// phase_adj[7:3]). test_clk0=1 replaces them by the off-chip 40 MHz and
// 320 MHz clocks. The chosen pair feeds the TDC reference strobe generator
// (pulse slots set by ref_str_sel); test_clk1=1 bypasses the generator and
// hands the 40 MHz / 320 MHz pair on directly. The result goes to the TDC
// (tdc_clk40, tdc_strobe). clkto is the test clock output: the 40 MHz
// clock when clk_out_sel=0, the TDC reference strobe when 1.
//
// clk40 / clk320 are the clocks after the test_clk0 mux; the digital
// readout logic runs on clk40. clk40_sync is the divider's 40 MHz clock,
// present whenever the 1.28 GHz input runs, whatever the test_clk0 setting;
// it clocks the slow-control logic. phase_adj[2:0] (fine step, 97.6 ps) belongs
// to the analog DLL, which is not modelled here: it is ignored.
// The structure and the mux controls follow the design note's clock
// generator diagram; taking the readout clock after the test_clk0 mux and
// taking clkto's 40 MHz clock from tdc_clk40 are this design's choices.
// The muxes are plain combinational clock muxes: switch them only while
// the logic they clock is in reset.
module clock_gen (
  input  logic       clk1g28,
  input  logic       rst_n,
  input  logic       clk40_ext,
  input  logic       clk320_ext,
  input  logic [7:0] phase_adj,
  input  logic [7:0] ref_str_sel,
  input  logic       test_clk0,
  input  logic       test_clk1,
  input  logic       clk_out_sel,
  output logic       clk40,
  output logic       clk320,
  output logic       tdc_clk40,
  output logic       tdc_strobe,
  output logic       clkto,
  output logic       clk40_sync
);

  logic div_clk40;
  logic ps_clk40, ps_clk320;
  logic sg_clk40, sg_pulse;

  clk_divider u_div (
    .clk1g28(clk1g28),
    .rst_n  (rst_n),
    .clk40  (div_clk40),
    .clk320 ()
  );

  phase_shifter_coarse u_ps (
    .clk1g28   (clk1g28),
    .rst_n     (rst_n),
    .sync_ck40 (div_clk40),
    .delay     (phase_adj[7:3]),
    .clk40_out (ps_clk40),
    .clk320_out(ps_clk320)
  );

  assign clk40_sync = div_clk40;

  assign clk40  = test_clk0 ? clk40_ext  : ps_clk40;
  assign clk320 = test_clk0 ? clk320_ext : ps_clk320;

  tdc_strobe_gen u_sg (
    .clk40       (clk40),
    .clk320      (clk320),
    .s           (ref_str_sel),
    .clk40_delay (sg_clk40),
    .clk320_pulse(sg_pulse)
  );

  assign tdc_clk40  = test_clk1 ? clk40  : sg_clk40;
  assign tdc_strobe = test_clk1 ? clk320 : sg_pulse;
  assign clkto      = clk_out_sel ? tdc_strobe : tdc_clk40;

endmodule
