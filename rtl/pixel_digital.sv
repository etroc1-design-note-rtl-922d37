// pixel_digital: the digital part of one pixel of the 4x4 array.
//
// The pixel's 30-bit word (TDC data, or the test pattern from ro_test_ctrl
// when test_ro=1) goes two ways:
//  - simple readout: it is written into the 256-word hit_buffer at the
//    shared address whenever we=1; the buffer drives the column's SRO bus
//    while oe_sro=1;
//  - diagnostic readout: it is registered every clock in a one-word output
//    buffer that drives the column's DMRO bus while en_dmro=1.
// All state changes on the rising edge of the 40 MHz clk. Both buses read
// zero from a pixel that is not enabled, so a column bus is the OR of its
// four pixels. The split into the two paths follows the design note's
// pixel and readout diagrams; the register stage of the DMRO buffer is this
// design's reading of the "Buffer" clocked by CLK in those diagrams.
module pixel_digital
  import etroc1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      tdc_data,
  input  logic       test_ro,
  input  logic [3:0] cfg_ro,
  input  logic       we,
  input  logic [7:0] addr,
  input  logic       oe_sro,
  input  logic       en_dmro,
  output word_t      sro_dout,
  output word_t      dmro_dout
);

  word_t pix_word;
  word_t dmro_buf;

  ro_test_ctrl u_rotest (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg    (cfg_ro),
    .test_ro(test_ro),
    .din    (tdc_data),
    .dout   (pix_word)
  );

  hit_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(WORD_W)) u_buf (
    .clk (clk),
    .we  (we),
    .addr(addr),
    .din (pix_word),
    .oe  (oe_sro),
    .dout(sro_dout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dmro_buf <= '0;
    else        dmro_buf <= pix_word;
  end

  assign dmro_dout = en_dmro ? dmro_buf : '0;

endmodule
