// ro_test_ctrl: readout test pattern generator and the mux behind it
// (the block the design note calls ROTestCtrl).
//
// In test mode (test_ro=1) the pixel sends a pattern instead of its TDC
// data: dout = {10'b1010101010, cfg[3:0], cnt[15:0]}, where cnt is a 16-bit
// counter that increments on every rising clk edge and cfg is a per-pixel
// 4-bit tag (on chip the four LSBs of the pixel's threshold DAC code). In
// normal mode (test_ro=0) dout = din, the 30-bit TDC word. The mux is
// combinational; dout changes right after the clock edge that updates cnt.
// Field layout follows the design note. The asynchronous active-low reset
// of the counter is this design's choice.
module ro_test_ctrl
  import etroc1_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  cfg,
  input  logic        test_ro,
  input  word_t       din,
  output word_t       dout
);

  logic [15:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 16'd1;
  end

  assign dout = test_ro ? {ROTEST_FIXED, cfg, cnt} : din;

endmodule
