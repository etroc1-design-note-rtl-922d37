// clk_divider: divides the 1.28 GHz input clock into the synchronized
// 40 MHz clock (divide by 32) and a 320 MHz clock (divide by 4).
//
// A 5-bit counter advances on every rising edge of clk1g28;
// clk40 = cnt[4] and clk320 = ~cnt[1], so both rise together when the
// counter passes from 15 to 16 and every 320 MHz period starts on a
// 781.25 ps grid. The division ratios follow from the clock frequencies
// in the design note; the counter implementation and the asynchronous
// active-low reset are this design's choices.
module clk_divider (
  input  logic clk1g28,
  input  logic rst_n,
  output logic clk40,
  output logic clk320
);

  logic [4:0] cnt;

  always_ff @(posedge clk1g28 or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 5'd1;
  end

  assign clk40  = cnt[4];
  assign clk320 = ~cnt[1];

endmodule
