// phase_shifter_coarse: the digital coarse stage of the clock phase shifter.
//
// The synchronized 40 MHz clock sync_ck40 is sampled by two flip-flops on
// the 1.28 GHz clock; a rising edge seen in them raises Load for one cycle,
// which loads a 5-bit counter with delay = s<7:3>. Otherwise the counter
// advances every 1.28 GHz cycle. clk40_out = cnt[4] and clk320_out =
// ~cnt[1], so the outputs keep the 40 MHz / 320 MHz frequencies and each
// step of delay moves their edges by one 1.28 GHz period (781.25 ps): the
// rising edge of clk40_out comes (16 - delay) mod 32 cycles after the Load
// cycle, covering the full 360 degrees in 32 steps. With a free-running
// sync_ck40 the counter is reloaded every 32 cycles with the value it
// already holds, so the outputs stay glitch-free while delay is steady.
// The fine stage (DLL, s<2:0>) is analog and not part of this module.
// From the design note: the two sampling flip-flops, Load, the 5-bit
// counter, s<7:3>, the 781.25 ps step. This design's choices: which
// counter bits drive the outputs, the load direction, the reset.
module phase_shifter_coarse (
  input  logic       clk1g28,
  input  logic       rst_n,
  input  logic       sync_ck40,
  input  logic [4:0] delay,
  output logic       clk40_out,
  output logic       clk320_out
);

  logic [1:0] smp;
  logic       load;
  logic [4:0] cnt;

  assign load = smp[0] & ~smp[1];

  always_ff @(posedge clk1g28 or negedge rst_n) begin
    if (!rst_n) begin
      smp <= '0;
      cnt <= '0;
    end else begin
      smp <= {smp[0], sync_ck40};
      cnt <= load ? delay : cnt + 5'd1;
    end
  end

  assign clk40_out  = cnt[4];
  assign clk320_out = ~cnt[1];

endmodule
