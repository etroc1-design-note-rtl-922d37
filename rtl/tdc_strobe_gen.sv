// tdc_strobe_gen: TDC reference strobe (pulse) generator.
//
// Each 40 MHz period, whose rising edge is phase 0, is split into eight
// 320 MHz slots. The pulse output is high during the high half of the
// 320 MHz clock in every slot k whose select bit s[k] is 1; the default
// s = 8'b00000011 gives pulses in slots 0 and 1.
//
// How: a chain of nine flip-flops, clocked on the falling edge of clk320,
// shifts the 40 MHz clock along. Stage pair k (q[k]=1, q[k+1]=0) marks
// where the last rising edge of clk40 has reached, i.e. that the current
// slot is k+1 (pair 7 marks slot 0 of the next period, one 40 MHz period
// later). The selected pair flags are ORed and gated with clk320. Since the
// flags change on the falling edge of clk320, the gated pulse has no
// glitches. clk40_delay is the 40 MHz clock at the end of the chain,
// delayed by one 40 MHz period plus half a 320 MHz period.
//
// clk40 and clk320 must come from the same source, with rising edges
// aligned. The flip-flop chain, its clocking on the inverted 320 MHz clock
// and the s<1>..s<7>, s<0> order of the taps follow the design note's
// schematic; writing the taps as "pair k" flags and the choice of the
// last stage as clk40_delay are this design's. The chain has no reset: it
// fills within nine 320 MHz cycles.
module tdc_strobe_gen (
  input  logic       clk40,
  input  logic       clk320,
  input  logic [7:0] s,
  output logic       clk40_delay,
  output logic       clk320_pulse
);

  logic [8:0] q;
  logic [7:0] pair;
  logic [7:0] slot_sel;

  always_ff @(negedge clk320) begin
    q <= {q[7:0], clk40};
  end

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      pair[k]     = q[k] & ~q[k+1];
      slot_sel[k] = pair[k] & s[(k + 1) % 8];
    end
  end

  assign clk320_pulse = clk320 & (|slot_sel);
  assign clk40_delay  = q[8];

endmodule
