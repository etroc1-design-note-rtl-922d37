// dmro: diagnostic mode readout transmitter.
//
// Takes one 30-bit word per 40 MHz word clock and sends it as a 32-bit word
// on a 1.28 Gb/s serial line (32 bits per word clock), MSB first:
//   word = {2'b10, scrambled data[29:0]}            (normal mode)
//   word = 32 consecutive bits of PRBS7 (x^7+x^6+1) (test_mode = 1)
// The scrambler is the self-synchronising X^58+X^39+1 scrambler, run over
// the 30 data bits in serial order (bit 29 first); en_scr=0 sends the data
// unscrambled behind the same header.
//
// Input latch: the internal word clock is clk_word XOR rev_clk, so data_in
// is latched on the rising edge of clk_word when rev_clk=0 and on the
// falling edge when rev_clk=1. rev_data=1 reverses the bit order of the
// input word before it is used.
//
// Pipeline: data_in is latched on a word-clock edge, the 32-bit word is
// formed and registered on the next one, and the serializer (clocked by
// clk_bit) loads it 1-2 bit clocks after that edge, found by sampling the
// internal word clock. clk_word must be clk_bit/32, any phase.
//
// Reset: rst_n asserts asynchronously and is released on the first rising
// edge of clk_word after it goes high; a reset pulse is expected after
// every change of rev_clk.
//
// From the design note: header, polynomials, MSB-first order, 30-bit input,
// 1.28 Gb/s, the REVCLK latch edges, the reset rule, the PRBS7 test mode.
// This design's choices: scrambler bit order and reset state (zero), PRBS7
// seed (all ones), "reversing input data" read as a bit-order reversal, and
// the way the serializer finds the word boundary.
module dmro
  import etroc1_pkg::*;
(
  input  logic  clk_bit,
  input  logic  clk_word,
  input  logic  rst_n,
  input  logic  rev_data,
  input  logic  rev_clk,
  input  logic  en_scr,
  input  logic  test_mode,
  input  word_t data_in,
  output logic  data_out
);

  logic        rst_sync_n;
  logic        clk_word_int;
  word_t       data_lat;
  word_t       data_rev;
  logic [57:0] scr_state;
  logic [87:0] scr_res;
  logic [6:0]  prbs_state;
  logic [38:0] prbs_res;
  logic [31:0] word_q;
  logic [1:0]  wsync;
  logic [31:0] shreg;

  // Reset: asynchronous assertion, release at the next clk_word rising edge.
  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) rst_sync_n <= 1'b0;
    else        rst_sync_n <= 1'b1;
  end

  assign clk_word_int = clk_word ^ rev_clk;

  always_comb begin
    for (int i = 0; i < WORD_W; i++) data_rev[i] = data_in[WORD_W-1-i];
  end

  assign scr_res  = scramble30(data_lat, scr_state);
  assign prbs_res = prbs7_word(prbs_state);

  always_ff @(posedge clk_word_int or negedge rst_sync_n) begin
    if (!rst_sync_n) begin
      data_lat   <= '0;
      scr_state  <= '0;
      prbs_state <= 7'h7F;
      word_q     <= '0;
    end else begin
      data_lat   <= rev_data ? data_rev : data_in;
      prbs_state <= prbs_res[38:32];
      if (test_mode) begin
        word_q <= prbs_res[31:0];
      end else if (en_scr) begin
        word_q    <= {DMRO_HEADER, scr_res[29:0]};
        scr_state <= scr_res[87:30];
      end else begin
        word_q <= {DMRO_HEADER, data_lat};
      end
    end
  end

  // 32:1 serializer in the bit clock domain.
  always_ff @(posedge clk_bit or negedge rst_sync_n) begin
    if (!rst_sync_n) begin
      wsync <= '0;
      shreg <= '0;
    end else begin
      wsync <= {wsync[0], clk_word_int};
      if (wsync[0] && !wsync[1]) shreg <= word_q;
      else                       shreg <= {shreg[30:0], 1'b0};
    end
  end

  assign data_out = shreg[31];

endmodule
