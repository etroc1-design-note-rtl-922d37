// ser_rx: behavioural receiver for the 1.28 Gb/s DMRO stream, used by the
// testbenches.
//
// Samples din on the falling edge of clk_bit. It looks for the bit phase at
// which the 2-bit header 2'b10 has been seen at the top of 12 consecutive
// 32-bit words and then locks to it. From then on it presents every word
// (wvalid, word) and undoes the X^58+X^39+1 scrambling of the 30 payload
// bits in serial order (descr). The descrambler is self-synchronising, so
// descr is marked valid (dvalid) from the third word after lock. bad_hdr
// counts locked words without the 2'b10 header. clear drops the lock.
module ser_rx (
  input  logic        clk_bit,
  input  logic        din,
  input  logic        clear,
  output logic        locked,
  output logic        wvalid,
  output logic [31:0] word,
  output logic [29:0] descr,
  output logic        dvalid,
  output int          bad_hdr
);

  logic [31:0] hist;
  logic [4:0]  pos, phase;
  int          score [32];
  logic [57:0] ds;
  int          nwords;

  initial begin
    hist = '0; pos = '0; phase = '0; locked = 1'b0; wvalid = 1'b0;
    word = '0; descr = '0; dvalid = 1'b0; bad_hdr = 0; ds = '0; nwords = 0;
    for (int i = 0; i < 32; i++) score[i] = 0;
  end

  always @(negedge clk_bit) begin
    logic [31:0] h;
    logic [29:0] d;
    h = {hist[30:0], din};
    hist <= h;
    pos  <= pos + 5'd1;
    wvalid <= 1'b0;
    if (clear) begin
      locked <= 1'b0;
      dvalid <= 1'b0;
      nwords = 0;
      for (int i = 0; i < 32; i++) score[i] = 0;
    end else if (!locked) begin
      if (h[31:30] == 2'b10) score[pos] = score[pos] + 1;
      else                   score[pos] = 0;
      if (score[pos] >= 12) begin
        locked <= 1'b1;
        phase  <= pos;
        nwords = 0;
      end
    end else if (pos == phase) begin
      wvalid <= 1'b1;
      word   <= h;
      if (h[31:30] != 2'b10) bad_hdr <= bad_hdr + 1;
      for (int i = 29; i >= 0; i--) begin
        d[i] = h[i] ^ ds[38] ^ ds[57];
        ds   = {ds[56:0], h[i]};
      end
      descr  <= d;
      nwords = nwords + 1;
      dvalid <= (nwords >= 3);
    end
  end

endmodule
