// tb_dmro: drives the DMRO transmitter with random 30-bit words, one per
// word clock (clk_word = clk_bit / 32; time is scaled, one bit = 2 units),
// and decodes the serial output with an independent receiver (ser_rx:
// header alignment and descrambling). Cases:
//   1. scrambler on, latch on rising clk_word edges (rev_clk=0)
//   2. rev_data=1: the received payload is the bit-reversed input
//   3. scrambler off: payload is the raw input
//   4. rev_clk=1 with data changing on rising edges (latched on falling)
//   5. test mode: the stream obeys b[n] = b[n-6] ^ b[n-7] (PRBS7), is
//      not constant, and repeats every 127 bits
// In 1-4 every received word carries header 2'b10, words arrive exactly
// every 32 bits, and the received payload sequence equals the sent one at a
// fixed latency.
module tb_dmro;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk_bit = 1'b0, clk_word = 1'b0, rst_n = 1'b0;
  logic rev_data = 0, rev_clk = 0, en_scr = 1, test_mode = 0;
  word_t data_in;
  logic dout;
  int bitcnt = 0;
  logic clear = 0;
  logic locked, wvalid, dvalid;
  logic [31:0] word;
  logic [29:0] descr;
  int bad_hdr;

  dmro dut (.clk_bit(clk_bit), .clk_word(clk_word), .rst_n(rst_n), .rev_data(rev_data),
            .rev_clk(rev_clk), .en_scr(en_scr), .test_mode(test_mode), .data_in(data_in),
            .data_out(dout));

  ser_rx rx (.clk_bit(clk_bit), .din(dout), .clear(clear), .locked(locked), .wvalid(wvalid),
             .word(word), .descr(descr), .dvalid(dvalid), .bad_hdr(bad_hdr));

  always #1 clk_bit = ~clk_bit;
  always @(posedge clk_bit) begin
    bitcnt <= bitcnt + 1;
    if (bitcnt % 16 == 15) clk_word <= ~clk_word;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  word_t sent [$];
  word_t got  [$];
  int    wgap [$];
  int    last_w;

  always @(posedge clk_bit) if (wvalid) begin
    wgap.push_back(bitcnt - last_w);
    last_w = bitcnt;
    if (dvalid) got.push_back(en_scr ? descr : word[29:0]);
  end

  function automatic word_t rev30(input word_t w);
    word_t r;
    for (int i = 0; i < 30; i++) r[i] = w[29 - i];
    return r;
  endfunction

  task automatic run_case(input string name, input bit rd, input bit rc, input bit es);
    int lat, ok, nw;
    rev_data = rd; rev_clk = rc; en_scr = es; test_mode = 0;
    rst_n = 0; clear = 1;
    repeat (70) @(posedge clk_bit);
    rst_n = 1; clear = 0;
    sent.delete(); got.delete(); wgap.delete();
    // 300 words; data changes on the edge opposite to the latching edge
    for (int i = 0; i < 300; i++) begin
      if (rc) @(posedge clk_word); else @(negedge clk_word);
      data_in = 30'($urandom);
      sent.push_back(rd ? rev30(data_in) : data_in);
    end
    repeat (200) @(posedge clk_bit);
    chk(locked, {name, ": receiver locked"});
    chk(bad_hdr == 0, {name, ": every word has header 10"});
    nw = 0;
    for (int i = 1; i < wgap.size(); i++) begin
      nw++;
      if (wgap[i] != 32) begin chk(0, {name, ": word spacing 32 bits"}); break; end
    end
    chk(nw > 200, {name, ": enough words"});
    // find the latency: got[j] == sent[j + lat]
    lat = -1;
    for (int l = -8; l <= 40 && lat < 0; l++) begin
      ok = 1;
      for (int j = 20; j < 60; j++)
        if (j + l < 0 || j + l >= sent.size() || got[j] != sent[j + l]) ok = 0;
      if (ok) lat = l + 100;
    end
    chk(lat >= 0, {name, ": payload sequence found"});
    if (lat >= 0) begin
      lat -= 100;
      for (int j = 0; j < got.size() && j + lat < sent.size(); j++)
        if (j + lat >= 0) chk(got[j] == sent[j + lat], $sformatf("%s: word %0d", name, j));
    end
  endtask

  logic bits [$];
  always @(negedge clk_bit) if (test_mode) bits.push_back(dout);

  initial begin
    data_in = 0;
    run_case("scrambled", 0, 0, 1);
    run_case("rev_data", 1, 0, 1);
    run_case("unscrambled", 0, 0, 0);
    run_case("rev_clk", 0, 1, 1);
    // PRBS7 test mode
    rev_clk = 0; rst_n = 0;
    repeat (70) @(posedge clk_bit);
    rst_n = 1;
    test_mode = 1;
    repeat (200) @(posedge clk_bit);
    bits.delete();
    repeat (2000) @(posedge clk_bit);
    begin
      int ones = 0, bad = 0, bad127 = 0;
      for (int n = 7; n < bits.size(); n++) begin
        if (bits[n] != (bits[n-6] ^ bits[n-7])) bad++;
        if (n >= 127 && bits[n] != bits[n-127]) bad127++;
        ones += bits[n];
      end
      chk(bad == 0, $sformatf("PRBS7 recurrence, %0d errors", bad));
      chk(bad127 == 0, "PRBS7 period 127");
      chk(ones > 800 && ones < 1200, "PRBS7 balanced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
