// tb_sro_controller: drives the SRO controller with a behavioural model of
// the 16 pixel buffers. Every clock each pixel p writes the word
// {p[3:0], cycle[25:0]} at the controller's address while we=1, so the
// expected frame body can be worked out from the cycle numbers alone: for
// each ROI pixel, in the order 15,11,7,3,14,...,0, the 256 words written in
// the 256 cycles up to and including the L1ACC cycle, oldest first.
// Cases: ROI 16'h9201 with L1ACC five clocks after BC0 (the timing example:
// L1ACC_ID = 4, 1026-word frame), ROI 16'h9A01 (order 15,11,9,12,0),
// ROI 0 (SOF then EOF) and a full ROI. Checks SOF/EOF values, every body
// word, the frame length and that the words come back to back, that we is
// low for the whole frame and that l1acc during a frame is ignored.
module tb_sro_controller;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, bc0 = 0, l1acc = 0;
  logic [15:0] roi;
  word_t col_bus [4];
  logic we, busy;
  logic [3:0] oe;
  logic [7:0] addr;
  word_t dout;
  logic [11:0] bcid;
  word_t mem [16][256];
  int cycle = 0;

  sro_controller dut (.clk(clk), .rst_n(rst_n), .bc0(bc0), .l1acc(l1acc), .roi(roi),
                      .col_bus(col_bus), .we(we), .oe(oe), .addr(addr), .dout(dout),
                      .bcid(bcid), .busy(busy));

  always #5 clk = ~clk;

  // pixel buffer model
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (we) for (int p = 0; p < 16; p++) mem[p][addr] <= {p[3:0], 26'(cycle)};
  end
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      col_bus[c] = '0;
      for (int r = 0; r < 4; r++) if (oe[r]) col_bus[c] |= mem[4*c + r][addr];
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Run one frame; bc0_lead >= 0 pulses bc0 that many clocks before l1acc.
  task automatic frame(input logic [15:0] r, input int bc0_lead, input int exp_id);
    int l1_cycle, n, k;
    logic [3:0] order [16];
    int npix;
    logic [11:0] id_model;
    roi = r;
    npix = 0;
    for (int j = 0; j < 16; j++) begin
      logic [3:0] p;
      p = 4'(15 - 4 * (j % 4) - j / 4);
      if (r[p]) begin order[npix] = p; npix++; end
    end
    if (bc0_lead > 0) begin
      @(negedge clk) bc0 = 1;
      @(negedge clk) bc0 = 0;
      repeat (bc0_lead - 1) @(negedge clk);
    end else @(negedge clk);
    id_model = bcid;           // value sampled at the coming edge
    l1acc = 1;
    l1_cycle = cycle;          // cycle number of the write at that edge
    @(negedge clk) l1acc = 0;
    chk(!we, "we low after L1ACC");
    chk(dout == {18'h25555, id_model}, $sformatf("SOF %h", dout));
    if (exp_id >= 0) chk(dout[11:0] == 12'(exp_id), $sformatf("L1ACC_ID %0d exp %0d", dout[11:0], exp_id));
    n = 1;
    for (int q = 0; q < npix; q++) begin
      for (int w = 0; w < 256; w++) begin
        @(negedge clk);
        if (q == 0 && w == 10) l1acc = 1;       // ignored during a frame
        if (q == 0 && w == 11) l1acc = 0;
        n++;
        chk(!we, "we stays low in frame");
        chk(dout == {order[q], 26'(l1_cycle - 255 + w)},
            $sformatf("pixel %0d word %0d got %h exp %h", order[q], w, dout,
                      {order[q], 26'(l1_cycle - 255 + w)}));
      end
    end
    @(negedge clk); n++;
    chk(dout == 30'h2EADBEFF, $sformatf("EOF %h", dout));
    chk(n == 2 + 256 * npix, "frame length");
    @(negedge clk);
    chk(we && dout == '0 && !busy, "back to capture");
    repeat (300) @(negedge clk);
  endtask

  initial begin
    roi = 16'h9201;
    #22 rst_n = 1;
    repeat (300) @(negedge clk);
    frame(16'h9201, 5, 4);
    frame(16'h9A01, -1, -1);
    frame(16'h0000, 3, 2);
    frame(16'hFFFF, -1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
