// tb_clock_gen: clock generator with a 1.28 GHz input (scaled: period 2)
// and off-chip 40/320 MHz clocks of a different phase. Checks:
//  - baseline: clk40 period 64 units; the distance from the divider's
//    clk40_sync edge to clk40 follows phase_adj[7:3] in 2-unit steps;
//  - the strobe makes popcount(ref_str_sel) pulses per 40 MHz period;
//  - clkto is the strobe with clk_out_sel=1 and tdc_clk40 with 0;
//  - test_clk0=1 passes the off-chip clocks; test_clk1=1 bypasses the
//    strobe generator (tdc_strobe = clk320, tdc_clk40 = clk40).
// Each mechanism is counted; one that never happened is a failure.
module tb_clock_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, e40 = 0, e320 = 0;
  logic [7:0] pa = 0, rs = 8'b00000011;
  logic tc0 = 0, tc1 = 0, cos = 1;
  logic clk40, clk320, tclk, tstr, clkto, csync;
  int t = 0;

  clock_gen dut (.clk1g28(clk), .rst_n(rst_n), .clk40_ext(e40), .clk320_ext(e320),
                 .phase_adj(pa), .ref_str_sel(rs), .test_clk0(tc0), .test_clk1(tc1),
                 .clk_out_sel(cos), .clk40(clk40), .clk320(clk320), .tdc_clk40(tclk),
                 .tdc_strobe(tstr), .clkto(clkto), .clk40_sync(csync));

  always #1 clk = ~clk;
  always begin
    #1 t++;
    e320 = ((t + 3) % 8) < 4;
    e40  = ((t + 3) % 64) < 32;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int popc(input logic [7:0] v);
    int c = 0;
    for (int i = 0; i < 8; i++) c += v[i];
    return c;
  endfunction

  int n_phase = 0, n_strobe = 0, n_tc0 = 0, n_tc1 = 0, n_out = 0;

  task automatic edge_dist(output int dst, output int period);
    int a, b, c;
    @(posedge csync); a = t;
    @(posedge clk40); b = t;
    @(posedge clk40); c = t;
    dst = b - a; period = c - b;
  endtask

  initial begin
    int d0, dst, per;
    #5 rst_n = 1;
    repeat (300) @(posedge clk);
    // coarse phase steps
    for (int k = 0; k < 32; k++) begin
      pa = {5'(k), 3'b000};
      repeat (200) @(posedge clk);
      edge_dist(dst, per);
      chk(per == 64, "clk40 period");
      if (k == 0) d0 = dst;
      else begin
        chk(dst % 64 == ((d0 - 2 * k) % 64 + 64) % 64,
            $sformatf("phase step %0d: dst %0d", k, dst));
        n_phase++;
      end
    end
    // strobe pulses per period and clkto
    for (int i = 0; i < 8; i++) begin
      int cnt;
      rs = (i == 0) ? 8'b00000011 : 8'($urandom);
      repeat (200) @(posedge clk);
      @(posedge tclk);
      cnt = 0;
      for (int u = 0; u < 64; u++) begin
        @(posedge clk);
        #0.5;
        chk(clkto == tstr, "clkto follows the strobe");
      end
      begin
        int a;
        a = t;
        cnt = 0;
        fork
          begin : cntp
            forever begin @(posedge tstr); cnt++; end
          end
          #64;
        join_any
        disable cntp;
      end
      chk(cnt == popc(rs), $sformatf("rs=%b: %0d pulses", rs, cnt));
      n_strobe++;
    end
    cos = 0;
    repeat (20) begin #3; chk(clkto == tclk, "clkto is the 40 MHz clock"); end
    n_out++;
    // test_clk0: off-chip clocks
    tc0 = 1;
    repeat (100) begin #1.5; chk(clk40 == e40 && clk320 == e320, "test_clk0 passes off-chip clocks"); end
    n_tc0++;
    tc1 = 1;
    repeat (100) begin #1.5; chk(tstr == clk320 && tclk == clk40, "test_clk1 bypasses the generator"); end
    n_tc1++;
    chk(n_phase > 0 && n_strobe > 0 && n_tc0 > 0 && n_tc1 > 0 && n_out > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
