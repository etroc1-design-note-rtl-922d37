// tb_phase_shifter_coarse: for every coarse setting d = 0..31, measures
// the number of 1.28 GHz cycles from the rising edge of the synchronized
// 40 MHz input to the next rising edge of clk40_out, and checks it against
// 2 + ((16 - d) mod 32): two cycles to sample the input and load the
// counter, then the counter reaching 16. So each step of d moves the output
// by exactly one 781.25 ps period. Also checks the output periods (32 and
// 4 cycles) and that clk320_out rises with clk40_out.
module tb_phase_shifter_coarse;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0, c40, c320;
  logic [4:0] d = 0;
  int n = 0, t_sync = 0, last40 = -1;
  logic p40 = 0, p320 = 0;
  int meas = -1;

  phase_shifter_coarse dut (.clk1g28(clk), .rst_n(rst_n), .sync_ck40(sync), .delay(d),
                            .clk40_out(c40), .clk320_out(c320));

  always #1 clk = ~clk;
  // synchronized 40 MHz input: rises at n % 32 == 0
  always @(posedge clk) begin
    n <= n + 1;
    sync <= ((n + 1) % 32) < 16;
    if ((n + 1) % 32 == 0) t_sync <= n + 1;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (c40 && !p40) begin
      meas = (n - t_sync) % 32;
      chk(c320 && !p320, "clk320_out rises with clk40_out");
      last40 = n;
    end
    p40 = c40; p320 = c320;
  end

  initial begin
    #5 rst_n = 1;
    for (int k = 0; k < 32; k++) begin
      d = 5'(k);
      repeat (32 * 4) @(posedge clk);
      meas = -1;
      repeat (40) @(posedge clk);
      chk(meas == (2 + ((16 - k) % 32 + 32) % 32) % 32,
          $sformatf("d=%0d: clk40 edge %0d cycles after sync, exp %0d", k, meas,
                    (2 + ((16 - k) % 32 + 32) % 32) % 32));
      // period check over a few cycles
      begin
        int e0, e1;
        @(posedge c40); e0 = n;
        @(posedge c40); e1 = n;
        chk(e1 - e0 == 32, "clk40_out period 32");
        @(posedge c320); e0 = n;
        @(posedge c320); e1 = n;
        chk(e1 - e0 == 4, "clk320_out period 4");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
