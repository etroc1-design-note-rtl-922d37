// tb_clk_divider: checks that clk40 has a period of 32 input clocks and a
// 50% duty cycle, that clk320 has a period of 4, and that every clk40
// rising edge coincides with a clk320 rising edge. Time is scaled: one
// 1.28 GHz period is 2 units.
module tb_clk_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clk40, clk320;
  int n = 0, last40 = -1, last320 = -1, high40 = 0;
  logic p40 = 0, p320 = 0;

  clk_divider dut (.clk1g28(clk), .rst_n(rst_n), .clk40(clk40), .clk320(clk320));

  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    n++;
    if (clk40) high40++;
    if (clk40 && !p40) begin
      if (last40 >= 0) begin
        chk(n - last40 == 32, $sformatf("clk40 period %0d", n - last40));
        chk(high40 == 16 + 1 || high40 == 16, "clk40 duty");
      end
      chk(clk320 && !p320, "clk40 edge aligned with clk320 edge");
      last40 = n; high40 = 1;
    end
    if (clk320 && !p320) begin
      if (last320 >= 0 && n > 40) chk(n - last320 == 4, "clk320 period");
      last320 = n;
    end
    p40 = clk40; p320 = clk320;
  end

  initial begin
    #5 rst_n = 1;
    #20000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
