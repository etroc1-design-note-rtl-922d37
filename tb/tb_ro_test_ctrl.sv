// tb_ro_test_ctrl: checks the test pattern {10'b1010101010, cfg, counter},
// the counter advancing by one per clock from zero after reset, and the
// pass-through of the TDC word when test_ro=0.
module tb_ro_test_ctrl;
  import etroc1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, test_ro;
  logic [3:0] cfg;
  word_t din, dout;
  logic [15:0] exp_cnt;

  ro_test_ctrl dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .test_ro(test_ro), .din(din), .dout(dout));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    test_ro = 1; cfg = 4'hA; din = 30'h1234567;
    #12 rst_n = 1;
    exp_cnt = 0;
    @(negedge clk);
    for (int i = 0; i < 70000; i++) begin
      exp_cnt = exp_cnt + 1;  // one rising edge since the last check
      if (i % 1000 == 0) cfg = 4'($urandom);
      #1;
      chk(dout[29:20] == 10'b1010101010, "fixed MSBs");
      chk(dout[19:16] == cfg, "cfg field");
      chk(dout[15:0] == exp_cnt, $sformatf("counter %h exp %h", dout[15:0], exp_cnt));
      @(negedge clk);
    end
    test_ro = 0;
    for (int i = 0; i < 50; i++) begin
      din = 30'($urandom);
      #1 chk(dout == din, "pass-through with test_ro=0");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
