// tb_tdc_strobe_gen: aligned 40 MHz and 320 MHz clocks (scaled: 320 MHz
// period 8 units, 40 MHz period 64). For several select words, including
// the default 8'b00000011 and 8'b00000101, it samples the pulse output in
// the middle of the high and of the low half of every 320 MHz slot: it must
// be s[k] in the high half of slot k (slot 0 starts at the 40 MHz rising
// edge) and 0 in every low half. clk40_delay must equal clk40 delayed by
// one 40 MHz period plus half a 320 MHz period (68 units).
module tb_tdc_strobe_gen;
  int checks = 0, failures = 0;
  logic c40 = 0, c320 = 0, d40, pulse;
  logic [7:0] s;
  int t = 0;
  logic hist40 [int];

  tdc_strobe_gen dut (.clk40(c40), .clk320(c320), .s(s), .clk40_delay(d40), .clk320_pulse(pulse));

  always begin
    #1 t++;
    c320 = (t % 8) < 4;
    c40  = (t % 64) < 32;
    hist40[t] = c40;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #500000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] sel [6] = '{8'b00000011, 8'b00000101, 8'b10000000, 8'b11111111, 8'b00000000, 8'b01011010};
  initial begin
    for (int i = 0; i < 6 + 10; i++) begin
      s = (i < 6) ? sel[i] : 8'($urandom);
      // settle: one 40 MHz period, then check three periods
      wait (t % 64 == 63); #1;
      repeat (64) #1;
      for (int p = 0; p < 3; p++) begin
        for (int k = 0; k < 8; k++) begin
          #2;   // middle of the high half of slot k
          chk(pulse == s[k], $sformatf("s=%b slot %0d high half: pulse=%b", s, k, pulse));
          chk(d40 == hist40[t - 68], "clk40_delay");
          #4;   // middle of the low half
          chk(pulse == 1'b0, $sformatf("s=%b slot %0d low half", s, k));
          #2;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
