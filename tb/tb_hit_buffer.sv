// tb_hit_buffer: fills the 256 x 30 buffer with random words, reads every
// address back through the asynchronous port (oe=1) and checks that oe=0
// gives zero. Reference: a copy of the written words kept by the bench.
module tb_hit_buffer;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic we, oe;
  logic [7:0] addr;
  logic [29:0] din, dout;
  logic [29:0] ref_mem [256];

  hit_buffer dut (.clk(clk), .we(we), .addr(addr), .din(din), .oe(oe), .dout(dout));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; oe = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      we = 1; addr = 8'(a); din = 30'($urandom);
      ref_mem[a] = din;
      @(negedge clk);
    end
    // overwrite a few words; with we=0 nothing changes
    for (int k = 0; k < 20; k++) begin
      int a = $urandom_range(0, 255);
      we = 1; addr = 8'(a); din = 30'($urandom);
      ref_mem[a] = din;
      @(negedge clk);
      we = 0; din = ~din;
      @(negedge clk);
    end
    we = 0;
    for (int a = 255; a >= 0; a--) begin
      addr = 8'(a); oe = 1;
      #1 chk(dout == ref_mem[a], $sformatf("read addr %0d got %h exp %h", a, dout, ref_mem[a]));
      oe = 0;
      #1 chk(dout == '0, "oe=0 must give zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
