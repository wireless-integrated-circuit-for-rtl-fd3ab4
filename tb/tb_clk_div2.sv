// tb_clk_div2: checks that the system clock is the carrier divided by two.
// A reference toggle is kept in the testbench; after reset the divided clock
// must match it after every carrier edge, and it must stay low in reset.
module tb_clk_div2;
  logic coil_clk = 1'b0, rst_n = 1'b0, sys_clk;
  logic ref_clk;
  int checks = 0, failures = 0;
  int rises = 0;

  clk_div2 dut (.coil_clk, .rst_n, .sys_clk);

  always #181 coil_clk = ~coil_clk;   // 2.765 MHz carrier, 1 ns units

  always @(posedge sys_clk) rises++;

  initial begin
    repeat (3) @(posedge coil_clk);
    #10;
    checks++; if (sys_clk !== 1'b0) begin failures++; $display("FAIL: sys_clk not low in reset"); end
    rst_n = 1'b1;
    ref_clk = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(posedge coil_clk);
      ref_clk = ~ref_clk;
      #5;
      checks++;
      if (sys_clk !== ref_clk) begin failures++; $display("FAIL: edge %0d sys_clk=%b want %b", i, sys_clk, ref_clk); end
    end
    checks++;
    if (rises != 100) begin failures++; $display("FAIL: %0d sys_clk rises in 200 carrier cycles", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
