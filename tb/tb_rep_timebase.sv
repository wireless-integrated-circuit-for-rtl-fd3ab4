// tb_rep_timebase: checks the repetition tick spacing, both at a small
// prescale and at the default of 8192 clocks (5.94 ms at 1.38 MHz). The
// first tick may come one clock late, as the count starts with reset released.
module tb_rep_timebase;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_s, tick_d;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_s, last_d, n_s = 0, n_d = 0;

  rep_timebase #(.PRESCALE(7)) dut_s (.clk, .rst_n, .tick (tick_s));
  rep_timebase                 dut_d (.clk, .rst_n, .tick (tick_d));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick_s) begin
      checks++;
      if ((n_s == 0) ? (cyc > 8) : (cyc - last_s != 7)) begin failures++; $display("FAIL: small tick at %0d", cyc); end
      last_s = cyc; n_s++;
    end
    if (tick_d) begin
      checks++;
      if ((n_d == 0) ? (cyc > 8193) : (cyc - last_d != 8192)) begin failures++; $display("FAIL: default tick at %0d", cyc); end
      last_d = cyc; n_d++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (8192 * 3 + 10) @(posedge clk);
    checks++; if (n_d != 3) begin failures++; $display("FAIL: %0d default ticks", n_d); end
    checks++; if (n_s != (8192 * 3 + 10) / 7) begin failures++; $display("FAIL: %0d small ticks", n_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
