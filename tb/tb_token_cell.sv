// tb_token_cell: a token arriving at an idle cell must leave after one
// clock; a held token must stay until hold drops and then leave at once.
// Random traffic is compared with the rule
//   have(t+1) = token_in(t) | (have(t) & hold(t)),  out = have & ~hold.
module tb_token_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic token_in = 1'b0, hold = 1'b0;
  logic have0, out0, have1, out1;
  int checks = 0, failures = 0;
  bit ref_have = 1'b0;
  int passes = 0, holds = 0;

  token_cell                   dut  (.clk, .rst_n, .token_in, .hold, .have_token (have0), .token_out (out0));
  token_cell #(.INIT_TOKEN(1)) dut1 (.clk, .rst_n, .token_in (1'b0), .hold (1'b0), .have_token (have1), .token_out (out1));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (have0 !== 1'b0 || have1 !== 1'b1 || out1 !== 1'b1) begin failures++; $display("FAIL: reset token"); end
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (have1 !== 1'b0) begin failures++; $display("FAIL: initial token did not leave"); end
    for (int i = 0; i < 3000; i++) begin
      token_in = !ref_have && ($urandom_range(0, 2) == 0);
      hold     = ref_have && ($urandom_range(0, 1) == 0);
      #1;
      checks++;
      if (have0 !== ref_have || out0 !== (ref_have && !hold)) begin
        failures++; $display("FAIL: step %0d have=%b out=%b want %b", i, have0, out0, ref_have);
      end
      if (out0) passes++;
      if (ref_have && hold) holds++;
      @(posedge clk);
      ref_have = token_in | (ref_have & hold);
      @(negedge clk);
    end
    checks++; if (passes < 100 || holds < 100) begin failures++; $display("FAIL: too little traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
