// tb_site_counter: random load / enable traffic against a reference count.
module tb_site_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, en = 1'b0;
  logic [8:0] load_val = '0, count;
  logic zero;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  site_counter #(.W(9)) dut (.clk, .rst_n, .load, .load_val, .en, .count, .zero);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (count !== 9'(ref_cnt) || zero !== (ref_cnt == 0)) begin
        failures++;
        $display("FAIL: step %0d count=%0d zero=%b want %0d", i, count, zero, ref_cnt);
      end
      load     = ($urandom_range(0, 15) == 0);
      en       = ($urandom_range(0, 3) != 0);
      load_val = 9'($urandom_range(0, 511));
      @(posedge clk);
      if (load)                   ref_cnt = load_val;
      else if (en && ref_cnt > 0) ref_cnt = ref_cnt - 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
