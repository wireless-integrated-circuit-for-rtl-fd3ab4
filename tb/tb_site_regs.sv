// tb_site_regs: random register writes against a reference copy of the
// four parameter registers; checks reset values and field widths.
module tb_site_regs;
  import inis1_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0;
  reg_sel_e sel = REG_AMP;
  logic [8:0] wdata = '0;
  site_params_t params;
  int checks = 0, failures = 0;
  int r_amp = 0, r_dur = 0, r_ipd = 0, r_rep = 0;

  site_regs dut (.clk, .rst_n, .we, .sel, .wdata, .params);

  always #5 clk = ~clk;

  task automatic compare(input int step);
    checks++;
    if (params.amp !== 8'(r_amp) || params.dur !== 9'(r_dur) ||
        params.ipd !== 9'(r_ipd) || params.rep !== 9'(r_rep)) begin
      failures++;
      $display("FAIL: step %0d amp=%0d dur=%0d ipd=%0d rep=%0d want %0d %0d %0d %0d", step,
               params.amp, params.dur, params.ipd, params.rep, r_amp, r_dur, r_ipd, r_rep);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    compare(-1);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      compare(i);
      we    = ($urandom_range(0, 1) == 1);
      sel   = reg_sel_e'($urandom_range(0, 3));
      wdata = 9'($urandom_range(0, 511));
      @(posedge clk);
      if (we) case (sel)
        REG_AMP: r_amp = wdata & 9'hFF;
        REG_DUR: r_dur = wdata;
        REG_IPD: r_ipd = wdata;
        REG_REP: r_rep = wdata;
      endcase
    end
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
