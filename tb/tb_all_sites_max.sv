// tb_all_sites_max: the worst case the token ring is there for. All 100
// sites are programmed with the longest phases (511 clocks = 370 us) and
// gap (511 clocks) and a one-tick period, so every site always has a pulse
// due and the token alone sets the pace. Each site then holds the token for
// 1 + 2 x 511 + 511 = 1534 clocks and the ring takes 153400 clocks
// (111 ms at 1.38 MHz): about 9 pulses per second per electrode.
//
// Checked: no two sites ever drive current at once; every site fires; in
// steady state each site's pulses start exactly 153400 clocks apart; each
// pulse has the programmed phase lengths.
module tb_all_sites_max;
  import inis1_pkg::*;
  localparam int N = 100;
  localparam int D = 511, I = 511;
  localparam int ROUND = N * (1 + 2 * D + I);

  logic coil_clk = 1'b0, por_n = 1'b1, cmd_bit = 1'b0, cmd_strobe = 1'b0;
  logic sys_clk;
  logic [7:0] dac_code [N];
  logic cath_en [N], anod_en [N];
  logic [N-1:0] have_token, pulse_due;
  logic cmd_busy, cmd_error, cmd_done;

  inis1_top dut (.coil_clk, .por_n, .cmd_bit, .cmd_strobe, .sys_clk, .dac_code, .cath_en,
                 .anod_en, .have_token, .pulse_due, .cmd_busy, .cmd_error, .cmd_done);

  always #181 coil_clk = ~coil_clk;

  int checks = 0, failures = 0, cyc = 0;
  int last_start [N], pulses [N], c_len [N], good_intervals = 0;
  bit was_c [N];
  bit run = 1'b0, steady = 1'b0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(posedge sys_clk) cyc <= cyc + 1;

  always @(negedge sys_clk) if (run) begin
    int n_active;
    n_active = 0;
    for (int i = 0; i < N; i++) begin
      if (cath_en[i] || anod_en[i]) n_active++;
      if (cath_en[i]) c_len[i]++;
      if (cath_en[i] && !was_c[i]) begin
        if (steady && last_start[i] >= 0) begin
          checks++;
          if (cyc - last_start[i] != ROUND) fail($sformatf("site %0d interval %0d want %0d", i, cyc - last_start[i], ROUND));
          else good_intervals++;
        end
        last_start[i] = cyc;
        c_len[i] = 1;
      end
      if (!cath_en[i] && was_c[i]) begin
        pulses[i]++;
        checks++;
        if (c_len[i] != D) fail($sformatf("site %0d cathodic %0d clocks", i, c_len[i]));
      end
      was_c[i] = cath_en[i];
    end
    checks++;
    if (n_active > 1) fail("two sites driving current at once");
  end

  task automatic send_bit(input logic b);
    @(negedge sys_clk);
    cmd_bit = b; cmd_strobe = 1'b1;
    @(negedge sys_clk);
    cmd_strobe = 1'b0; cmd_bit = 1'b0;
  endtask

  task automatic command(input int site, input reg_sel_e r, input int v);
    logic [17:0] w;
    w = {7'(site), 2'(r), 9'(v)};
    send_bit(1'b1);
    for (int i = 17; i >= 0; i--) send_bit(w[i]);
    repeat (6) @(negedge sys_clk);
  endtask

  initial begin
    int all;
    longint rate10;   // pulses per 100 s
    for (int i = 0; i < N; i++) begin last_start[i] = -1; pulses[i] = 0; c_len[i] = 0; was_c[i] = 0; end
    #10 por_n = 1'b0;
    #2000 por_n = 1'b1;
    repeat (10) @(negedge sys_clk);
    run = 1'b1;
    for (int s = 0; s < N; s++) begin
      command(s, REG_AMP, 100);
      command(s, REG_DUR, D);
      command(s, REG_IPD, I);
      command(s, REG_REP, 9'h101);
    end
    // one full round for every site to become due, then measure
    repeat (ROUND + 2 * 8192) @(negedge sys_clk);
    steady = 1'b1;
    repeat (2 * ROUND + 100) @(negedge sys_clk);
    all = 0;
    for (int i = 0; i < N; i++) if (pulses[i] > 0) all++;
    checks++;
    if (all != N) fail($sformatf("only %0d sites fired", all));
    checks++;
    if (good_intervals < N) fail($sformatf("only %0d steady-state intervals measured", good_intervals));
    rate10 = 64'd100_000_000_000 / (longint'(ROUND) * 725);
    checks++;
    if (rate10 < 890 || rate10 > 910) fail($sformatf("rate %0d per 100 s, want about 900", rate10));
    $display("round = %0d clocks = %0d ms; rate per electrode = %0d.%02d pulses/s", ROUND,
             ROUND * 725 / 1000000, rate10 / 100, rate10 % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd362 * 64'd2 * 64'd700000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
