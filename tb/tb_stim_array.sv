// tb_stim_array: a reduced 2 x 3 array on its write bus. Checks that the
// token moves one site per clock while no pulse is due; that a write reaches
// only the addressed site; that each programmed site fires pulses of its own
// amplitude and phase lengths once per period; that no two sites ever drive
// current at the same time; and that when two sites are due together the
// second starts as soon as the first has passed the token on (two clocks
// after the first's last anodic clock).
module tb_stim_array;
  import inis1_pkg::*;
  localparam int R = 2, C = 3, N = R * C;
  localparam int P = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_req = 1'b0, wr_ack;
  logic [6:0] wr_addr = '0;
  reg_sel_e wr_reg = REG_AMP;
  logic [8:0] wr_data = '0;
  logic rep_tick = 1'b0;
  logic [7:0] dac_code [N];
  logic cath_en [N], anod_en [N];
  logic [N-1:0] have_token, due;

  int checks = 0, failures = 0, cyc = 0;
  int e_amp [N], e_dur [N], e_ipd [N];
  int c_len [N], g_len [N], a_len [N], pulses [N], last_end [N];
  bit in_p [N], was_a [N];
  int n_back_to_back = 0, n_idle_steps = 0, n_ticks = 0;
  int prev_tok = 0;

  stim_array #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .wr_req, .wr_addr, .wr_reg, .wr_data,
    .wr_ack, .rep_tick, .dac_code, .cath_en, .anod_en, .have_token, .due);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    rep_tick <= rst_n && (cyc % P == P - 1);
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  function automatic int tok_pos();
    for (int i = 0; i < N; i++) if (have_token[i]) return i;
    return -1;
  endfunction

  always @(negedge clk) if (rst_n) begin
    int n_active;
    n_active = 0;
    if (rep_tick) n_ticks++;
    for (int i = 0; i < N; i++) begin
      if (cath_en[i] || anod_en[i]) begin
        n_active++;
        checks++;
        if (int'(dac_code[i]) != e_amp[i]) fail($sformatf("site %0d dac %0d want %0d", i, dac_code[i], e_amp[i]));
      end
      if (cath_en[i] && !in_p[i]) begin
        in_p[i] = 1; c_len[i] = 0; g_len[i] = 0; a_len[i] = 0;
        for (int j = 0; j < N; j++)
          if (j != i && last_end[j] >= 0 && cyc - last_end[j] == 2) n_back_to_back++;
      end
      if (cath_en[i]) c_len[i]++;
      else if (anod_en[i]) a_len[i]++;
      else if (in_p[i] && !was_a[i]) g_len[i]++;
      if (was_a[i] && !anod_en[i]) begin
        in_p[i] = 0; pulses[i]++; last_end[i] = cyc - 1;
        checks++;
        if (c_len[i] != e_dur[i] || g_len[i] != e_ipd[i] || a_len[i] != e_dur[i])
          fail($sformatf("site %0d phases %0d/%0d/%0d want %0d/%0d/%0d", i, c_len[i], g_len[i], a_len[i],
                         e_dur[i], e_ipd[i], e_dur[i]));
      end
      was_a[i] = anod_en[i];
    end
    checks++;
    if (n_active > 1) fail("two sites driving current at once");
    checks++;
    if (!$onehot(have_token)) fail("token count is not one");
    // an idle token moves one site per clock
    if (n_active == 0 && !(|(have_token & due)) && tok_pos() >= 0 && prev_tok >= 0 &&
        !in_p[prev_tok]) begin
      if (tok_pos() != prev_tok) begin
        n_idle_steps++;
        checks++;
        if (tok_pos() != (prev_tok + 1) % N) fail("token skipped a site");
      end
    end
    prev_tok = tok_pos();
  end

  task automatic write_reg(input int site, input reg_sel_e r, input int v);
    int n = 0;
    @(negedge clk);
    wr_req = 1'b1; wr_addr = 7'(site); wr_reg = r; wr_data = 9'(v);
    @(negedge clk);
    while (!wr_ack && n < 5) begin n++; @(negedge clk); end
    checks++;
    if (!wr_ack) fail("no acknowledge");
    wr_req = 1'b0;
    @(negedge clk);
  endtask

  task automatic program_site(input int site, amp, dur, ipd, per);
    e_amp[site] = amp; e_dur[site] = dur; e_ipd[site] = ipd;
    write_reg(site, REG_AMP, amp);
    write_reg(site, REG_DUR, dur);
    write_reg(site, REG_IPD, ipd);
    write_reg(site, REG_REP, 9'h100 | per);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      e_amp[i] = 0; e_dur[i] = 0; e_ipd[i] = 0; pulses[i] = 0; last_end[i] = -100;
      in_p[i] = 0; was_a[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2 * N) @(negedge clk);
    // write only the amplitude of site 4: it must stay silent (not active)
    write_reg(4, REG_AMP, 99);
    program_site(1, 75, 20, 8, 1);
    program_site(2, 150, 11, 11, 1);
    program_site(5, 33, 3, 2, 2);
    repeat (12 * P) @(negedge clk);
    checks++;
    if (pulses[4] != 0 || pulses[0] != 0 || pulses[3] != 0) fail("an unprogrammed site fired");
    checks++;
    if (pulses[1] < 10 || pulses[2] < 10) fail($sformatf("sites 1/2 fired %0d/%0d times", pulses[1], pulses[2]));
    checks++;
    if (pulses[5] < 5 || pulses[5] > 6) fail($sformatf("site 5 fired %0d times in 12 ticks at period 2", pulses[5]));
    checks++;
    if (n_back_to_back < 5) fail($sformatf("only %0d back-to-back token hand-overs", n_back_to_back));
    checks++;
    if (n_idle_steps < 100) fail("token did not circulate");
    $display("pulses: %0d %0d %0d  back_to_back=%0d idle_steps=%0d", pulses[1], pulses[2], pulses[5],
             n_back_to_back, n_idle_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * P) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
