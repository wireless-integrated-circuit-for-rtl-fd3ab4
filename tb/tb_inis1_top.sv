// tb_inis1_top: the whole stimulator core at its default size (100 sites,
// repetition tick of 8192 system clocks), driven from the carrier and the
// command bit stream only.
//
// It reproduces the bench set-up of two electrodes programmed differently:
// site 1 at 75 uA, 370 us phases (511 clocks) and a 30 us gap (41 clocks),
// period 2 ticks (84 Hz); site 2 at 150 uA, 200 us phases and gap (276
// clocks), period 1 tick (168 Hz). Site 99 is set to the shortest phases
// (register values 1 and 0, stretched to 2 clocks) and later switched off,
// and one command addresses a site that does not exist.
//
// Checked: system clock = carrier / 2; each pulse's amplitude code and
// cathodic / gap / anodic lengths; no two sites drive current at once;
// pulse counts over the run; site 2 starting two clocks after site 1 ends
// when both are due.
// A behavioural model of the analog cell turns each programmed site's
// outputs into electrode current: the peak must equal the programmed
// amplitude in uA and each pulse's net charge must be zero.
// Counted, each of which must happen at least once:
// command write, dropped bad-address command, token passed by an idle site,
// token held through a pulse, back-to-back hand-over, pulse waiting for the
// token, minimum-phase stretch, site switched off.
module tb_inis1_top;
  import inis1_pkg::*;
  localparam int N = 100;
  localparam int TICK = 8192;

  logic coil_clk = 1'b0, por_n = 1'b1, cmd_bit = 1'b0, cmd_strobe = 1'b0;
  logic sys_clk;
  logic [7:0] dac_code [N];
  logic cath_en [N], anod_en [N];
  logic [N-1:0] have_token, pulse_due;
  logic cmd_busy, cmd_error, cmd_done;

  inis1_top dut (.coil_clk, .por_n, .cmd_bit, .cmd_strobe, .sys_clk, .dac_code, .cath_en,
                 .anod_en, .have_token, .pulse_due, .cmd_busy, .cmd_error, .cmd_done);

  always #181 coil_clk = ~coil_clk;   // 2.765 MHz, 1 ns units

  // analog cells of the three programmed sites
  real i_ua [3];
  localparam int MS [3] = '{1, 2, 99};
  for (genvar k = 0; k < 3; k++) begin : g_cell
    stim_cell_model u_cell (.dac_code (dac_code[MS[k]]), .cath_en (cath_en[MS[k]]),
                            .anod_en (anod_en[MS[k]]), .i_elec_ua (i_ua[k]));
  end
  real q_pc [3];        // net charge of the pulse in progress, in pC
  real peak_ua [3];
  int  m_balanced = 0;

  int checks = 0, failures = 0, cyc = 0;
  int e_amp [N], e_dur [N], e_ipd [N];
  int c_len [N], g_len [N], a_len [N], pulses [N], last_end [N];
  bit in_p [N], was_a [N];
  bit in_p_prev [3] = '{0, 0, 0};
  // mechanism counters
  int m_write = 0, m_bad_addr = 0, m_idle_pass = 0, m_hold = 0, m_back_to_back = 0;
  int m_wait_token = 0, m_min_phase = 0, m_switched_off = 0;
  int coil_edges = 0, sys_edges = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(posedge coil_clk) coil_edges++;
  always @(posedge sys_clk) begin
    sys_edges++;
    cyc <= cyc + 1;
    if (cmd_done) m_write++;
    if (cmd_error) m_bad_addr++;
  end

  bit run = 1'b0;   // set once reset has been released

  always @(negedge sys_clk) if (run) begin
    int n_active;
    n_active = 0;
    for (int i = 0; i < N; i++) begin
      if (cath_en[i] || anod_en[i]) begin
        n_active++;
        checks++;
        if (int'(dac_code[i]) != e_amp[i]) fail($sformatf("site %0d dac %0d want %0d", i, dac_code[i], e_amp[i]));
        if (!have_token[i]) fail($sformatf("site %0d fires without the token", i));
        m_hold++;
      end
      if (pulse_due[i] && !have_token[i]) m_wait_token++;
      if (have_token[i] && !pulse_due[i] && !in_p[i] && !cath_en[i]) m_idle_pass++;
      if (cath_en[i] && !in_p[i]) begin
        in_p[i] = 1; c_len[i] = 0; g_len[i] = 0; a_len[i] = 0;
        for (int j = 0; j < N; j++)
          if (j != i && cyc - last_end[j] == 2) m_back_to_back++;
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
        if (c_len[i] == MIN_PHASE && e_dur[i] == MIN_PHASE) m_min_phase++;
      end
      was_a[i] = anod_en[i];
    end
    checks++;
    if (n_active > 1) fail("two sites driving current at once");
    // electrode current and charge balance, 725 ns per clock
    for (int k = 0; k < 3; k++) begin
      int i;
      i = MS[k];
      if (cath_en[i] && !in_p_prev[k]) begin q_pc[k] = 0.0; peak_ua[k] = 0.0; end
      q_pc[k] += i_ua[k] * 0.725;
      if (-i_ua[k] > peak_ua[k]) peak_ua[k] = -i_ua[k];
      if (in_p_prev[k] && !in_p[i]) begin
        checks++;
        if (peak_ua[k] < real'(e_amp[i]) - 0.01 || peak_ua[k] > real'(e_amp[i]) + 0.01)
          fail($sformatf("site %0d peak %f uA want %0d", i, peak_ua[k], e_amp[i]));
        checks++;
        if (q_pc[k] > 0.001 || q_pc[k] < -0.001) fail($sformatf("site %0d net charge %f pC", i, q_pc[k]));
        else m_balanced++;
      end
      in_p_prev[k] = in_p[i];
    end
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

  task automatic program_site(input int site, amp, dur, ipd, per);
    e_amp[site] = amp;
    e_dur[site] = (dur < MIN_PHASE) ? MIN_PHASE : dur;
    e_ipd[site] = (ipd < MIN_PHASE) ? MIN_PHASE : ipd;
    command(site, REG_AMP, amp);
    command(site, REG_DUR, dur);
    command(site, REG_IPD, ipd);
    command(site, REG_REP, 9'h100 | per);
  endtask

  initial begin
    int p1, p2, p99;
    for (int i = 0; i < N; i++) begin
      e_amp[i] = 0; e_dur[i] = 0; e_ipd[i] = 0; pulses[i] = 0; last_end[i] = -100;
      in_p[i] = 0; was_a[i] = 0;
    end
    // a falling edge on the asynchronous reset, as at power-up
    #10 por_n = 1'b0;
    #2000 por_n = 1'b1;
    repeat (10) @(negedge sys_clk);
    run = 1'b1;
    // clock recovery: two carrier periods per system clock
    coil_edges = 0; sys_edges = 0;
    repeat (100) @(posedge sys_clk);
    checks++;
    if (coil_edges < 199 || coil_edges > 201) fail($sformatf("%0d carrier edges per 100 system clocks", coil_edges));

    program_site(1, 75, 511, 41, 2);
    program_site(2, 150, 276, 276, 1);
    program_site(99, 200, 1, 0, 3);
    command(120, REG_AMP, 5);                  // no such site
    checks++;
    if (m_write != 12) fail($sformatf("%0d writes completed, want 12", m_write));

    // run for 12 ticks
    repeat (12 * TICK) @(negedge sys_clk);
    p1 = pulses[1]; p2 = pulses[2]; p99 = pulses[99];
    checks++;
    if (p1 < 5 || p1 > 6) fail($sformatf("site 1 fired %0d times in 12 ticks at period 2", p1));
    checks++;
    if (p2 < 11 || p2 > 12) fail($sformatf("site 2 fired %0d times in 12 ticks at period 1", p2));
    checks++;
    if (p99 < 3 || p99 > 4) fail($sformatf("site 99 fired %0d times in 12 ticks at period 3", p99));
    for (int i = 0; i < N; i++)
      if (i != 1 && i != 2 && i != 99 && pulses[i] != 0) fail($sformatf("site %0d fired unprogrammed", i));

    // switch site 99 off
    command(99, REG_REP, 3);
    p99 = pulses[99];
    repeat (8 * TICK) @(negedge sys_clk);
    checks++;
    if (pulses[99] != p99) fail("site 99 fired after being switched off");
    else m_switched_off++;

    $display("pulses: site1=%0d site2=%0d site99=%0d", pulses[1], pulses[2], pulses[99]);
    $display("mechanisms: write=%0d bad_addr=%0d idle_pass=%0d hold=%0d back_to_back=%0d wait_token=%0d min_phase=%0d switched_off=%0d balanced=%0d",
             m_write, m_bad_addr, m_idle_pass, m_hold, m_back_to_back, m_wait_token, m_min_phase, m_switched_off, m_balanced);
    checks++; if (m_write == 0)        fail("no command write");
    checks++; if (m_bad_addr == 0)     fail("no bad-address command dropped");
    checks++; if (m_idle_pass == 0)    fail("no idle token pass");
    checks++; if (m_hold == 0)         fail("no token held through a pulse");
    checks++; if (m_back_to_back == 0) fail("no back-to-back hand-over");
    checks++; if (m_wait_token == 0)   fail("no pulse waited for the token");
    checks++; if (m_min_phase == 0)    fail("no minimum-phase pulse");
    checks++; if (m_switched_off == 0) fail("no site switched off");
    checks++; if (m_balanced == 0)     fail("no charge-balanced pulse measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd362 * 64'd2 * 64'd25 * TICK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
