// tb_site_fsm: the internal controller of a site, wired in the testbench to
// a register bank, a token cell and two counters as in a site, and driven
// through the write handshake. Besides the pulse checks below it counts the
// register-write strobes: exactly one per selected request. The site sits
// in a ring that the testbench closes through RING-1 idle stages (the
// token returns RING clocks after it leaves, as with RING-1 idle sites).
// Checks the write handshake, the cathodic / gap / anodic lengths, the
// latched DAC code, the two-clock minimum phase, the repetition period
// (a multiple of the tick period, late by at most the token's trip round
// the ring), switching the site off, and that a write to another site
// changes nothing.
module tb_site_fsm;
  import inis1_pkg::*;
  localparam int P    = 64;   // clocks per repetition tick
  localparam int RING = 10;   // sites in the modelled ring

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_req = 1'b0, wr_sel_site = 1'b0;
  reg_sel_e wr_reg = REG_AMP;
  logic [8:0] wr_data = '0;
  logic wr_ack, rep_tick = 1'b0, token_in, token_out;
  logic [7:0] dac_code;
  logic cath_en, anod_en, have_token, due;
  logic [RING-2:0] ring = '0;

  int checks = 0, failures = 0, cyc = 0;
  // expected pulse
  int e_amp, e_c, e_g, e_a;
  // monitor
  int c_len = 0, g_len = 0, a_len = 0, pulses = 0, last_start = -1, period_err = 0;
  int e_period = 0;
  bit in_pulse = 0, was_a = 0;

  site_params_t      params;
  logic              regs_we, hold, ph_load, ph_zero, rp_load, rp_en, rp_zero;
  logic [8:0]        ph_load_val, ph_count;
  logic [7:0]        rp_load_val, rp_count;
  phase_e            phase;
  int                n_we = 0;

  site_regs u_regs (.clk, .rst_n, .we (regs_we), .sel (wr_reg), .wdata (wr_data), .params);
  token_cell u_tok (.clk, .rst_n, .token_in, .hold, .have_token, .token_out);
  site_counter #(.W(9)) u_ph (.clk, .rst_n, .load (ph_load), .load_val (ph_load_val), .en (1'b1),
                              .count (ph_count), .zero (ph_zero));
  site_counter #(.W(8)) u_rp (.clk, .rst_n, .load (rp_load), .load_val (rp_load_val), .en (rp_en),
                              .count (rp_count), .zero (rp_zero));

  site_fsm dut (.clk, .rst_n, .wr_req, .wr_sel (wr_sel_site), .regs_we, .wr_ack,
                .params, .rep_tick, .have_token, .hold,
                .ph_load, .ph_load_val, .ph_zero,
                .rp_load, .rp_load_val, .rp_en, .rp_zero,
                .dac_code, .cath_en, .anod_en, .phase, .due);

  always @(posedge clk) if (regs_we) n_we++;

  always #5 clk = ~clk;

  // rest of the ring: RING-1 one-clock stages
  assign token_in = ring[RING-2];
  always_ff @(posedge clk) ring <= {ring[RING-3:0], token_out};

  // site 0 of a real ring starts with the token; here the site under test does not,
  // so inject one token after reset
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    rep_tick <= rst_n && (cyc % P == P - 1);
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (cath_en || anod_en) begin
      checks++;
      if (dac_code !== 8'(e_amp)) fail($sformatf("dac_code %0d want %0d", dac_code, e_amp));
      checks++;
      if (!have_token) fail("firing without the token");
    end
    if (cath_en && !in_pulse) begin
      in_pulse = 1; c_len = 0; g_len = 0; a_len = 0;
      if (last_start >= 0 && e_period > 0) begin
        checks++;
        if (cyc - last_start < e_period - RING || cyc - last_start > e_period + RING) begin
          period_err++; fail($sformatf("pulse interval %0d want %0d +- %0d", cyc - last_start, e_period, RING));
        end
      end
      last_start = cyc;
    end
    if (cath_en) c_len++;
    else if (anod_en) a_len++;
    else if (in_pulse && !was_a) g_len++;
    if (was_a && !anod_en) begin
      in_pulse = 0; pulses++;
      checks++;
      if (c_len != e_c || g_len != e_g || a_len != e_a)
        fail($sformatf("phases %0d/%0d/%0d want %0d/%0d/%0d", c_len, g_len, a_len, e_c, e_g, e_a));
    end
    was_a = anod_en;
  end

  task automatic write_reg(input reg_sel_e r, input int v, input bit sel = 1'b1);
    int n = 0;
    int we0 = n_we;
    @(negedge clk);
    wr_req = 1'b1; wr_sel_site = sel; wr_reg = r; wr_data = 9'(v);
    @(negedge clk);
    while (!wr_ack && n < 5) begin n++; @(negedge clk); end
    checks++;
    if (sel && (n != 0 || !wr_ack)) fail("no acknowledge one clock after the request");
    if (!sel && wr_ack) fail("acknowledge from an unselected site");
    wr_req = 1'b0; wr_sel_site = 1'b0;
    @(negedge clk);
    checks++;
    if (wr_ack) fail("acknowledge did not drop after the request");
    checks++;
    if (n_we - we0 != (sel ? 1 : 0)) fail($sformatf("%0d register writes for one request", n_we - we0));
    checks++;
    if (sel && r == REG_AMP && params.amp !== 8'(v)) fail("amplitude not stored");
  endtask

  task automatic program_site(input int amp, dur, ipd, rep);
    write_reg(REG_AMP, amp);
    write_reg(REG_DUR, dur);
    write_reg(REG_IPD, ipd);
    write_reg(REG_REP, rep);
  endtask

  task automatic wait_pulses(input int n);
    int start = pulses;
    int guard = 0;
    while (pulses < start + n && guard < 20 * P * 8) begin @(negedge clk); guard++; end
    checks++;
    if (pulses < start + n) fail("expected pulses did not come");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // inject the token into the ring
    @(negedge clk); force token_in = 1'b1; @(negedge clk); release token_in;

    // A: 75 uA, 12 / 5 / 12 clocks, period 3 ticks
    e_amp = 75; e_c = 12; e_g = 5; e_a = 12; e_period = 3 * P;
    program_site(75, 12, 5, 9'h100 | 3);
    wait_pulses(4);

    // B: minimum phase lengths: 1 and 0 act as 2
    @(negedge clk); wait (!in_pulse);
    e_amp = 200; e_c = 2; e_g = 2; e_a = 2; e_period = 0; last_start = -1;
    program_site(200, 1, 0, 9'h100 | 1);
    e_period = P;
    wait_pulses(3);

    // C: a write to another site changes nothing
    write_reg(REG_AMP, 9, 1'b0);
    wait_pulses(2);

    // D: switched off: no more pulses
    write_reg(REG_REP, 1);
    begin
      int p0;
      repeat (2 * P) @(negedge clk);
      p0 = pulses;
      repeat (5 * P) @(negedge clk);
      checks++;
      if (pulses != p0) fail("pulses while switched off");
      checks++;
      if (due) fail("pulse due while switched off");
    end
    $display("pulses=%0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc >= 40 * P);
    failures++;
    $display("FAIL: watchdog cyc=%0d t=%0t", cyc, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
