// stim_site: digital part of one stimulation site.
//
// A site holds its own pulse parameters and times its own biphasic pulses,
// as on the published chip: a register bank (site_regs), an internal FSM
// (site_fsm), a token cell (token_cell) and a counter (site_counter, used
// once as the phase timer and once, clocked by the shared repetition tick,
// as the repetition counter). The DAC, output stage and charge-recovery
// amplifier it drives are analog; this block brings out their controls.
//
// Interface: a write bus shared by all sites (wr_req, wr_sel_site high when
// this site is addressed, wr_reg, wr_data) with a per-site acknowledge; the
// token ring (token_in from the previous site, token_out to the next); the
// repetition tick; dac_code, cath_en and anod_en to the analog cell. Timing
// is that of site_fsm.
module stim_site
  import inis1_pkg::*;
#(
  parameter bit INIT_TOKEN = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_req,
  input  logic               wr_sel_site,
  input  reg_sel_e           wr_reg,
  input  logic [TIME_W-1:0]  wr_data,
  output logic               wr_ack,
  input  logic               rep_tick,
  input  logic               token_in,
  output logic               token_out,
  output logic [AMP_W-1:0]   dac_code,
  output logic               cath_en,
  output logic               anod_en,
  output logic               have_token,
  output logic               due
);

  site_params_t      params;
  logic              regs_we;
  logic              hold;
  logic              ph_load, ph_zero;
  logic [TIME_W-1:0] ph_load_val, ph_count;
  logic              rp_load, rp_en, rp_zero;
  logic [PER_W-1:0]  rp_load_val, rp_count;
  phase_e            phase;

  site_regs u_regs (
    .clk, .rst_n,
    .we     (regs_we),
    .sel    (wr_reg),
    .wdata  (wr_data),
    .params (params)
  );

  site_fsm u_fsm (
    .clk, .rst_n,
    .wr_req, .wr_sel (wr_sel_site), .regs_we, .wr_ack,
    .params, .rep_tick,
    .have_token, .hold,
    .ph_load, .ph_load_val, .ph_zero,
    .rp_load, .rp_load_val, .rp_en, .rp_zero,
    .dac_code, .cath_en, .anod_en,
    .phase, .due
  );

  token_cell #(.INIT_TOKEN(INIT_TOKEN)) u_token (
    .clk, .rst_n,
    .token_in, .hold, .have_token, .token_out
  );

  site_counter #(.W(TIME_W)) u_phase_cnt (
    .clk, .rst_n,
    .load (ph_load), .load_val (ph_load_val), .en (1'b1),
    .count (ph_count), .zero (ph_zero)
  );

  site_counter #(.W(PER_W)) u_rep_cnt (
    .clk, .rst_n,
    .load (rp_load), .load_val (rp_load_val), .en (rp_en),
    .count (rp_count), .zero (rp_zero)
  );

endmodule
