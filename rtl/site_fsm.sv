// site_fsm: internal controller of one stimulation site.
//
// It does two jobs, as on the published chip.
//
// Register writes: when the master FSM requests a write and this site is
// selected, the controller writes the register bank once and raises wr_ack,
// holding it until the request drops (a four-phase handshake). The master
// only moves to another site after seeing the acknowledge.
//
// Pulse timing: the repetition register's top bit switches the site on and
// its low 8 bits give the period in repetition ticks. When the repetition
// counter expires a pulse becomes due. When the token reaches a site with a
// pulse due, the site keeps the token (hold) and runs the biphasic sequence:
// cathodic phase of dur clocks, interphase gap of ipd clocks, anodic phase of
// dur clocks, then passes the token on in the last anodic clock. Without a
// pulse due the token leaves after one clock. Phases shorter than two clocks
// are stretched to two.
//
// Choices of this design, where the chip description is silent: amplitude and
// duration are latched when a pulse starts so both phases carry equal charge;
// a period of 0 counts as off; a due pulse not yet fired when the period
// expires again is fired once, not twice; the first pulse comes one full
// period after the site is switched on; a new period written while the site
// is on takes effect after the current period.
//
// Timing: dac_code is a register and cath_en / anod_en decode the Gray-coded
// phase register, so none of them glitches. With the token
// arriving at clock t and a pulse due, cathodic runs t+1..t+D, the gap
// t+D+1..t+D+I, anodic t+D+I+1..t+2D+I, and the next site holds the token at
// t+2D+I+1.
module site_fsm
  import inis1_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // write handshake
  input  logic               wr_req,
  input  logic               wr_sel,     // this site is addressed
  output logic               regs_we,
  output logic               wr_ack,
  // parameters and timebase
  input  site_params_t       params,
  input  logic               rep_tick,
  // token
  input  logic               have_token,
  output logic               hold,
  // phase timer
  output logic               ph_load,
  output logic [TIME_W-1:0]  ph_load_val,
  input  logic               ph_zero,
  // repetition counter
  output logic               rp_load,
  output logic [PER_W-1:0]   rp_load_val,
  output logic               rp_en,
  input  logic               rp_zero,
  // to the analog stimulation cell
  output logic [AMP_W-1:0]   dac_code,
  output logic               cath_en,
  output logic               anod_en,
  // status
  output phase_e             phase,
  output logic               due
);

  // ---------------- register write handshake ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_ack <= 1'b0;
    else        wr_ack <= wr_req & wr_sel;
  end

  assign regs_we = wr_req & wr_sel & ~wr_ack;

  // ---------------- repetition ----------------
  logic              active;
  logic              active_q;
  logic              expire;
  logic              start;
  logic              last_anod;
  logic [TIME_W-1:0] dur_q;

  assign active      = params.rep[REP_W-1] && (params.rep[PER_W-1:0] != '0);
  assign expire      = active && rep_tick && rp_zero;
  assign rp_en       = rep_tick;
  // reload while off and in the first clock on, so a new period starts
  // cleanly; a period changed while on takes effect at the next expiry
  assign rp_load     = !active || !active_q || expire;
  assign rp_load_val = params.rep[PER_W-1:0] - 1'b1;

  assign start     = (phase == PH_IDLE) && have_token && due;
  assign last_anod = (phase == PH_ANOD) && ph_zero;
  assign hold      = start || ((phase != PH_IDLE) && !last_anod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= 1'b0;
    else        active_q <= active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       due <= 1'b0;
    else if (expire)  due <= 1'b1;
    else if (!active) due <= 1'b0;
    else if (start)   due <= 1'b0;
  end

  // ---------------- pulse sequencer ----------------
  always_comb begin
    ph_load     = 1'b0;
    ph_load_val = '0;
    unique case (phase)
      PH_IDLE: if (start) begin
        ph_load     = 1'b1;
        ph_load_val = phase_len(params.dur) - 1'b1;
      end
      PH_CATH: if (ph_zero) begin
        ph_load     = 1'b1;
        ph_load_val = phase_len(params.ipd) - 1'b1;
      end
      PH_INTER: if (ph_zero) begin
        ph_load     = 1'b1;
        ph_load_val = dur_q - 1'b1;
      end
      PH_ANOD: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      dac_code <= '0;
      dur_q    <= TIME_W'(MIN_PHASE);
    end else begin
      unique case (phase)
        PH_IDLE: if (start) begin
          phase    <= PH_CATH;
          dac_code <= params.amp;
          dur_q    <= phase_len(params.dur);
        end
        PH_CATH:  if (ph_zero) phase <= PH_INTER;
        PH_INTER: if (ph_zero) phase <= PH_ANOD;
        PH_ANOD:  if (ph_zero) phase <= PH_IDLE;
      endcase
    end
  end

  assign cath_en = (phase == PH_CATH);
  assign anod_en = (phase == PH_ANOD);

  // The output stage must never source and sink at once.
  a_one_direction: assert property (@(posedge clk) disable iff (!rst_n)
    !(cath_en && anod_en));
  // A pulse runs only while this site holds the token.
  a_fire_with_token: assert property (@(posedge clk) disable iff (!rst_n)
    (phase != PH_IDLE) |-> have_token);
  // The acknowledge drops only after the request has.
  a_ack_four_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_ack && wr_req && wr_sel) |=> wr_ack);

endmodule
