// inis1_top: digital core of a wireless 100-channel neural stimulator.
//
// The chip drives 100 electrodes (a 10 x 10 array at the pitch of a
// penetrating electrode array) with biphasic constant-current pulses, each
// electrode with its own amplitude, phase duration, interphase delay and
// repetition rate. Power, clock and commands all arrive over one 2.765 MHz
// inductive link: the carrier divided by two is the 1.38 MHz system clock,
// and amplitude-shift keying of the carrier carries the commands. A master
// FSM decodes each command and writes one register of one site; from then on
// each site times its own pulses. A token circulating through the sites lets
// only one site fire at a time, which bounds the power dissipated in tissue.
//
// The analog parts (rectifier, regulator, carrier comparator, ASK
// demodulator, bias generator and, per site, the 8-bit R-2R DAC, the x10
// output stage and the charge-recovery amplifier) are outside this RTL: the
// squared carrier and the demodulated command bits come in as ports, and each
// site's DAC code and cathodic / anodic switch controls go out as ports.
//
// Interface: coil_clk is the squared carrier; por_n an asynchronous
// active-low power-on reset (this design's addition), released into the
// system clock domain through two flip-flops; cmd_bit / cmd_strobe one
// demodulated command bit per strobe, synchronous to sys_clk; per site
// dac_code, cath_en, anod_en; have_token shows where the token is and
// pulse_due which sites have a pulse waiting for it.
module inis1_top
  import inis1_pkg::*;
#(
  parameter int unsigned ROWS     = NUM_ROWS,
  parameter int unsigned COLS     = NUM_COLS,
  parameter int unsigned PRESCALE = REP_PRESCALE
) (
  input  logic                 coil_clk,
  input  logic                 por_n,
  input  logic                 cmd_bit,
  input  logic                 cmd_strobe,
  output logic                 sys_clk,
  output logic [AMP_W-1:0]     dac_code [ROWS*COLS],
  output logic                 cath_en  [ROWS*COLS],
  output logic                 anod_en  [ROWS*COLS],
  output logic [ROWS*COLS-1:0] have_token,
  output logic [ROWS*COLS-1:0] pulse_due,
  output logic                 cmd_busy,
  output logic                 cmd_error,
  output logic                 cmd_done
);

  localparam int unsigned N = ROWS * COLS;

  logic              rst_n;
  logic [1:0]        rst_sync;
  logic              rep_tick;
  logic              wr_req, wr_ack;
  logic [ADDR_W-1:0] wr_addr;
  reg_sel_e          wr_reg;
  logic [TIME_W-1:0] wr_data;

  clk_div2 u_clkdiv (
    .coil_clk, .rst_n (por_n), .sys_clk
  );

  always_ff @(posedge sys_clk or negedge por_n) begin
    if (!por_n) rst_sync <= 2'b00;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  master_fsm #(.SITES(N)) u_master (
    .clk (sys_clk), .rst_n,
    .cmd_bit, .cmd_strobe,
    .wr_req, .wr_addr, .wr_reg, .wr_data, .wr_ack,
    .busy (cmd_busy), .cmd_error, .cmd_done
  );

  rep_timebase #(.PRESCALE(PRESCALE)) u_timebase (
    .clk (sys_clk), .rst_n, .tick (rep_tick)
  );

  stim_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk (sys_clk), .rst_n,
    .wr_req, .wr_addr, .wr_reg, .wr_data, .wr_ack,
    .rep_tick,
    .dac_code, .cath_en, .anod_en,
    .have_token, .due (pulse_due)
  );

endmodule
