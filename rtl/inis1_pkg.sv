// inis1_pkg: types and constants shared by the digital core of the 100-channel
// wireless neural stimulator.
//
// The stimulator is a 10 x 10 array of stimulation sites driven by one master
// command FSM. Each site keeps four parameter registers: an 8-bit pulse
// amplitude (1 uA per step), a 9-bit phase duration and a 9-bit interphase
// delay (one system clock of 725 ns per step) and a 9-bit repetition register
// whose top bit switches the site on and whose low 8 bits give the pulse
// period in steps of one repetition tick (8192 system clocks, about 5.94 ms).
// Those widths, the 1.38 MHz clock and the array size follow the published
// chip; the command word layout, the register-select encoding and the
// minimum phase length of two clocks are choices of this design.
package inis1_pkg;

  // Array organisation.
  localparam int unsigned NUM_ROWS  = 10;
  localparam int unsigned NUM_COLS  = 10;
  localparam int unsigned NUM_SITES = NUM_ROWS * NUM_COLS;

  // Register widths.
  localparam int unsigned AMP_W  = 8;   // amplitude code, 1 uA per LSB
  localparam int unsigned TIME_W = 9;   // duration / interphase delay, 725 ns per LSB
  localparam int unsigned REP_W  = 9;   // bit 8: site active, bits 7:0: period in ticks
  localparam int unsigned PER_W  = REP_W - 1;
  localparam int unsigned ADDR_W = 7;   // enough for 100 sites

  // Shortest phase the timing counter can produce (1.45 us at 1.38 MHz).
  localparam int unsigned MIN_PHASE = 2;

  // System clocks per repetition tick (2^13 clocks = 5.94 ms at 1.38 MHz).
  localparam int unsigned REP_PRESCALE = 8192;

  // Register selected by a command.
  typedef enum logic [1:0] {
    REG_AMP = 2'd0,
    REG_DUR = 2'd1,
    REG_IPD = 2'd2,
    REG_REP = 2'd3
  } reg_sel_e;

  // One command: which site, which register, and the 9-bit value
  // (the amplitude register takes the low 8 bits).
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    reg_sel_e          sel;
    logic [TIME_W-1:0] data;
  } cmd_t;

  localparam int unsigned CMD_W = $bits(cmd_t);  // 18 payload bits

  // The parameter set of one site.
  typedef struct packed {
    logic [AMP_W-1:0]  amp;
    logic [TIME_W-1:0] dur;
    logic [TIME_W-1:0] ipd;
    logic [REP_W-1:0]  rep;
  } site_params_t;

  // Phase of the biphasic pulse a site is producing. The sequence
  // IDLE -> CATH -> INTER -> ANOD -> IDLE is Gray coded, so each step changes
  // one bit and the output-stage switch decodes cannot glitch.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'b00,
    PH_CATH  = 2'b01,
    PH_INTER = 2'b11,
    PH_ANOD  = 2'b10
  } phase_e;

  // Phase length in clocks for a 9-bit register value.
  function automatic logic [TIME_W-1:0] phase_len(input logic [TIME_W-1:0] v);
    return (v < TIME_W'(MIN_PHASE)) ? TIME_W'(MIN_PHASE) : v;
  endfunction

endpackage
