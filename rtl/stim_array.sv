// stim_array: the 10 x 10 array of stimulation sites and its token ring.
//
// All sites share one write bus from the master FSM; a site is addressed by
// its index (row * NUM_COLS + col) and the acknowledges of all sites are
// ORed back to the master. The token ring links site i to site i + 1 and the
// last site back to site 0, which holds the token after reset, so exactly one
// site can fire at any time. The ring following address order is this
// design's choice.
//
// Interface: write bus in (wr_req, wr_addr, wr_reg, wr_data, wr_ack out);
// rep_tick from the shared timebase; per-site dac_code, cath_en and anod_en
// to the analog cells; per-site token and due flags for observation. An
// idle site passes the token in one clock, so with no pulse due the token
// goes round the ring in NUM_ROWS * NUM_COLS clocks.
module stim_array
  import inis1_pkg::*;
#(
  parameter int unsigned ROWS = NUM_ROWS,
  parameter int unsigned COLS = NUM_COLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_req,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  reg_sel_e           wr_reg,
  input  logic [TIME_W-1:0]  wr_data,
  output logic               wr_ack,
  input  logic               rep_tick,
  output logic [AMP_W-1:0]   dac_code [ROWS*COLS],
  output logic               cath_en  [ROWS*COLS],
  output logic               anod_en  [ROWS*COLS],
  output logic [ROWS*COLS-1:0] have_token,
  output logic [ROWS*COLS-1:0] due
);

  localparam int unsigned N = ROWS * COLS;

  logic [N-1:0] token_out;
  logic [N-1:0] ack;

  for (genvar i = 0; i < N; i++) begin : g_site
    stim_site #(.INIT_TOKEN(i == 0)) u_site (
      .clk, .rst_n,
      .wr_req,
      .wr_sel_site (wr_addr == ADDR_W'(i)),
      .wr_reg, .wr_data,
      .wr_ack      (ack[i]),
      .rep_tick,
      .token_in    (token_out[(i + N - 1) % N]),
      .token_out   (token_out[i]),
      .dac_code    (dac_code[i]),
      .cath_en     (cath_en[i]),
      .anod_en     (anod_en[i]),
      .have_token  (have_token[i]),
      .due         (due[i])
    );
  end

  assign wr_ack = |ack;

  // Exactly one token in the ring.
  a_one_token: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(have_token));

endmodule
