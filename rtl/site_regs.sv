// site_regs: parameter register bank of one stimulation site.
//
// Four registers hold the site's pulse: amplitude (8 bits), phase duration
// (9 bits), interphase delay (9 bits) and repetition (9 bits, the top bit
// switching the site on). The widths follow the published chip. One register
// is written per command, chosen by sel; the amplitude register takes the
// low 8 bits of wdata. Clearing everything at reset, so that a site is off
// until programmed, is this design's choice.
//
// Interface: we writes wdata into the register chosen by sel at the clock
// edge; params shows all four registers at once.
module site_regs
  import inis1_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  reg_sel_e           sel,
  input  logic [TIME_W-1:0]  wdata,
  output site_params_t       params
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      params <= '0;
    end else if (we) begin
      unique case (sel)
        REG_AMP: params.amp <= wdata[AMP_W-1:0];
        REG_DUR: params.dur <= wdata;
        REG_IPD: params.ipd <= wdata;
        REG_REP: params.rep <= wdata[REP_W-1:0];
      endcase
    end
  end

endmodule
