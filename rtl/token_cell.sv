// token_cell: one stage of the chip-wide stimulation token ring.
//
// Only the site holding the token may fire, so no two electrodes drive
// current at once and the chip's power stays bounded. The token sits in one
// flip-flop. A site with no pulse due keeps it for one clock and passes it on;
// a site that fires raises hold and keeps the token until the last clock of
// its pulse, passing it to the neighbour at once when hold drops. This
// follows the published chip's description; the one-flip-flop structure is
// this design's.
//
// Interface: token_in comes from the previous site's token_out. have_token is
// the registered token. token_out = have_token & ~hold, so the next site holds
// the token one clock after this one lets it go. INIT_TOKEN puts the single
// token in this cell at reset (site 0 of the ring).
module token_cell #(
  parameter bit INIT_TOKEN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic token_in,
  input  logic hold,
  output logic have_token,
  output logic token_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) have_token <= INIT_TOKEN;
    else        have_token <= token_in | (have_token & hold);
  end

  assign token_out = have_token & ~hold;

  // A second token may never arrive while this cell keeps its own.
  a_single_token: assert property (@(posedge clk) disable iff (!rst_n)
    !(token_in && have_token && hold));

endmodule
