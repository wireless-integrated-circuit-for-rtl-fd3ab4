// site_counter: loadable down-counter of a stimulation site.
//
// Each site times its pulse with a counter. Used as a phase timer it is
// loaded with (phase length - 1) when a phase begins and counts down every
// clock; zero marks the last clock of the phase. Used as a repetition counter
// it is loaded with (period - 1) and counts down on each repetition tick.
//
// Interface: load has priority and sets the count to load_val on the next
// clock; otherwise, when en is high and the count is not zero, it decrements.
// zero is combinational from the count.
module site_counter #(
  parameter int unsigned W = inis1_pkg::TIME_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         zero
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    count <= '0;
    else if (load)                 count <= load_val;
    else if (en && count != '0)    count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
