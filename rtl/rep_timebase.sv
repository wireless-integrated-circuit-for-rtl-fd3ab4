// rep_timebase: repetition-period timebase shared by all stimulation sites.
//
// The repetition register of a site counts the pulse period in steps of about
// 6 ms. 8192 clocks of the 1.38 MHz system clock are 5.94 ms, which gives the
// 0.66 Hz (255 steps) to 168 Hz (1 step) range of the published chip, so this
// block divides the system clock by PRESCALE and emits a one-clock tick.
// Sharing one prescaler across the array, instead of one per site, is this
// design's choice.
//
// Interface: tick is high for one clock every PRESCALE clocks, the first time
// PRESCALE clocks after reset is released.
module rep_timebase #(
  parameter int unsigned PRESCALE = inis1_pkg::REP_PRESCALE
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(PRESCALE - 1));
      cnt  <= (cnt == CW'(PRESCALE - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
