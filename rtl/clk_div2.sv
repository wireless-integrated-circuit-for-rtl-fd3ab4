// clk_div2: system clock recovery, digital part.
//
// The inductive power link runs at 2.765 MHz. A comparator (analog, not part
// of this RTL) squares up the coil voltage; this divider halves it to give the
// 1.38 MHz system clock (725 ns period) that times every pulse. A single
// toggle flip-flop gives a 50 % duty cycle whatever the duty cycle of the
// squared carrier.
//
// Interface: coil_clk is the squared carrier, rst_n an asynchronous active-low
// reset (holds sys_clk low), sys_clk the divided clock. sys_clk rises on every
// second rising edge of coil_clk. The reset input is this design's addition.
module clk_div2 (
  input  logic coil_clk,
  input  logic rst_n,
  output logic sys_clk
);

  always_ff @(posedge coil_clk or negedge rst_n) begin
    if (!rst_n) sys_clk <= 1'b0;
    else        sys_clk <= ~sys_clk;
  end

endmodule
