// stim_cell_model: behavioural model, for simulation only, of the analog
// part of one stimulation site: the 8-bit R-2R current DAC (0.1 uA per
// code) and the output stage that multiplies the DAC current by ten and
// sinks it from the electrode during the cathodic phase or sources it
// during the anodic phase. i_elec_ua is the electrode current in uA,
// positive when sourced. The charge-recovery amplifier (at most 235 nA) is
// left out: into the ideal load of this model nothing remains to recover.
module stim_cell_model #(
  parameter real DAC_LSB_UA = 0.1,
  parameter real GAIN       = 10.0
) (
  input  logic [7:0] dac_code,
  input  logic       cath_en,
  input  logic       anod_en,
  output real        i_elec_ua
);
  real i_dac_ua;
  always_comb begin
    i_dac_ua = DAC_LSB_UA * real'(dac_code);
    if (cath_en)      i_elec_ua = -GAIN * i_dac_ua;
    else if (anod_en) i_elec_ua =  GAIN * i_dac_ua;
    else              i_elec_ua = 0.0;
  end
endmodule
