// dac_buffer_amp: behavioural model of the DAC's output amplifiers
// (an analog block; this model is not synthesizable).
//
// The first stage converts the summed source current into a voltage across
// a transimpedance R_TI; the second is a unity-gain buffer that drives the
// line output with low output impedance. The model is ideal and linear:
// v_line = i_in * R_TI, clipped to the supply range 0..VDD, after a delay of
// T_DELAY_NS. The stage structure (current-to-voltage conversion followed by
// a buffer) is the DAC's as designed; R_TI, VDD and the delay are assumed.
module dac_buffer_amp #(
  parameter real R_TI       = 1000.0,  // ohms
  parameter real VDD        = 3.3,     // volts
  parameter real T_DELAY_NS = 1.0
) (
  input  real i_in,    // amperes
  output real v_line   // volts
);

  real v_ti;

  always_comb begin
    v_ti = i_in * R_TI;
    if (v_ti > VDD) v_ti = VDD;
    if (v_ti < 0.0) v_ti = 0.0;
  end

  always @(v_ti) v_line <= #(T_DELAY_NS * 1ns) v_ti;

endmodule
