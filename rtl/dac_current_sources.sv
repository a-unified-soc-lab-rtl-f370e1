// dac_current_sources: behavioural model of the DAC's current-source array
// (an analog block; this model is not synthesizable).
//
// N matched unit current sources, each switched on by one line of the
// thermometer code. Their currents are summed on one node, so the output
// current is I_UNIT times the number of lines that are on. The model is
// ideal: no mismatch, no settling, no output-impedance effects; the sum
// follows the switch lines after a delay of T_SETTLE_NS.
// The 255 switched sources and the summing are the DAC's as designed; the
// unit current and the settling delay are assumed values.
module dac_current_sources #(
  parameter int unsigned N           = 255,
  parameter real         I_UNIT      = 10.0e-6,  // amperes per source
  parameter real         T_SETTLE_NS = 1.0
) (
  input  logic [N-1:0] sw,     // thermometer code, 1 = source on
  output real          i_out   // summed current in amperes
);

  real i_sum;

  always_comb begin
    int unsigned on;
    on = 0;
    for (int i = 0; i < N; i++) on += int'(sw[i]);
    i_sum = I_UNIT * real'(on);
  end

  always @(i_sum) i_out <= #(T_SETTLE_NS * 1ns) i_sum;

endmodule
