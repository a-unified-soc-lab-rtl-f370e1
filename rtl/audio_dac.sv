// audio_dac: digital part of the on-chip audio DAC.
//
// Combines the DAC clock divider and the thermometer encoder. Every DIV
// clocks the divider's strobe reads one word from the sample FIFO (rd) and,
// in the same clock, the encoder takes the 8 most significant bits of the
// left sample from the fall-through FIFO output and turns them into the
// 255-line thermometer code that switches the current sources. Audio
// samples are two's complement; inverting the sign bit turns the 8 bits into
// offset binary, so silence (0) maps to mid-scale (128 sources on), the most
// negative value to 0 and the most positive to 255. While en is low no
// samples are read and the code holds its last value. Reset is synchronous
// and active high.
// The structure (divider strobe as FIFO read and encoder enable, 8-bit bus,
// 255 lines) is the DAC's as designed; the choice of the left channel, the
// offset-binary conversion and the rate are this design's.
module audio_dac
  import audio_pkg::*;
#(
  parameter int unsigned DIV = 2048
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [STEREO_W-1:0] sample,  // {left, right} from the FIFO
  output logic                rd,
  output logic [254:0]        therm
);

  logic       strobe;
  logic [7:0] code;

  assign code = {~sample[STEREO_W-1], sample[STEREO_W-2 -: 7]};
  assign rd   = strobe;

  dac_clock_divider #(.DIV(DIV)) u_div (
    .clk, .rst, .en, .strobe
  );

  thermometer_encoder #(.IN_W(8)) u_enc (
    .clk, .rst, .ce(strobe), .code, .therm
  );

endmodule
