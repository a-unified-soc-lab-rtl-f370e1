// sine_i2s_system: standalone tone generator on the I2S output.
//
// The first, CPU-less form of the audio path: a sine generator fills the
// sample FIFO and the I2S transmitter, paced by its clock divider, empties it
// at one stereo word per frame (48 kHz with the defaults), so the external
// DAC plays a continuous tone. The transmitter is always enabled. Reset is
// synchronous and active high. The composition (sine generator, FIFO, I2S)
// is the standalone system's as designed; FIFO depth and tone are this
// design's choices.
module sine_i2s_system
  import audio_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MCLK_DIV   = 8,
  parameter int unsigned SCLK_DIV   = 32,
  parameter int unsigned SLOT_W     = 32,
  parameter int unsigned E          = 8572
) (
  input  logic clk,
  input  logic rst,
  output logic i2s_mclk_o,
  output logic i2s_sclk_o,
  output logic i2s_lrck_o,
  output logic i2s_sdata_o
);

  localparam int unsigned LEVEL_W = $clog2(FIFO_DEPTH) + 1;

  logic                wr, rd, full, empty;
  logic [STEREO_W-1:0] wdata, rdata;
  logic [LEVEL_W-1:0]  level;
  logic                mclk_tick, sclk_tick;

  sine_generator #(.E(E)) u_sine (.clk, .rst, .full, .wr, .wdata);

  audio_fifo #(.WIDTH(STEREO_W), .DEPTH(FIFO_DEPTH), .LEVEL_W(LEVEL_W)) u_fifo (
    .clk, .rst, .wr, .wdata, .rd, .rdata, .level, .full, .empty
  );

  i2s_clock_divider #(.MCLK_DIV(MCLK_DIV), .SCLK_DIV(SCLK_DIV)) u_clkdiv (
    .clk, .rst, .mclk_tick, .sclk_tick
  );

  i2s_tx #(.SAMPLE_W(SAMPLE_W), .SLOT_W(SLOT_W)) u_i2s (
    .clk, .rst, .en(1'b1), .mclk_tick, .sclk_tick,
    .sample(rdata), .rd,
    .mclk(i2s_mclk_o), .sclk(i2s_sclk_o), .lrck(i2s_lrck_o), .sdata(i2s_sdata_o)
  );

endmodule
