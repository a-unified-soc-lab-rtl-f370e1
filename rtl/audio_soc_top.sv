// audio_soc_top: audio player platform around the audio peripheral.
//
// The platform has a reset block, a CPU and the audio peripheral. The reset
// block synchronizes the external asynchronous reset arst to clk (98.304 MHz)
// and resets the peripheral. The CPU, a RISC-V SoC, is not part of this RTL:
// its Wishbone master side (wb_req_i / wb_rsp_o) and the interrupt input
// driven by the peripheral's low flag (low_o) are ports of this top, as is
// the synchronized reset (rst_o) that the CPU also uses. The peripheral's
// outputs are the I2S lines to an external stereo DAC and the line output of
// the on-chip DAC, whose thermometer code drives the behavioural models of
// the current-source array and the output amplifiers (line_o, in volts).
//
// Beside it stands the standalone tone system (sine generator, FIFO, I2S),
// the CPU-less first form of the same audio path, with its own I2S lines
// (tone_*). It shares clk and the synchronized reset.
// The three-block platform and the peripheral's contents are as designed;
// bringing the standalone system into the same top is this design's choice.
module audio_soc_top
  import audio_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MCLK_DIV   = 8,
  parameter int unsigned SCLK_DIV   = 32,
  parameter int unsigned SLOT_W     = 32,
  parameter int unsigned DAC_DIV    = 2048
) (
  input  logic    clk,
  input  logic    arst,
  output logic    rst_o,
  // CPU side
  input  wb_req_t wb_req_i,
  output wb_rsp_t wb_rsp_o,
  output logic    low_o,
  // I2S to the external stereo DAC
  output logic    i2s_mclk_o,
  output logic    i2s_sclk_o,
  output logic    i2s_lrck_o,
  output logic    i2s_sdata_o,
  // on-chip DAC line output
  output real     line_o,
  // standalone tone system
  output logic    tone_mclk_o,
  output logic    tone_sclk_o,
  output logic    tone_lrck_o,
  output logic    tone_sdata_o
);

  logic         rst;
  logic [254:0] therm;
  real          i_dac;

  assign rst_o = rst;

  reset_sync u_reset (.clk, .arst, .rst);

  audio_ip #(
    .FIFO_DEPTH(FIFO_DEPTH), .MCLK_DIV(MCLK_DIV), .SCLK_DIV(SCLK_DIV),
    .SLOT_W(SLOT_W), .DAC_DIV(DAC_DIV)
  ) u_audio (
    .clk, .rst,
    .wb_req_i, .wb_rsp_o, .low_o,
    .i2s_mclk_o, .i2s_sclk_o, .i2s_lrck_o, .i2s_sdata_o,
    .dac_therm_o(therm)
  );

  dac_current_sources #(.N(255)) u_sources (.sw(therm), .i_out(i_dac));

  dac_buffer_amp u_amp (.i_in(i_dac), .v_line(line_o));

  sine_i2s_system #(
    .FIFO_DEPTH(FIFO_DEPTH), .MCLK_DIV(MCLK_DIV), .SCLK_DIV(SCLK_DIV), .SLOT_W(SLOT_W)
  ) u_tone (
    .clk, .rst,
    .i2s_mclk_o(tone_mclk_o), .i2s_sclk_o(tone_sclk_o),
    .i2s_lrck_o(tone_lrck_o), .i2s_sdata_o(tone_sdata_o)
  );

endmodule
