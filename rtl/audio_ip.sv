// audio_ip: audio peripheral with a Wishbone register interface.
//
// The CPU writes stereo samples through the Control block's registers; each
// committed pair enters the sample FIFO as one 48-bit word. CTRL0.MODE routes
// the FIFO to one of two outputs: the I2S transmitter, which drives an
// external stereo DAC, or the on-chip DAC, whose thermometer code drives 255
// current sources. The selected output pulls words from the FIFO at its own
// sampling rate (one read per I2S frame, or one per DAC strobe); the other
// sees zero data and its reads are ignored. A comparator raises low while the
// FIFO level is below the FIFO_LOW threshold; low is both the STAT0.LOW bit
// and the peripheral's interrupt output.
//
// Resets: rst (synchronous, active high) resets everything; the software
// reset CTRL0.RST holds the FIFO, clock divider, I2S and DAC in reset (but
// not the registers) as long as it is set. I2S_EN and DAC_EN gate the two
// outputs independently of MODE.
//
// Interface: wb_req_i/wb_rsp_o (classic Wishbone, see audio_control), low_o,
// the four I2S lines, and dac_therm_o, the thermometer code to the DAC's
// analog part. The structure (Control, FIFO, MODE multiplexer, comparator,
// clock divider, I2S, DAC) is the peripheral's as designed; the FIFO depth
// and the clock ratios are this design's choices.
module audio_ip
  import audio_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MCLK_DIV   = 8,
  parameter int unsigned SCLK_DIV   = 32,
  parameter int unsigned SLOT_W     = 32,
  parameter int unsigned DAC_DIV    = 2048,
  parameter int unsigned LEVEL_W    = $clog2(FIFO_DEPTH) + 1
) (
  input  logic         clk,
  input  logic         rst,
  input  wb_req_t      wb_req_i,
  output wb_rsp_t      wb_rsp_o,
  output logic         low_o,
  output logic         i2s_mclk_o,
  output logic         i2s_sclk_o,
  output logic         i2s_lrck_o,
  output logic         i2s_sdata_o,
  output logic [254:0] dac_therm_o
);

  ctrl0_t                ctrl;
  logic                  sw_rst;
  logic [LEVEL_W-1:0]    threshold, level;
  logic                  fifo_wr, fifo_rd, full, empty;
  logic [STEREO_W-1:0]   fifo_wdata, fifo_rdata;
  logic [STEREO_W-1:0]   i2s_sample, dac_sample;
  logic                  i2s_rd, dac_rd;
  logic                  mclk_tick, sclk_tick;

  // Software reset: held while either the bus reset or CTRL0.RST is set.
  assign sw_rst = rst || ctrl.rst;

  // Low-level comparator (interrupt and STAT0.LOW).
  assign low_o = (level < threshold);

  audio_control #(.LEVEL_W(LEVEL_W)) u_control (
    .clk, .rst,
    .wb_req_i, .wb_rsp_o,
    .ctrl_o       (ctrl),
    .threshold_o  (threshold),
    .fifo_wr_o    (fifo_wr),
    .fifo_wdata_o (fifo_wdata),
    .fifo_full_i  (full),
    .fifo_level_i (level),
    .low_i        (low_o)
  );

  audio_fifo #(.WIDTH(STEREO_W), .DEPTH(FIFO_DEPTH), .LEVEL_W(LEVEL_W)) u_fifo (
    .clk, .rst(sw_rst),
    .wr(fifo_wr), .wdata(fifo_wdata),
    .rd(fifo_rd), .rdata(fifo_rdata),
    .level, .full, .empty
  );

  // Output multiplexer selected by CTRL0.MODE.
  always_comb begin
    if (ctrl.mode == MODE_DAC) begin
      dac_sample = fifo_rdata;
      i2s_sample = '0;
      fifo_rd    = dac_rd;
    end else begin
      dac_sample = '0;
      i2s_sample = fifo_rdata;
      fifo_rd    = i2s_rd;
    end
  end

  i2s_clock_divider #(.MCLK_DIV(MCLK_DIV), .SCLK_DIV(SCLK_DIV)) u_clkdiv (
    .clk, .rst(sw_rst), .mclk_tick, .sclk_tick
  );

  i2s_tx #(.SAMPLE_W(SAMPLE_W), .SLOT_W(SLOT_W)) u_i2s (
    .clk, .rst(sw_rst), .en(ctrl.i2s_en),
    .mclk_tick, .sclk_tick,
    .sample(i2s_sample), .rd(i2s_rd),
    .mclk(i2s_mclk_o), .sclk(i2s_sclk_o), .lrck(i2s_lrck_o), .sdata(i2s_sdata_o)
  );

  audio_dac #(.DIV(DAC_DIV)) u_dac (
    .clk, .rst(sw_rst), .en(ctrl.dac_en),
    .sample(dac_sample), .rd(dac_rd), .therm(dac_therm_o)
  );

endmodule
