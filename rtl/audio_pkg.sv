// audio_pkg: types and constants shared by the audio peripheral.
//
// Holds the register map of the peripheral's bus window, the bit layout of
// CTRL0, STAT0 and the sample registers, and the request/response structs of
// the classic Wishbone bus that connects the peripheral to the CPU.
// The register offsets and bit positions follow the peripheral's register
// table; the offset of AUDIO_RIGHT (0x14), the 32-bit bus width and the
// Wishbone signal set are this design's own choices.
package audio_pkg;

  // Main clock of the platform: 98.304 MHz = 2048 x 48 kHz.
  localparam int unsigned CLK_HZ = 98_304_000;

  localparam int unsigned SAMPLE_W = 24;              // bits per channel
  localparam int unsigned STEREO_W = 2 * SAMPLE_W;    // one FIFO word

  // Register offsets (byte addresses inside the peripheral window).
  localparam logic [7:0] ADDR_CTRL0       = 8'h00;
  localparam logic [7:0] ADDR_STAT0       = 8'h04;
  localparam logic [7:0] ADDR_FIFO_LOW    = 8'h08;
  localparam logic [7:0] ADDR_FIFO_LEVEL  = 8'h0C;
  localparam logic [7:0] ADDR_AUDIO_LEFT  = 8'h10;
  localparam logic [7:0] ADDR_AUDIO_RIGHT = 8'h14;

  // CTRL0 bit positions.
  localparam int unsigned CTRL0_RST    = 0;
  localparam int unsigned CTRL0_MODE   = 1;
  localparam int unsigned CTRL0_DAC_EN = 2;
  localparam int unsigned CTRL0_I2S_EN = 3;

  // STAT0 bit positions.
  localparam int unsigned STAT0_LOW   = 0;
  localparam int unsigned STAT0_EMPTY = 1;
  localparam int unsigned STAT0_FULL  = 2;

  // AUDIO_LEFT / AUDIO_RIGHT: bit 31 commits the stereo pair.
  localparam int unsigned AUDIO_COMMIT = 31;

  // Output routing selected by CTRL0.MODE.
  typedef enum logic {
    MODE_I2S = 1'b0,
    MODE_DAC = 1'b1
  } out_mode_e;

  // Decoded CTRL0 register.
  typedef struct packed {
    logic      i2s_en;
    logic      dac_en;
    out_mode_e mode;
    logic      rst;
  } ctrl0_t;

  // Classic Wishbone, 32-bit data, byte addresses.
  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [31:0] adr;
    logic [31:0] dat;
    logic [3:0]  sel;
  } wb_req_t;

  typedef struct packed {
    logic        ack;
    logic        err;
    logic [31:0] dat;
  } wb_rsp_t;

endpackage
