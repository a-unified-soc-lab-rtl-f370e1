// i2s_clock_divider: edge strobes for the I2S master clocks.
//
// With the 98.304 MHz main clock every I2S clock is an integer fraction of
// clk, so no PLL and no second clock domain is needed. Two free-running
// counters produce one-cycle strobes: mclk_tick every MCLK_DIV/2 clocks and
// sclk_tick every SCLK_DIV/2 clocks, i.e. once per half period of the master
// clock (MCLK) and of the bit clock (SCLK). The I2S transmitter toggles its
// clock outputs on these strobes. Defaults: MCLK = clk/8 = 12.288 MHz
// (256 x 48 kHz) and SCLK = clk/32 = 3.072 MHz (64 x 48 kHz). A synchronous
// reset (rst, active high) restarts both counters so that the first strobes
// of both come MCLK_DIV/2 and SCLK_DIV/2 clocks later, edge-aligned.
// That the clocks are divided from the single main clock is the platform's;
// the 48 kHz rate, the ratios and the strobe interface are this design's.
module i2s_clock_divider #(
  parameter int unsigned MCLK_DIV = 8,   // clk cycles per MCLK period (even)
  parameter int unsigned SCLK_DIV = 32   // clk cycles per SCLK period (even)
) (
  input  logic clk,
  input  logic rst,
  output logic mclk_tick,
  output logic sclk_tick
);

  localparam int unsigned MHALF = MCLK_DIV / 2;
  localparam int unsigned SHALF = SCLK_DIV / 2;
  localparam int unsigned MW    = (MHALF > 1) ? $clog2(MHALF) : 1;
  localparam int unsigned SW    = (SHALF > 1) ? $clog2(SHALF) : 1;

  logic [MW-1:0] mcnt;
  logic [SW-1:0] scnt;

  assign mclk_tick = (mcnt == MW'(MHALF - 1));
  assign sclk_tick = (scnt == SW'(SHALF - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      mcnt <= '0;
      scnt <= '0;
    end else begin
      mcnt <= mclk_tick ? '0 : mcnt + 1'b1;
      scnt <= sclk_tick ? '0 : scnt + 1'b1;
    end
  end

endmodule
