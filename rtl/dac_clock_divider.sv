// dac_clock_divider: sampling strobe of the on-chip DAC.
//
// A counter modulo DIV raises strobe for one clock every DIV clocks while
// en is high. The strobe has two uses: it enables the clock of the
// thermometer encoder, so the DAC updates at clk/DIV without a second clock
// domain, and it is the FIFO read, so the sampling rate of the DAC sets the
// rate at which samples leave the FIFO. With the default DIV = 2048 the rate
// is 48 kHz at 98.304 MHz. The first strobe comes DIV clocks after reset or
// after en rises; while en is low the counter is held at zero. Reset is
// synchronous and active high.
// The strobe's two roles are the DAC's as designed; the rate, and so DIV, is
// this design's choice.
module dac_clock_divider #(
  parameter int unsigned DIV = 2048
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic strobe
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  assign strobe = en && (cnt == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || !en) cnt <= '0;
    else            cnt <= strobe ? '0 : cnt + 1'b1;
  end

endmodule
