// sine_generator: test-tone source for the standalone I2S system.
//
// Produces a sine wave as a stream of stereo words (the same 24-bit sample on
// left and right) for the sample FIFO. The wave comes from a "magic circle"
// oscillator, two coupled integer registers updated as
//   x <- x - (E * y) >>> 16,  y <- y + (E * x_new) >>> 16,
// which rotates (x, y) by a fixed angle w with E = 2*sin(w/2)*65536 and needs
// one multiply per register and no table. Starting from x = AMPL, y = 0, y
// follows AMPL*sin(n*w) to within a fraction of a percent for small w. The
// default E = 8572 gives w = 2*pi/48, i.e. a 1 kHz tone when the samples are
// played at 48 kHz. A word is offered on wdata whenever the FIFO is not full
// (wr = !full); the oscillator steps when the word is taken, so the FIFO
// and its consumer set the pace. Reset is synchronous and active high.
// A sine generator feeding the FIFO and the I2S module is the standalone
// system's; the oscillator, the tone and its amplitude are this design's.
module sine_generator
  import audio_pkg::*;
#(
  parameter int unsigned E    = 8572,      // 2*sin(w/2) in Q0.16
  parameter int unsigned AMPL = 4194304    // peak value, 2^22 (half scale)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                full,
  output logic                wr,
  output logic [STEREO_W-1:0] wdata
);

  logic signed [31:0] x, y;
  logic signed [31:0] x_n, y_n;
  logic signed [47:0] px, py;

  always_comb begin
    py  = 48'(y) * 48'(signed'({1'b0, 16'(E)}));
    x_n = x - 32'(py >>> 16);
    px  = 48'(x_n) * 48'(signed'({1'b0, 16'(E)}));
    y_n = y + 32'(px >>> 16);
  end

  assign wr    = !rst && !full;
  assign wdata = {y[SAMPLE_W-1:0], y[SAMPLE_W-1:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= 32'(AMPL);
      y <= '0;
    end else if (wr) begin
      x <= x_n;
      y <= y_n;
    end
  end

endmodule
