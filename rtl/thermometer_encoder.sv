// thermometer_encoder: 8-bit binary to 255-line thermometer code.
//
// Drives the 255 unit current sources of the DAC: for an input code N,
// lines 0 to N-1 are on and the rest off, so each step of the code switches
// exactly one more source and the summed current rises monotonically. The
// code is registered, and the register loads only on the clock enable ce,
// which is the strobe of the DAC clock divider (on silicon that strobe gates
// the encoder's clock). Reset (synchronous, active high) loads mid-scale,
// code 128, so an idle output rests at the middle of its range.
// Input width 8, output width 255 and the strobe-enabled clock are the DAC's
// as designed; the register on the output and the reset value are this
// design's choices.
module thermometer_encoder #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned N    = (1 << IN_W) - 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  logic [IN_W-1:0] code,
  output logic [N-1:0]    therm
);

  logic [N-1:0] therm_d;

  always_comb begin
    for (int i = 0; i < N; i++) therm_d[i] = (code > IN_W'(i));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) therm[i] <= (i < (1 << (IN_W - 1)));
    end else if (ce) begin
      therm <= therm_d;
    end
  end

endmodule
