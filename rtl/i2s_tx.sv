// i2s_tx: I2S transmitter for a stereo DAC such as the CS4344.
//
// Produces the four I2S lines MCLK, SCLK, LRCK and SDATA from the edge
// strobes of the clock divider. MCLK and SCLK toggle on every mclk_tick and
// sclk_tick. A frame has two slots of SLOT_W bit clocks, left (LRCK low)
// then right (LRCK high). LRCK and SDATA change on the falling edge of SCLK
// (the receiver samples on the rising edge); each 24-bit sample is sent MSB
// first, starting one SCLK after the LRCK change, and the slot is padded with
// zeros. With the defaults (SCLK = clk/32, SLOT_W = 32) a frame lasts
// 64 x 32 = 2048 clocks, 48 kHz at 98.304 MHz.
//
// At the falling SCLK edge that starts a frame, rd is high for one clock and
// the word on sample ({left, right}, 48 bits) is taken in that same clock,
// which suits a first-word-fall-through FIFO: one read per frame. While en is
// low all outputs stay low and the frame restarts when en rises. Reset is
// synchronous and active high.
// The I2S standard format and the use of the single clock domain follow the
// platform; slot width, padding and the read timing are this design's.
module i2s_tx #(
  parameter int unsigned SAMPLE_W = 24,
  parameter int unsigned SLOT_W   = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic                  mclk_tick,
  input  logic                  sclk_tick,
  input  logic [2*SAMPLE_W-1:0] sample,
  output logic                  rd,
  output logic                  mclk,
  output logic                  sclk,
  output logic                  lrck,
  output logic                  sdata
);

  localparam int unsigned FRAME = 2 * SLOT_W;
  localparam int unsigned PW    = $clog2(FRAME);

  logic [PW-1:0]       pos;       // bit position in the frame
  logic [SAMPLE_W-1:0] shreg;     // sample being shifted out
  logic [SAMPLE_W-1:0] right_q;   // right sample waiting for its slot

  logic          fall;            // this clock makes a falling SCLK edge
  logic [PW-1:0] pos_n;
  logic [PW-1:0] q_n;             // position inside the slot

  assign fall  = en && sclk_tick && sclk;
  assign pos_n = (pos == PW'(FRAME - 1)) ? '0 : pos + 1'b1;
  assign q_n   = (pos_n >= PW'(SLOT_W)) ? pos_n - PW'(SLOT_W) : pos_n;
  assign rd    = fall && (pos_n == '0);

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      pos     <= PW'(FRAME - 1);
      shreg   <= '0;
      right_q <= '0;
      mclk    <= 1'b0;
      sclk    <= 1'b0;
      lrck    <= 1'b0;
      sdata   <= 1'b0;
    end else begin
      if (mclk_tick) mclk <= ~mclk;
      if (sclk_tick) sclk <= ~sclk;
      if (fall) begin
        pos  <= pos_n;
        lrck <= (pos_n >= PW'(SLOT_W));
        if (pos_n == '0) begin
          shreg   <= sample[2*SAMPLE_W-1:SAMPLE_W];
          right_q <= sample[SAMPLE_W-1:0];
          sdata   <= 1'b0;
        end else if (pos_n == PW'(SLOT_W)) begin
          shreg <= right_q;
          sdata <= 1'b0;
        end else if (q_n <= PW'(SAMPLE_W)) begin
          sdata <= shreg[SAMPLE_W-1];
          shreg <= {shreg[SAMPLE_W-2:0], 1'b0};
        end else begin
          sdata <= 1'b0;
        end
      end
    end
  end

  // At most one FIFO read per frame, and none while disabled.
  rd_only_when_enabled: assert property (@(posedge clk) disable iff (rst)
    rd |-> en);
  rd_once_per_frame: assert property (@(posedge clk) disable iff (rst)
    rd |=> !rd);

endmodule
