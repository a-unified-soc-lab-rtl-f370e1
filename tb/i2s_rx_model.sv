// i2s_rx_model: I2S receiver used by the testbenches as a reference listener.
//
// Behaves like the serial input of a stereo DAC in standard I2S format: it
// samples LRCK and SDATA on the rising edge of SCLK, treats the first bit
// after each LRCK change as the one-bit delay slot (bits before the first
// LRCK change are ignored, as is everything while resync is high), and collects the next
// SAMPLE_W bits MSB first into the left (LRCK low) or right (LRCK high)
// sample. When the right sample is complete it stores the pair in frame
// ({left, right}) and increments frames. frame_cycle gives the clk count
// (cycle input) at the LRCK falling edge that began the frame.
module i2s_rx_model #(
  parameter int unsigned SAMPLE_W = 24
) (
  input  logic                  sclk,
  input  logic                  lrck,
  input  logic                  sdata,
  input  logic                  resync,   // forget the frame alignment
  input  int unsigned           cycle,
  output int unsigned           frames,
  output logic [2*SAMPLE_W-1:0] frame,
  output int unsigned           frame_cycle
);

  logic                lr_prev = 1'b0;
  int unsigned         bitpos  = 0;
  logic [SAMPLE_W-1:0] acc     = '0;
  logic [SAMPLE_W-1:0] left    = '0;
  int unsigned         start   = 0;
  bit                  synced  = 1'b0;

  initial begin
    frames      = 0;
    frame       = '0;
    frame_cycle = 0;
  end

  always @(posedge resync) synced = 1'b0;

  always @(posedge sclk) begin
    if (resync) begin
      synced = 1'b0;
    end else if (lrck != lr_prev) begin
      synced = 1'b1;
      bitpos = 0;
      if (!lrck) start = cycle;
    end else if (synced) begin
      bitpos = bitpos + 1;
      if (bitpos >= 1 && bitpos <= SAMPLE_W) begin
        acc = {acc[SAMPLE_W-2:0], sdata};
        if (bitpos == SAMPLE_W) begin
          if (!lrck) left = acc;
          else begin
            frame       = {left, acc};
            frame_cycle = start;
            frames      = frames + 1;
          end
        end
      end
    end
    lr_prev = lrck;
  end

endmodule
