// audio_control: Wishbone responder and register file of the audio peripheral.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 CTRL0      RW  [3] I2S_EN, [2] DAC_EN, [1] MODE (1 = DAC, 0 = I2S),
//                       [0] RST (holds the rest of the peripheral in reset)
//   0x04 STAT0      R   [2] FULL, [1] EMPTY, [0] LOW (level below threshold)
//   0x08 FIFO_LOW   RW  FIFO low threshold
//   0x0C FIFO_LEVEL R   current FIFO level
//   0x10 AUDIO_LEFT W   [31] COMMIT, [23:0] left sample
//   0x14 AUDIO_RIGHT W  [31] COMMIT, [23:0] right sample
// The two sample registers buffer one 24-bit sample each. Software writes
// both, in any order, and sets COMMIT on the second write: the pair is then
// pushed into the FIFO as one 48-bit word {left, right}, with the sample of
// the committing write taken from that write.
//
// Bus timing: a classic Wishbone cycle (cyc & stb) is acknowledged one clock
// later, with read data registered; the write takes effect on the clock edge
// that raises ack, and the FIFO push happens on that same edge. err is never
// raised. Reset (rst, synchronous, active high) clears every register.
//
// The register map, the read/write kinds, the COMMIT protocol and the
// 48-bit forwarding follow the peripheral's register table. The offset of
// AUDIO_RIGHT, the one-cycle ack, the zero read of write-only and unmapped
// offsets, ignoring byte selects and dropping a commit that meets a full
// FIFO are this design's choices.
module audio_control
  import audio_pkg::*;
#(
  parameter int unsigned LEVEL_W = 10
) (
  input  logic                clk,
  input  logic                rst,
  // Wishbone responder
  input  wb_req_t             wb_req_i,
  output wb_rsp_t             wb_rsp_o,
  // peripheral control
  output ctrl0_t              ctrl_o,
  output logic [LEVEL_W-1:0]  threshold_o,
  // FIFO write side and status
  output logic                fifo_wr_o,
  output logic [STEREO_W-1:0] fifo_wdata_o,
  input  logic                fifo_full_i,
  input  logic [LEVEL_W-1:0]  fifo_level_i,
  input  logic                low_i
);

  ctrl0_t                ctrl_q;
  logic [LEVEL_W-1:0]    thr_q;
  logic [SAMPLE_W-1:0]   left_q, right_q;
  logic                  ack_q;
  logic [31:0]           rdat_q;

  logic                  access, wr_en;
  logic [7:0]            offs;
  logic [SAMPLE_W-1:0]   wdat_sample;
  logic                  commit;
  logic [31:0]           rdat_d;

  assign access      = wb_req_i.cyc && wb_req_i.stb && !ack_q;
  assign wr_en       = access && wb_req_i.we;
  assign offs        = {wb_req_i.adr[7:2], 2'b00};
  assign wdat_sample = wb_req_i.dat[SAMPLE_W-1:0];
  assign commit      = wr_en && wb_req_i.dat[AUDIO_COMMIT] &&
                       (offs == ADDR_AUDIO_LEFT || offs == ADDR_AUDIO_RIGHT);

  // Read multiplexer.
  always_comb begin
    rdat_d = '0;
    unique case (offs)
      ADDR_CTRL0:      rdat_d[3:0] = ctrl_q;
      ADDR_STAT0: begin
        rdat_d[STAT0_FULL]  = fifo_full_i;
        rdat_d[STAT0_EMPTY] = (fifo_level_i == '0);
        rdat_d[STAT0_LOW]   = low_i;
      end
      ADDR_FIFO_LOW:   rdat_d[LEVEL_W-1:0] = thr_q;
      ADDR_FIFO_LEVEL: rdat_d[LEVEL_W-1:0] = fifo_level_i;
      default:         rdat_d = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_q  <= '0;
      thr_q   <= '0;
      left_q  <= '0;
      right_q <= '0;
      ack_q   <= 1'b0;
      rdat_q  <= '0;
    end else begin
      ack_q  <= access;
      rdat_q <= (access && !wb_req_i.we) ? rdat_d : '0;
      if (wr_en) begin
        unique case (offs)
          ADDR_CTRL0:       ctrl_q  <= ctrl0_t'(wb_req_i.dat[3:0]);
          ADDR_FIFO_LOW:    thr_q   <= wb_req_i.dat[LEVEL_W-1:0];
          ADDR_AUDIO_LEFT:  left_q  <= wdat_sample;
          ADDR_AUDIO_RIGHT: right_q <= wdat_sample;
          default: ;
        endcase
      end
    end
  end

  // FIFO push on a committing write; the committing write's own sample is
  // used directly so the pair is complete in the same cycle.
  always_comb begin
    fifo_wr_o    = commit && !fifo_full_i;
    fifo_wdata_o = {left_q, right_q};
    if (offs == ADDR_AUDIO_LEFT)  fifo_wdata_o[STEREO_W-1:SAMPLE_W] = wdat_sample;
    if (offs == ADDR_AUDIO_RIGHT) fifo_wdata_o[SAMPLE_W-1:0]        = wdat_sample;
  end

  assign wb_rsp_o.ack = ack_q;
  assign wb_rsp_o.err = 1'b0;
  assign wb_rsp_o.dat = rdat_q;
  assign ctrl_o       = ctrl_q;
  assign threshold_o  = thr_q;

  // Wishbone rule: an acknowledge only answers a request of the previous cycle.
  ack_follows_request: assert property (@(posedge clk) disable iff (rst)
    wb_rsp_o.ack |-> $past(wb_req_i.cyc && wb_req_i.stb));

endmodule
