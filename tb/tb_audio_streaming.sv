// tb_audio_streaming: continuous playback driven the way a device driver
// would drive the peripheral, on the full platform at default parameters.
// The sample stream is a deterministic sequence (left = 3*n, right = ~(5*n),
// 24 bits), so any lost, repeated or reordered word shows up as a mismatch
// in the frames decoded from the I2S lines.
//  Phase 1, blocking mode: the driver polls STAT0.FULL and writes the next
//  pair whenever the FIFO has room (400 frames).
//  Phase 2, interrupt mode: the driver sleeps until low_o rises
//  (FIFO_LEVEL < FIFO_LOW = 64), then refills to 128 words (600 frames).
// Checks: every decoded frame is the next pair of the stream (no underrun),
// one frame per 2048 clocks, and the refill interrupt fires repeatedly
// while never letting the FIFO drain.
module tb_audio_streaming;
  import audio_pkg::*;
  logic clk = 1'b0, arst = 1'b0, rst;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  logic low, mclk, sclk, lrck, sdata, t_mclk, t_sclk, t_lrck, t_sdata;
  real line;
  int unsigned cycle = 0, frames, frame_cycle, fc_prev = 0, seen = 0, played = 0;
  logic [47:0] frame;
  int checks = 0, failures = 0;
  int unsigned next_push = 0, irq_count = 0, min_level = 1000;
  bit phase2 = 1'b0;

  audio_soc_top dut (
    .clk, .arst, .rst_o(rst), .wb_req_i(wb_req), .wb_rsp_o(wb_rsp), .low_o(low),
    .i2s_mclk_o(mclk), .i2s_sclk_o(sclk), .i2s_lrck_o(lrck), .i2s_sdata_o(sdata),
    .line_o(line),
    .tone_mclk_o(t_mclk), .tone_sclk_o(t_sclk), .tone_lrck_o(t_lrck), .tone_sdata_o(t_sdata)
  );
  i2s_rx_model u_rx (.sclk, .lrck, .sdata, .resync(1'b0), .cycle,
                     .frames, .frame, .frame_cycle);

  always #5ns clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  `include "wb_bfm_tasks.svh"

  function automatic logic [47:0] pair(input int unsigned n);
    logic [23:0] l, r;
    l = 24'(3 * n);
    r = ~24'(5 * n);
    return {l, r};
  endfunction

  task automatic push_next();
    logic [47:0] p;
    p = pair(next_push);
    wb_push(p[47:24], p[23:0], next_push[0]);
    next_push++;
  endtask

  // Frame checker: decoded frame k (k >= 2) must be stream pair k-1.
  always @(posedge clk) begin
    if (frames != seen) begin
      if (frames == 1) check(frame[23:0] == pair(0)[23:0], "first frame right sample");
      else begin
        check(frame == pair(frames - 1),
              $sformatf("frame %0d: %h expected %h", frames, frame, pair(frames - 1)));
        if (frames > 2) check(frame_cycle - fc_prev == 2048, "frame period 2048 clocks");
      end
      fc_prev = frame_cycle;
      seen = frames;
      if (phase2 && 32'(dut.u_audio.level) < min_level) min_level = 32'(dut.u_audio.level);
    end
  end

  initial begin
    #40ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] q;
    #1ns arst = 1'b1;
    repeat (3) @(posedge clk);
    #1ns arst = 1'b0;
    repeat (3) @(posedge clk);
    #1ns;
    // blocking mode: prime the FIFO, start playback, keep it topped up
    for (int i = 0; i < 32; i++) push_next();
    wb_write(8'h00, 32'h8);
    while (frames < 400) begin
      wb_read(8'h04, q);
      if (!q[STAT0_FULL]) push_next();
    end
    wb_expect(8'h0C, 32'd512, "blocking mode keeps the FIFO full");
    // interrupt mode
    wb_write(8'h08, 32'd64);
    phase2 = 1'b1;
    while (frames < 1000) begin
      @(posedge clk); #1ns;
      if (low) begin
        irq_count++;
        do begin
          push_next();
          wb_read(8'h0C, q);
        end while (q < 128);
        check(!low, "refill clears the interrupt");
      end
    end
    check(irq_count >= 3, $sformatf("refill interrupts: %0d", irq_count));
    check(min_level >= 60, $sformatf("FIFO never drained, lowest level %0d", min_level));
    $display("streamed %0d pairs, %0d frames checked, %0d refill interrupts, lowest level %0d",
             next_push, frames, irq_count, min_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
