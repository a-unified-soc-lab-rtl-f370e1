// tb_audio_ip: the audio peripheral through its Wishbone registers.
// Uses a 16-word FIFO so that full is reached quickly; clock ratios are the
// defaults. Sequence and checks:
//  - reset values of CTRL0 and STAT0, FIFO_LOW setting and the low output;
//  - 16 pairs written (both write orders) fill the FIFO: FULL, FIFO_LEVEL,
//    and a 17th commit is dropped;
//  - I2S mode: an independent I2S receiver decodes the written pairs in
//    order, one frame per 2048 clocks, and low rises again when the level
//    falls below the threshold;
//  - underrun: with the FIFO empty the I2S output carries zero samples;
//  - DAC mode: one FIFO word per 2048 clocks, the DAC's line count follows
//    the left sample's top bits, and the I2S output sees zero data;
//  - software reset (CTRL0.RST) empties the FIFO and silences I2S while
//    the registers keep their values.
module tb_audio_ip;
  import audio_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  logic low, mclk, sclk, lrck, sdata;
  logic [254:0] therm;
  int unsigned cycle = 0, frames, frame_cycle;
  logic [47:0] frame;
  int checks = 0, failures = 0;
  logic [47:0] written[$];
  int unsigned low_rises = 0;
  logic low_prev = 1'b0;

  audio_ip #(.FIFO_DEPTH(16)) dut (
    .clk, .rst, .wb_req_i(wb_req), .wb_rsp_o(wb_rsp), .low_o(low),
    .i2s_mclk_o(mclk), .i2s_sclk_o(sclk), .i2s_lrck_o(lrck), .i2s_sdata_o(sdata),
    .dac_therm_o(therm)
  );
  i2s_rx_model u_rx (.sclk, .lrck, .sdata, .resync(1'b0), .cycle,
                     .frames, .frame, .frame_cycle);

  always #5ns clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && low && !low_prev) low_rises++;
    low_prev <= low;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  `include "wb_bfm_tasks.svh"

  task automatic wait_frames(input int unsigned n);
    int unsigned target;
    target = frames + n;
    while (frames < target) begin @(posedge clk); #1ns; end
  endtask

  initial begin
    #10ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] q;
    logic [47:0] w;
    int unsigned fc_prev, lvl_prev, dac_reads;
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    wb_expect(8'h00, 32'h0, "CTRL0 reset");
    wb_expect(8'h04, 32'h2, "STAT0 reset: empty, not low");
    check(!low, "low clear with threshold 0");
    wb_write(8'h08, 32'd4);
    wb_expect(8'h04, 32'h3, "STAT0 empty and low");
    check(low, "low output with threshold 4");
    // fill the FIFO
    for (int i = 0; i < 16; i++) begin
      w = {$urandom, 16'($urandom)};
      if (i == 0) w = 48'h800001_7FFFFE;
      wb_push(w[47:24], w[23:0], i[0]);
      written.push_back(w);
    end
    wb_expect(8'h0C, 32'd16, "FIFO_LEVEL after 16 pairs");
    wb_expect(8'h04, 32'h4, "STAT0 full");
    check(!low, "low clear when full");
    wb_push(24'h123456, 24'h654321, 1'b0);
    wb_expect(8'h0C, 32'd16, "commit into a full FIFO dropped");
    // I2S playback
    wb_write(8'h00, 32'h8);
    wb_expect(8'h00, 32'h8, "CTRL0 readback");
    fc_prev = 0;
    for (int i = 0; i < 16; i++) begin
      wait_frames(1);
      if (i == 0) check(frame[23:0] == written[0][23:0], "first frame right sample");
      else check(frame == written[i], $sformatf("frame %0d: %h expected %h", i, frame, written[i]));
      if (i > 1) check(frame_cycle - fc_prev == 2048, "frame period 2048 clocks");
      fc_prev = frame_cycle;
    end
    wb_expect(8'h0C, 32'd0, "FIFO drained");
    wb_expect(8'h04, 32'h3, "STAT0 empty and low after draining");
    check(low_rises == 2, $sformatf("low asserted twice, saw %0d", low_rises));
    // underrun plays silence
    wait_frames(2);
    check(frame == 48'h0, "underrun frame is zero");
    // DAC mode
    written.delete();
    for (int i = 0; i < 8; i++) begin
      w = {$urandom, 16'($urandom)};
      wb_push(w[47:24], w[23:0], 1'b1);
      written.push_back(w);
    end
    wb_write(8'h00, 32'hE);   // I2S_EN, DAC_EN, MODE = DAC
    dac_reads = 0;
    lvl_prev = 8;
    for (int t = 0; t < 8 * 2048 + 100 && dac_reads < 8; t++) begin
      @(posedge clk); #1ns;
      if (dut.level != lvl_prev) begin
        check(dut.level == lvl_prev - 1, "one word per DAC strobe");
        check($countones(therm) == int'({~written[dac_reads][47], written[dac_reads][46:40]}),
              $sformatf("DAC sample %0d line count", dac_reads));
        lvl_prev = dut.level;
        dac_reads++;
      end
    end
    check(dac_reads == 8, $sformatf("8 DAC samples, saw %0d", dac_reads));
    wait_frames(2);
    check(frame == 48'h0, "I2S sees zero data in DAC mode");
    // software reset
    for (int i = 0; i < 5; i++) wb_push(24'(i), 24'(i), 1'b0);
    wb_write(8'h00, 32'h9);   // I2S_EN with RST
    wb_expect(8'h0C, 32'd0, "software reset empties FIFO");
    wb_expect(8'h00, 32'h9, "registers keep their value under RST");
    wb_expect(8'h08, 32'd4, "FIFO_LOW keeps its value under RST");
    repeat (100) @(posedge clk);
    #1ns check(!mclk && !sclk && !lrck && !sdata, "I2S silent under RST");
    wb_push(24'h1, 24'h2, 1'b0);
    wb_expect(8'h0C, 32'd0, "FIFO held in reset");
    wb_write(8'h00, 32'h8);
    wb_push(24'hABCDEF, 24'h135790, 1'b0);
    wb_expect(8'h0C, 32'd1, "FIFO usable after RST cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
