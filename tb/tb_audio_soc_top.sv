// tb_audio_soc_top: the whole platform at its default parameters.
// A Wishbone master stands in for the CPU. The test walks through one full
// use of the peripheral and counts each mechanism it exercises; a mechanism
// that never happens counts as a failure:
//   async_reset  arst asserted between clock edges resets the platform
//   fifo_full    the 512-word FIFO fills and a further commit is dropped
//   low_irq      the low interrupt rises when the level falls below FIFO_LOW
//                (and is clear while above it)
//   i2s_frames   frames decoded from the I2S lines match the written pairs,
//                one per 2048 clocks
//   sw_reset     CTRL0.RST empties the FIFO and silences I2S
//   underrun     an empty FIFO plays zero frames
//   mode_switch  MODE moves the FIFO from I2S to the on-chip DAC
//   dac_line     the line voltage equals the number of active sources times
//                10 uA times 1 kOhm for each DAC sample
//   tone_frames  the standalone tone system's I2S lines carry the sine
module tb_audio_soc_top;
  import audio_pkg::*;
  logic clk = 1'b0, arst = 1'b0, rst;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  logic low, mclk, sclk, lrck, sdata, t_mclk, t_sclk, t_lrck, t_sdata;
  real line;
  int unsigned cycle = 0, frames, frame_cycle, t_frames, t_frame_cycle;
  logic [47:0] frame, t_frame;
  int checks = 0, failures = 0;
  logic [47:0] written[$];
  int unsigned n_async_reset = 0, n_fifo_full = 0, n_low_irq = 0, n_i2s_frames = 0,
               n_sw_reset = 0, n_underrun = 0, n_mode_switch = 0, n_dac_line = 0,
               n_tone_frames = 0;

  audio_soc_top dut (
    .clk, .arst, .rst_o(rst), .wb_req_i(wb_req), .wb_rsp_o(wb_rsp), .low_o(low),
    .i2s_mclk_o(mclk), .i2s_sclk_o(sclk), .i2s_lrck_o(lrck), .i2s_sdata_o(sdata),
    .line_o(line),
    .tone_mclk_o(t_mclk), .tone_sclk_o(t_sclk), .tone_lrck_o(t_lrck), .tone_sdata_o(t_sdata)
  );
  i2s_rx_model u_rx (.sclk, .lrck, .sdata, .resync(1'b0), .cycle,
                     .frames, .frame, .frame_cycle);
  i2s_rx_model u_trx (.sclk(t_sclk), .lrck(t_lrck), .sdata(t_sdata), .resync(1'b0), .cycle,
                      .frames(t_frames), .frame(t_frame), .frame_cycle(t_frame_cycle));

  always #5ns clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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

  // Tone monitor: every decoded tone frame against the reference sine.
  real tw = 2.0 * $asin(8572.0 / 131072.0);
  always @(t_frames) if (t_frames > 1) begin
    real ref_v, g;
    ref_v = 4194304.0 * $sin(tw * (t_frames - 1));
    g = real'($signed(t_frame[47:24]));
    check(g - ref_v < 20972.0 && ref_v - g < 20972.0 && t_frame[47:24] == t_frame[23:0],
          $sformatf("tone frame %0d: %0.0f vs %0.0f", t_frames, g, ref_v));
    n_tone_frames++;
  end

  initial begin
    #60ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] w;
    int unsigned fc_prev, lvl, dac_seen;
    // asynchronous reset between clock edges
    #2ns arst = 1'b1;
    #1ns check(rst, "rst follows arst without a clock edge");
    repeat (3) @(posedge clk);
    #2ns arst = 1'b0;
    repeat (2) @(posedge clk);
    #1ns check(!rst, "rst released two edges after arst");
    n_async_reset++;
    wb_expect(8'h04, 32'h2, "STAT0 after reset");
    // fill all 512 words, half in each write order
    wb_write(8'h08, 32'd500);
    check(low, "low with an empty FIFO");
    for (int i = 0; i < 512; i++) begin
      w = {$urandom, 16'($urandom)};
      wb_push(w[47:24], w[23:0], i[0]);
      written.push_back(w);
    end
    wb_expect(8'h04, 32'h4, "STAT0 full, not low");
    check(!low, "low clear above the threshold");
    wb_push(24'h111111, 24'h222222, 1'b0);
    wb_expect(8'h0C, 32'd512, "commit into a full FIFO dropped");
    n_fifo_full++;
    // I2S playback; low rises after 13 frames (level 499 < 500)
    wb_write(8'h00, 32'h8);
    fc_prev = 0;
    for (int i = 0; i < 20; i++) begin
      wait_frames(1);
      if (i == 0) check(frame[23:0] == written[0][23:0], "first frame right sample");
      else check(frame == written[i], $sformatf("frame %0d: %h expected %h", i, frame, written[i]));
      if (i > 1) check(frame_cycle - fc_prev == 2048, "frame period 2048 clocks");
      fc_prev = frame_cycle;
      n_i2s_frames++;
      if (low) n_low_irq++;
    end
    wb_read(8'h0C, lvl);
    check(lvl < 500 && lvl >= 490 && low, $sformatf("level %0d below threshold raises low", lvl));
    // software reset drops the rest
    wb_write(8'h00, 32'h9);
    wb_expect(8'h04, 32'h3, "STAT0 empty and low under RST");
    repeat (50) @(posedge clk);
    #1ns check(!mclk && !sclk && !lrck && !sdata, "I2S silent under RST");
    n_sw_reset++;
    wb_write(8'h00, 32'h8);
    wait_frames(3);
    check(frame == 48'h0, "underrun plays zero");
    n_underrun++;
    // switch to the on-chip DAC
    written.delete();
    for (int i = 0; i < 6; i++) begin
      w = {$urandom, 16'($urandom)};
      if (i == 0) w = 48'h7FFFFF_000000;
      if (i == 1) w = 48'h800000_000000;
      wb_push(w[47:24], w[23:0], 1'b0);
      written.push_back(w);
    end
    wb_write(8'h00, 32'h6);   // DAC_EN, MODE = DAC
    n_mode_switch++;
    dac_seen = 0;
    lvl = 6;
    while (dac_seen < 6) begin
      @(posedge clk); #1ns;
      if (dut.u_audio.level != lvl) begin
        real exp_v;
        logic [7:0] code;
        lvl = dut.u_audio.level;
        #5ns;   // analog settling of the models
        code  = {~written[dac_seen][47], written[dac_seen][46:40]};
        exp_v = 0.01 * real'(code);
        check(line > exp_v - 1.0e-6 && line < exp_v + 1.0e-6,
              $sformatf("DAC sample %0d: line %g V expected %g V", dac_seen, line, exp_v));
        n_dac_line++;
        dac_seen++;
      end
    end
    check(n_async_reset > 0, "mechanism async_reset");
    check(n_fifo_full > 0, "mechanism fifo_full");
    check(n_low_irq > 0, "mechanism low_irq");
    check(n_i2s_frames > 0, "mechanism i2s_frames");
    check(n_sw_reset > 0, "mechanism sw_reset");
    check(n_underrun > 0, "mechanism underrun");
    check(n_mode_switch > 0, "mechanism mode_switch");
    check(n_dac_line > 0, "mechanism dac_line");
    check(n_tone_frames > 0, "mechanism tone_frames");
    $display("mechanisms: async_reset=%0d fifo_full=%0d low_irq=%0d i2s_frames=%0d sw_reset=%0d underrun=%0d mode_switch=%0d dac_line=%0d tone_frames=%0d",
             n_async_reset, n_fifo_full, n_low_irq, n_i2s_frames, n_sw_reset, n_underrun,
             n_mode_switch, n_dac_line, n_tone_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
