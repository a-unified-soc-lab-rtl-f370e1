// tb_i2s_tx: I2S transmitter with its clock divider at the default ratios.
// A fall-through sample source answers each rd with a new random word; an
// independent I2S receiver decodes the lines. Checks every decoded frame
// against the words handed out, one rd per frame, a frame period of 2048
// clocks (48 kHz at 98.304 MHz), MCLK and SCLK periods of 8 and 32 clocks,
// idle-low outputs while disabled, and restart after re-enable.
module tb_i2s_tx;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic mclk_tick, sclk_tick, rd, mclk, sclk, lrck, sdata;
  logic [47:0] sample;
  int unsigned cycle = 0, frames, frame_cycle;
  logic [47:0] frame;
  int checks = 0, failures = 0;
  logic [47:0] sent[$];
  int unsigned rd_cycles[$];
  int unsigned seen = 0, m_last = 0, s_last = 0, m_rise = 0, s_rise = 0;
  logic m_prev = 0, s_prev = 0;

  i2s_clock_divider u_div (.clk, .rst, .mclk_tick, .sclk_tick);
  i2s_tx dut (.clk, .rst, .en, .mclk_tick, .sclk_tick, .sample, .rd,
              .mclk, .sclk, .lrck, .sdata);
  i2s_rx_model u_rx (.sclk, .lrck, .sdata, .resync(!en), .cycle, .frames, .frame, .frame_cycle);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial sample = {$urandom, 16'($urandom)};
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rd) begin
      sent.push_back(sample);
      rd_cycles.push_back(cycle);
      sample <= {$urandom, 16'($urandom)};
    end
    if (en && !rst) begin
      if (mclk && !m_prev) begin
        if (m_rise > 0) check(cycle - m_last == 8, "MCLK period 8");
        m_last = cycle; m_rise++;
      end
      if (sclk && !s_prev) begin
        if (s_rise > 0) check(cycle - s_last == 32, "SCLK period 32");
        s_last = cycle; s_rise++;
      end
    end
    m_prev = mclk; s_prev = sclk;
  end

  initial begin
    #5ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    repeat (100) @(posedge clk);
    #1ns check(!mclk && !sclk && !lrck && !sdata && !rd, "outputs idle while disabled");
    en = 1'b1;
    for (int k = 0; k < 2; k++) begin
      int unsigned target;
      bit first;
      target = frames + 10;
      first  = 1'b1;
      while (frames < target) begin
        @(posedge clk); #1ns;
        if (frames != seen) begin
          // frames are decoded in order; frame n carries word n. The first
          // frame after enable has no LRCK edge before its left slot, so a
          // receiver can only take its right sample.
          check(sent.size() > 0 && (first ? frame[23:0] == sent[0][23:0] : frame == sent[0]),
                $sformatf("frame %0d data %h expected %h", frames, frame, sent.size() ? sent[0] : 48'h0));
          if (sent.size() > 0) void'(sent.pop_front());
          seen = frames;
          first = 1'b0;
        end
      end
      for (int i = 1; i < rd_cycles.size(); i++)
        check(rd_cycles[i] - rd_cycles[i-1] == 2048, "one read per 2048 clocks");
      check(rd_cycles.size() >= 9, $sformatf("reads issued %0d", rd_cycles.size()));
      // disable mid-frame: all lines drop, then restart cleanly
      repeat (700) @(posedge clk);
      #1ns en = 1'b0;
      @(posedge clk); #1ns;
      check(!mclk && !sclk && !lrck && !sdata, "lines low after disable");
      repeat (300) @(posedge clk);
      sent.delete(); rd_cycles.delete(); m_rise = 0; s_rise = 0;
      seen = frames;
      #1ns en = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
