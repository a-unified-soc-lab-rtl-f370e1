// tb_sine_i2s_system: standalone tone system end to end.
// Decodes the I2S lines with an independent receiver and compares 100
// frames against 2^22 * sin(2*pi*n/48) (the 1 kHz tone at 48 kHz), within
// 0.5 % of the amplitude, with left equal to right and a frame period of
// 2048 clocks. The first frame only has its right sample checked. A
// 16-word FIFO makes the generator wait on a full FIFO early in the run.
module tb_sine_i2s_system;
  logic clk = 1'b0, rst = 1'b1;
  logic mclk, sclk, lrck, sdata;
  int unsigned cycle = 0, frames, frame_cycle, fc_prev = 0;
  logic [47:0] frame;
  int checks = 0, failures = 0;
  real w, ref_v, gl, gr;

  sine_i2s_system #(.FIFO_DEPTH(16)) dut (.clk, .rst, .i2s_mclk_o(mclk), .i2s_sclk_o(sclk),
                       .i2s_lrck_o(lrck), .i2s_sdata_o(sdata));
  i2s_rx_model u_rx (.sclk, .lrck, .sdata, .resync(1'b0), .cycle,
                     .frames, .frame, .frame_cycle);

  always #5ns clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int unsigned seen;
    w = 2.0 * $asin(8572.0 / 131072.0);
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    seen = 0;
    while (seen < 100) begin
      @(posedge clk); #1ns;
      if (frames != seen) begin
        // decoded frame k carries generated sample k-1 (the first frame's
        // left half has no LRCK edge before it)
        ref_v = 4194304.0 * $sin(w * (frames - 1));
        gl = real'($signed(frame[47:24]));
        gr = real'($signed(frame[23:0]));
        check(gr - ref_v < 20972.0 && ref_v - gr < 20972.0,
              $sformatf("frame %0d right %0.0f vs %0.0f", frames, gr, ref_v));
        if (frames > 1) begin
          check(gl == gr, "left equals right");
          if (frames > 2) check(frame_cycle - fc_prev == 2048, "frame period 2048 clocks");
        end
        fc_prev = frame_cycle;
        seen = frames;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
