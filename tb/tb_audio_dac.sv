// tb_audio_dac: digital DAC path (clock divider and thermometer encoder).
// A fall-through source answers each rd with a new random stereo word.
// Checks one read every 2048 clocks, and that after each read the number of
// active lines equals the left sample's top 8 bits in offset binary
// (sign bit inverted), with the right sample ignored. Also checks that no
// read happens while disabled and that the code holds.
module tb_audio_dac;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, rd;
  logic [47:0] sample;
  logic [254:0] therm;
  int checks = 0, failures = 0, n_rd = 0, last_rd = -1, cyc = 0;
  int exp_count;

  audio_dac dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial sample = {$urandom, 16'($urandom)};
  initial exp_count = 128;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd) begin
      if (last_rd >= 0) check(cyc - last_rd == 2048, "read period 2048 clocks");
      last_rd = cyc;
      n_rd++;
      exp_count = int'({~sample[47], sample[46:40]});
      sample <= {$urandom, 16'($urandom)};
    end
  end

  initial begin
    #3ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    repeat (3000) begin @(posedge clk); #1ns; check(!rd && $countones(therm) == 128, "idle at mid-scale"); end
    en = 1'b1;
    // force the extremes into the first samples
    sample = 48'h800000_123456;
    while (n_rd < 1) begin @(posedge clk); #1ns; end
    check($countones(therm) == 0, "most negative sample gives 0 lines");
    sample = 48'h7FFFFF_000000;
    while (n_rd < 2) begin @(posedge clk); #1ns; end
    check($countones(therm) == 255, "most positive sample gives 255 lines");
    sample = 48'h000000_7FFFFF;
    while (n_rd < 3) begin @(posedge clk); #1ns; end
    check($countones(therm) == 128, "zero sample gives mid-scale");
    while (n_rd < 40) begin
      @(posedge clk); #1ns;
      check($countones(therm) == exp_count, "line count follows left MSBs");
      check(therm == ((255'(1) << exp_count) - 255'(1)) || exp_count == 255, "thermometer pattern");
    end
    en = 1'b0;
    begin
      int hold;
      hold = $countones(therm);
      repeat (5000) begin @(posedge clk); #1ns; check(!rd && $countones(therm) == hold, "holds while disabled"); end
    end
    check(n_rd == 40, "40 samples converted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
