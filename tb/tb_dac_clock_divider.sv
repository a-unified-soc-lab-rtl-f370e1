// tb_dac_clock_divider: the DAC sampling strobe.
// With DIV = 2048 the strobe must be one clock wide, come every 2048 clocks
// (48 kHz at 98.304 MHz), the first one 2048 clocks after enable, and never
// while en is low.
module tb_dac_clock_divider;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, strobe;
  int checks = 0, failures = 0;
  int cyc, last, n;

  dac_clock_divider dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1ns;
      check(!strobe, "no strobe while disabled");
    end
    for (int round = 0; round < 2; round++) begin
      en = 1'b1; last = 0; n = 0;
      // count clocks from the enabling edge
      for (cyc = 1; cyc <= 5 * 2048 + 100; cyc++) begin
        check(strobe == (cyc % 2048 == 0), $sformatf("strobe at clock %0d", cyc));
        if (strobe) n++;
        @(posedge clk); #1ns;
      end
      check(n == 5, $sformatf("five strobes, saw %0d", n));
      en = 1'b0;
      repeat (500) begin @(posedge clk); #1ns; check(!strobe, "no strobe after disable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
