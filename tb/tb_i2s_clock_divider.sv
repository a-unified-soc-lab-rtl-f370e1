// tb_i2s_clock_divider: strobe spacing of the I2S clock divider.
// With the defaults the MCLK strobe must come every 4 clocks and the SCLK
// strobe every 16 (half periods of clk/8 and clk/32), aligned after reset.
module tb_i2s_clock_divider;
  logic clk = 1'b0, rst = 1'b1, mclk_tick, sclk_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_m = -1, last_s = -1, n_m = 0, n_s = 0;

  i2s_clock_divider dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    for (cyc = 1; cyc <= 4000; cyc++) begin
      @(posedge clk); #1ns;
      // values seen here were produced during clock 'cyc' after reset
      if (mclk_tick) begin
        check((last_m < 0 ? cyc + 1 : cyc - last_m) == 4, "MCLK strobe spacing 4");
        last_m = cyc; n_m++;
      end
      if (sclk_tick) begin
        check((last_s < 0 ? cyc + 1 : cyc - last_s) == 16, "SCLK strobe spacing 16");
        check(mclk_tick, "SCLK strobe aligned with an MCLK strobe");
        last_s = cyc; n_s++;
      end
    end
    check(n_m == 1000 && n_s == 250, $sformatf("strobe counts %0d %0d", n_m, n_s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
