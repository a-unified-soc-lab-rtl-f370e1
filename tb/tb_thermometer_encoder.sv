// tb_thermometer_encoder: all 256 codes of the 8-bit to 255-line encoder.
// For each code N the registered output must have exactly lines 0..N-1 on
// (popcount N and the pattern 2^N - 1), change only on ce, and reset to
// mid-scale (128 lines on).
module tb_thermometer_encoder;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [7:0] code = '0;
  logic [254:0] therm, exp_t;
  int checks = 0, failures = 0;

  thermometer_encoder dut (.*);

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
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    check($countones(therm) == 128 && therm[127] && !therm[128], "reset to mid-scale");
    for (int n = 0; n < 256; n++) begin
      code = 8'(n); ce = 1'b1;
      @(posedge clk); #1ns;
      exp_t = (255'(1) << n) - 255'(1);
      if (n == 255) exp_t = '1;
      check(therm == exp_t, $sformatf("code %0d pattern", n));
      check($countones(therm) == n, $sformatf("code %0d count", n));
      // without ce the output must hold
      ce = 1'b0; code = 8'($urandom);
      @(posedge clk); #1ns;
      check(therm == exp_t, $sformatf("code %0d held without ce", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
