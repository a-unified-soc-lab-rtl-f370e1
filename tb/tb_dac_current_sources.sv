// tb_dac_current_sources: behavioural current-source array.
// For random switch patterns the summed current must equal the number of
// active lines times the 10 uA unit current, after the settling delay.
module tb_dac_current_sources;
  logic [254:0] sw = '0;
  real i_out;
  int checks = 0, failures = 0;

  dac_current_sources dut (.sw, .i_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #10ns;
    for (int t = 0; t < 300; t++) begin
      int n;
      n = 0;
      for (int i = 0; i < 255; i++) begin
        sw[i] = ($urandom_range(t % 7) == 0);
        n += int'(sw[i]);
      end
      if (t == 0) begin sw = '0; n = 0; end
      if (t == 1) begin sw = '1; n = 255; end
      #10ns;
      check(i_out > n * 10.0e-6 - 1.0e-9 && i_out < n * 10.0e-6 + 1.0e-9,
            $sformatf("%0d sources: %g A", n, i_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
