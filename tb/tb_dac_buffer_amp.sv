// tb_dac_buffer_amp: behavioural output amplifier.
// The line voltage must be the input current times 1 kOhm, clipped to
// 0..3.3 V, after the stage delay.
module tb_dac_buffer_amp;
  real i_in = 0.0, v_line, exp_v;
  int checks = 0, failures = 0;

  dac_buffer_amp dut (.i_in, .v_line);

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
    for (int n = -5; n <= 400; n++) begin
      i_in = n * 10.0e-6;
      #10ns;
      exp_v = n * 0.01;
      if (exp_v > 3.3) exp_v = 3.3;
      if (exp_v < 0.0) exp_v = 0.0;
      check(v_line > exp_v - 1.0e-6 && v_line < exp_v + 1.0e-6,
            $sformatf("%g A gives %g V, expected %g V", i_in, v_line, exp_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
