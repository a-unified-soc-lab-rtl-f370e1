// tb_sine_generator: tone from the magic-circle oscillator.
// Takes 480 samples (ten periods at the default 1/48 cycle per sample) with
// random back-pressure from the full input, and compares each against
// 2^22 * sin(2*pi*n/48), computed here with $sin, within 0.5 % of full
// amplitude. Also checks that no word is offered while full and that left
// and right carry the same sample.
module tb_sine_generator;
  logic clk = 1'b0, rst = 1'b1, full = 1'b0, wr;
  logic [47:0] wdata;
  int checks = 0, failures = 0, n = 0, n_stall = 0;
  real ref_v, got, w;

  sine_generator dut (.*);

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
    // exact rotation angle of the oscillator: w = 2*asin(E/2^17)
    w = 2.0 * $asin(8572.0 / 131072.0);
    check(w > 2.0 * 3.14159265 / 48.0 * 0.999 && w < 2.0 * 3.14159265 / 48.0 * 1.001, "tone is 1/48 of the sample rate");
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    while (n < 480) begin
      full = ($urandom_range(3) == 0);
      #1ns;
      if (full) begin
        check(!wr, "no write while full");
        n_stall++;
      end else begin
        check(wr, "write offered when not full");
        check(wdata[47:24] == wdata[23:0], "left equals right");
        got   = real'($signed(wdata[23:0]));
        ref_v = 4194304.0 * $sin(w * n);
        check(got - ref_v < 0.005 * 4194304.0 && ref_v - got < 0.005 * 4194304.0,
              $sformatf("sample %0d: %0.0f vs %0.0f", n, got, ref_v));
        n++;
      end
      @(posedge clk); #1ns;
    end
    check(n_stall > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
