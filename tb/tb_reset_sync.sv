// tb_reset_sync: checks the reset synchronizer.
// Asserting arst between clock edges must raise rst at once; releasing it
// must keep rst high for exactly STAGES (2) more rising edges.
module tb_reset_sync;
  logic clk = 1'b0, arst = 1'b0, rst;
  int checks = 0, failures = 0;

  reset_sync dut (.clk, .arst, .rst);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int round = 0; round < 4; round++) begin
      // let the chain settle to released
      arst = 1'b0;
      repeat (4) @(posedge clk);
      #1ns check(rst == 1'b0, "rst low after release");
      // assert between edges: rst must follow without a clock edge
      #2ns arst = 1'b1;
      #1ns check(rst == 1'b1, "asynchronous assertion");
      repeat (3) @(posedge clk);
      #2ns arst = 1'b0;
      @(posedge clk); #1ns check(rst == 1'b1, "still in reset after 1 edge");
      @(posedge clk); #1ns check(rst == 1'b0, "released after 2 edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
