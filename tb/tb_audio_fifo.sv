// tb_audio_fifo: random pushes and pops against a queue model.
// Checks the fall-through data, level, full and empty every cycle, that
// writes when full and reads when empty are ignored, zero data when empty,
// and simultaneous write and read. Uses DEPTH = 8 to reach full often.
module tb_audio_fifo;
  localparam int DEPTH = 8;
  localparam int LW = $clog2(DEPTH) + 1;
  logic clk = 1'b0, rst = 1'b1, wr = 1'b0, rd = 1'b0;
  logic [47:0] wdata = '0, rdata;
  logic [LW-1:0] level;
  logic full, empty;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [47:0] model[$];

  audio_fifo #(.WIDTH(48), .DEPTH(DEPTH)) dut (.*);

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
    for (int i = 0; i < 4000; i++) begin
      // phase-dependent bias so the FIFO swings between empty and full
      wr    = ($urandom_range(99) < ((i / 200) % 2 ? 30 : 70));
      rd    = ($urandom_range(99) < ((i / 200) % 2 ? 70 : 30));
      wdata = {$urandom, 16'($urandom)};
      #1ns;
      check(level == LW'(model.size()), "level");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      check(rdata == (model.size() ? model[0] : 48'h0), "rdata");
      if (full) n_full++;
      if (wr && rd && !full && !empty) n_both++;
      begin
        bit do_pop, do_push;
        do_pop  = rd && model.size() > 0;
        do_push = wr && model.size() < DEPTH;
        @(posedge clk);
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(wdata);
      end
      #1ns;
    end
    check(n_full > 0, "full reached");
    check(n_both > 0, "simultaneous push and pop seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
