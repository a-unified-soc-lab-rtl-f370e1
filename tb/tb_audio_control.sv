// tb_audio_control: register file and Wishbone protocol of the Control block.
// Checks: one-cycle acknowledge, CTRL0 and FIFO_LOW read back, read-only
// STAT0 and FIFO_LEVEL from their inputs, write-only sample registers read
// as zero, COMMIT in both write orders with the committing write's sample,
// no push without COMMIT, and a commit dropped when the FIFO is full.
module tb_audio_control;
  import audio_pkg::*;
  localparam int LW = 10;
  logic clk = 1'b0, rst = 1'b1;
  wb_req_t req = '0;
  wb_rsp_t rsp;
  ctrl0_t ctrl;
  logic [LW-1:0] thr, level = '0;
  logic fifo_wr, full = 1'b0, low = 1'b0;
  logic [47:0] fifo_wdata;
  int checks = 0, failures = 0;
  logic [47:0] pushed[$];

  audio_control #(.LEVEL_W(LW)) dut (
    .clk, .rst, .wb_req_i(req), .wb_rsp_o(rsp), .ctrl_o(ctrl), .threshold_o(thr),
    .fifo_wr_o(fifo_wr), .fifo_wdata_o(fifo_wdata), .fifo_full_i(full),
    .fifo_level_i(level), .low_i(low)
  );

  always #5ns clk = ~clk;
  always @(posedge clk) if (fifo_wr) pushed.push_back(fifo_wdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // One Wishbone access; checks that ack comes exactly one cycle later.
  task automatic wb(input bit we, input logic [7:0] a, input logic [31:0] d,
                    output logic [31:0] q);
    int n = 0;
    req.cyc = 1; req.stb = 1; req.we = we; req.adr = 32'(a); req.dat = d; req.sel = 4'hF;
    do begin @(posedge clk); #1ns; n++; end while (!rsp.ack && n < 10);
    check(n == 1, $sformatf("ack latency %0d", n));
    q = rsp.dat;
    req = '0;
    @(posedge clk); #1ns;
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] q; wb(1, a, d, q);
  endtask

  task automatic rd_check(input logic [7:0] a, input logic [31:0] exp, input string what);
    logic [31:0] q; wb(0, a, 32'h0, q);
    check(q == exp, $sformatf("%s: read %h expected %h", what, q, exp));
  endtask

  initial begin
    #1ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] l, r;
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    rd_check(8'h00, 32'h0, "CTRL0 after reset");
    for (int v = 0; v < 16; v++) begin
      wr(8'h00, 32'hFFFF_FFF0 | v);
      check(ctrl == ctrl0_t'(v), "CTRL0 drives ctrl_o");
      rd_check(8'h00, 32'(v), "CTRL0 readback");
    end
    check({ctrl.i2s_en, ctrl.dac_en, ctrl.mode, ctrl.rst} == 4'hF, "CTRL0 field order");
    wr(8'h00, 32'h0000_0008);
    check(ctrl.i2s_en && !ctrl.dac_en && ctrl.mode == MODE_I2S && !ctrl.rst, "I2S_EN is bit 3");
    wr(8'h00, 32'h0000_0002);
    check(ctrl.mode == MODE_DAC && !ctrl.i2s_en, "MODE is bit 1");
    wr(8'h08, 32'h0000_0123);
    check(thr == 10'h123, "threshold_o");
    rd_check(8'h08, 32'h123, "FIFO_LOW readback");
    // read-only registers follow their inputs, writes do not change them
    level = 10'd37; full = 1'b1; low = 1'b0;
    rd_check(8'h0C, 32'd37, "FIFO_LEVEL");
    rd_check(8'h04, 32'h4, "STAT0 full");
    level = 10'd0; full = 1'b0; low = 1'b1;
    rd_check(8'h04, 32'h3, "STAT0 empty+low");
    wr(8'h04, 32'hFFFF_FFFF);
    wr(8'h0C, 32'hFFFF_FFFF);
    rd_check(8'h04, 32'h3, "STAT0 unchanged by write");
    rd_check(8'h0C, 32'h0, "FIFO_LEVEL unchanged by write");
    level = 10'd5; low = 1'b0;
    // samples: left then right with COMMIT
    for (int i = 0; i < 20; i++) begin
      l = 32'($urandom) & 32'h00FF_FFFF; r = 32'($urandom) & 32'h00FF_FFFF;
      pushed.delete();
      if (i % 2 == 0) begin
        wr(8'h10, l);
        check(pushed.size() == 0, "no push without COMMIT");
        wr(8'h14, r | 32'h8000_0000);
      end else begin
        wr(8'h14, r | 32'h7F00_0000);
        check(pushed.size() == 0, "reserved bits do not commit");
        wr(8'h10, l | 32'h8000_0000);
      end
      check(pushed.size() == 1, "one push per COMMIT");
      if (pushed.size() == 1)
        check(pushed[0] == {l[23:0], r[23:0]}, $sformatf("pushed %h", pushed[0]));
    end
    rd_check(8'h10, 32'h0, "AUDIO_LEFT reads zero");
    rd_check(8'h14, 32'h0, "AUDIO_RIGHT reads zero");
    rd_check(8'h1C, 32'h0, "unmapped reads zero");
    // commit into a full FIFO is dropped
    full = 1'b1; pushed.delete();
    wr(8'h10, 32'h8000_0001);
    check(pushed.size() == 0, "no push when full");
    full = 1'b0;
    // a second cycle right after reset clears all
    rst = 1'b1; @(posedge clk); #1ns rst = 1'b0;
    rd_check(8'h00, 32'h0, "CTRL0 cleared by reset");
    rd_check(8'h08, 32'h0, "FIFO_LOW cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
