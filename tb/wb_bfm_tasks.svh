// wb_bfm_tasks.svh: Wishbone master tasks shared by the peripheral testbenches.
// Included inside a testbench module that declares clk, wb_req (wb_req_t),
// wb_rsp (wb_rsp_t) and the check() task. Each access raises cyc and stb,
// waits for ack (at most 16 clocks, which counts as a failure), checks the
// one-cycle acknowledge of the peripheral, and releases the bus for a clock.

task automatic wb_access(input bit we, input logic [7:0] a, input logic [31:0] d,
                         output logic [31:0] q);
  int n;
  n = 0;
  wb_req.cyc = 1'b1; wb_req.stb = 1'b1; wb_req.we = we;
  wb_req.adr = 32'(a); wb_req.dat = d; wb_req.sel = 4'hF;
  do begin @(posedge clk); #1ns; n++; end while (!wb_rsp.ack && n < 16);
  check(n == 1, $sformatf("wishbone ack after %0d clocks", n));
  q = wb_rsp.dat;
  wb_req = '0;
  @(posedge clk); #1ns;
endtask

task automatic wb_write(input logic [7:0] a, input logic [31:0] d);
  logic [31:0] q;
  wb_access(1'b1, a, d, q);
endtask

task automatic wb_read(input logic [7:0] a, output logic [31:0] q);
  wb_access(1'b0, a, 32'h0, q);
endtask

task automatic wb_expect(input logic [7:0] a, input logic [31:0] exp, input string what);
  logic [31:0] q;
  wb_access(1'b0, a, 32'h0, q);
  check(q == exp, $sformatf("%s: read %h, expected %h", what, q, exp));
endtask

// Write one stereo pair, committing with the second write; 'order' picks
// which register is written first.
task automatic wb_push(input logic [23:0] l, input logic [23:0] r, input bit order);
  if (!order) begin
    wb_write(8'h10, {8'h00, l});
    wb_write(8'h14, {8'h80, r});
  end else begin
    wb_write(8'h14, {8'h00, r});
    wb_write(8'h10, {8'h80, l});
  end
endtask
