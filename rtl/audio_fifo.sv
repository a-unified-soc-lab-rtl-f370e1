// audio_fifo: synchronous first-word-fall-through FIFO for stereo samples.
//
// One word holds a left and a right 24-bit sample ({left, right}, 48 bits).
// Words are stored in a DEPTH-entry array addressed by a write and a read
// pointer; the level counter tracks the number of words held. The oldest word
// is always visible on rdata, so a consumer takes it in the same cycle as it
// pulses rd. A write when full and a read when empty are ignored; while
// empty, rdata reads zero so that a consumer that underruns plays silence.
// Interface: wr/wdata push, rd pops, level/full/empty report the fill state,
// all synchronous to clk with an active-high synchronous reset that empties
// the FIFO. A write and a read in the same cycle leave the level unchanged.
// The FIFO's role (a 48-bit stereo buffer with level and full outputs) is the
// peripheral's; the depth, the fall-through read and the zero-on-empty
// output are this design's choices.
module audio_fifo #(
  parameter int unsigned WIDTH   = 48,
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned LEVEL_W = $clog2(DEPTH) + 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               wr,
  input  logic [WIDTH-1:0]   wdata,
  input  logic               rd,
  output logic [WIDTH-1:0]   rdata,
  output logic [LEVEL_W-1:0] level,
  output logic               full,
  output logic               empty
);

  localparam int unsigned PTR_W = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  logic do_wr, do_rd;

  assign full  = (level == LEVEL_W'(DEPTH));
  assign empty = (level == '0);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  assign rdata = empty ? '0 : mem[rd_ptr];

  // The level can never pass the depth.
  level_in_range: assert property (@(posedge clk) disable iff (rst)
    level <= LEVEL_W'(DEPTH));

  initial begin
    assert (DEPTH >= 2 && (1 << PTR_W) == DEPTH)
      else $error("audio_fifo: DEPTH must be a power of two");
  end

endmodule
