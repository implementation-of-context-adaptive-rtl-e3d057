// bit_fifo -- first-in first-out buffer of the compressed bit stream.
//
// Holds DEPTH entries of WIDTH bits (128 Kbit of single bits by default, the
// size on the processor's block diagram) between the parallel to serial
// converter and the serial channel. Writes happen on wr_en while not full;
// a read request rd_en while not empty gives the oldest entry on dout one clock
// later, flagged by dout_valid (synchronous read, so the array maps to a block
// RAM). 'level' counts the entries held. full, empty and the read latency are
// this design's choices. Reset is asynchronous, active low, and empties the
// FIFO; the array itself is not reset.
module bit_fifo #(
  parameter int DEPTH = 131072,
  parameter int WIDTH = 1
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     dout_valid,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (level == (AW+1)'(DEPTH));
  assign empty = (level == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
    if (do_rd) dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      wptr       <= '0;
      rptr       <= '0;
      level      <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= do_rd;
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + AW'(1);
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + AW'(1);
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
