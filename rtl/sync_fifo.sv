// sync_fifo: output buffer of one router port.
//
// A synchronous FIFO of DEPTH entries of WIDTH bits, its storage a plain
// array that maps to distributed RAM. The read side is first-word
// fall-through: while `empty` is low, `rd_data` already shows the oldest
// entry, and `rd_en` removes it at the clock edge. Writes with `wr_en` land
// at the clock edge and are visible on `rd_data` one cycle later. Read and
// write pointers carry one extra bit to tell full from empty. A read while
// empty is ignored; a write while full is a protocol error of the writer
// (checked by an assertion) and is ignored. Synchronous active-high reset.
//
// One FIFO per output port and the distributed-RAM storage follow the router
// description; the depth (default 64 entries) and the fall-through read are
// this design's choices.
module sync_fifo #(
  parameter int WIDTH = 9,
  parameter int DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   full,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rd_data,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign count = wr_ptr - rd_ptr;
  assign empty = (wr_ptr == rd_ptr);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assign rd_data = mem[rd_ptr[AW-1:0]];

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr_en |-> !full);

endmodule
