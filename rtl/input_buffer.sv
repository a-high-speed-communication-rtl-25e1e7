// input_buffer: packet store on the input side of the router (the "Register"
// block between the input port and the controller).
//
// The buffer holds one complete packet per output port: slot v (a virtual
// channel) receives only packets addressed to port v. A slot spans
// 2**PKT_IDX_W bytes of one memory array, enough for the longest packet
// (header + 63 payload bytes + FCS = 65 bytes). One write port fills the slot
// being received, and one asynchronous read port (distributed-RAM style)
// drains the slot being forwarded; the controller never uses the same slot on
// both ports at once.
//
// Per slot the buffer keeps a `full` flag and the packet length. `commit`
// marks a slot as holding a checked packet of `commit_len` bytes; `release`
// frees a slot after it has been forwarded. Both take effect at the next
// clock edge. Reset clears the flags; the memory itself is not reset and is
// only read where it was written.
//
// Input buffering that holds a packet until it has fully arrived follows the
// router specification; the slot-per-port organisation is this design's
// reading of the virtual channels that the router description mentions.
module input_buffer
  import router_pkg::*;
#(
  parameter int NUM_VC = NUM_OUT,
  parameter int IDX_W  = PKT_IDX_W
) (
  input  logic                       clk,
  input  logic                       rst,
  // write port (receive side)
  input  logic                       wr_en,
  input  logic [$clog2(NUM_VC)-1:0]  wr_vc,
  input  logic [IDX_W-1:0]           wr_idx,
  input  byte_t                      wr_data,
  // read port (forward side), combinational
  input  logic [$clog2(NUM_VC)-1:0]  rd_vc,
  input  logic [IDX_W-1:0]           rd_idx,
  output byte_t                      rd_data,
  // slot status
  input  logic                       commit,
  input  logic [$clog2(NUM_VC)-1:0]  commit_vc,
  input  logic [IDX_W-1:0]           commit_len,
  input  logic                       release_en,
  input  logic [$clog2(NUM_VC)-1:0]  release_vc,
  output logic [NUM_VC-1:0]          full,
  output logic [NUM_VC-1:0][IDX_W-1:0] len
);

  localparam int VW    = $clog2(NUM_VC);
  localparam int DEPTH = NUM_VC << IDX_W;

  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_vc, wr_idx}] <= wr_data;
  end

  assign rd_data = mem[{rd_vc, rd_idx}];

  always_ff @(posedge clk) begin
    if (rst) begin
      full <= '0;
      len  <= '0;
    end else begin
      if (release_en) full[release_vc] <= 1'b0;
      if (commit) begin
        full[commit_vc] <= 1'b1;
        len[commit_vc]  <= commit_len;
      end
    end
  end

  // A slot is committed only while free, and written only while free.
  a_commit_free: assert property (@(posedge clk) disable iff (rst)
    commit |-> !full[commit_vc]);
  a_write_free: assert property (@(posedge clk) disable iff (rst)
    wr_en |-> !full[wr_vc]);

  logic unused_vw;
  assign unused_vw = ^VW;

endmodule
