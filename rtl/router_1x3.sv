// router_1x3: store-and-forward packet router with one input and three
// output ports.
//
// Packets arrive on the 8-bit `data` port framed by `packet_valid`: a
// destination address (DA) byte, 1 to 63 payload bytes and a frame check
// sequence (FCS) byte, the XOR of header and payload. The router_controller
// writes each packet into the input_buffer slot of the port whose address
// equals the DA, checks FCS and length when the packet has ended, and either
// commits it or discards it (`err` pulses for a bad packet). A rotating-priority
// arbiter then picks a committed packet, and the packet is copied byte by
// byte through the switch_fabric into that port's output FIFO (sync_fifo),
// pausing while the FIFO is full. Each output port shows the FIFO head on
// `data_out[i]` with `valid_out[i]` high and `last_out[i]` marking the FCS byte;
// `read_enb[i]` takes the byte at the clock edge.
//
// Interface timing: a byte is taken at a rising edge where packet_valid is 1
// and suspend_data is 0; suspend_data can only rise for a header whose port
// slot is occupied. Packets need one idle cycle between them. The header
// appears on the output three cycles after the first cycle with
// packet_valid low (see router_controller). Synchronous active-high reset.
//
// The block structure (input register/buffer, controller, three FIFOs) and
// the port names follow the router's block diagram; last_out, the slot per
// port and the FIFO depth are this design's choices.
module router_1x3
  import router_pkg::*;
#(
  parameter logic [NUM_OUT-1:0][DATA_W-1:0] PORT_ADDR = DEFAULT_PORT_ADDR,
  parameter int FIFO_DEPTH = 64
) (
  input  logic                clock,
  input  logic                reset,
  input  byte_t               data,
  input  logic                packet_valid,
  output logic                suspend_data,
  output logic                err,
  output byte_t               data_out  [NUM_OUT],
  output logic [NUM_OUT-1:0]  valid_out,
  output logic [NUM_OUT-1:0]  last_out,
  input  logic [NUM_OUT-1:0]  read_enb
);

  localparam int VW = $clog2(NUM_OUT);

  logic                 buf_wr_en, buf_commit, buf_release, drop;
  logic [VW-1:0]        buf_wr_vc, buf_rd_vc, buf_commit_vc, buf_release_vc;
  logic [PKT_IDX_W-1:0] buf_wr_idx, buf_rd_idx, buf_commit_len;
  byte_t                buf_wr_data, buf_rd_data;
  logic [NUM_OUT-1:0]   buf_full;
  logic [NUM_OUT-1:0][PKT_IDX_W-1:0] buf_len;

  logic                 xfer_req, xfer_accepted;
  logic [NUM_OUT-1:0]   xfer_sel, fifo_full, fifo_empty, fifo_wr_en;
  flit_t                xfer_flit, fifo_wr_data;

  input_buffer #(.NUM_VC(NUM_OUT), .IDX_W(PKT_IDX_W)) u_inbuf (
    .clk(clock), .rst(reset),
    .wr_en(buf_wr_en), .wr_vc(buf_wr_vc), .wr_idx(buf_wr_idx), .wr_data(buf_wr_data),
    .rd_vc(buf_rd_vc), .rd_idx(buf_rd_idx), .rd_data(buf_rd_data),
    .commit(buf_commit), .commit_vc(buf_commit_vc), .commit_len(buf_commit_len),
    .release_en(buf_release), .release_vc(buf_release_vc),
    .full(buf_full), .len(buf_len)
  );

  router_controller #(.NUM_PORTS(NUM_OUT), .PORT_ADDR(PORT_ADDR)) u_ctrl (
    .clk(clock), .rst(reset),
    .data_in(data), .packet_valid(packet_valid),
    .suspend_data(suspend_data), .err(err), .drop(drop),
    .buf_wr_en(buf_wr_en), .buf_wr_vc(buf_wr_vc), .buf_wr_idx(buf_wr_idx),
    .buf_wr_data(buf_wr_data), .buf_rd_vc(buf_rd_vc), .buf_rd_idx(buf_rd_idx),
    .buf_rd_data(buf_rd_data), .buf_commit(buf_commit), .buf_commit_vc(buf_commit_vc),
    .buf_commit_len(buf_commit_len), .buf_release(buf_release),
    .buf_release_vc(buf_release_vc), .buf_full(buf_full), .buf_len(buf_len),
    .xfer_req(xfer_req), .xfer_sel(xfer_sel), .xfer_flit(xfer_flit),
    .xfer_accepted(xfer_accepted)
  );

  switch_fabric #(.NUM_PORTS(NUM_OUT)) u_fabric (
    .req(xfer_req), .sel(xfer_sel), .flit(xfer_flit), .fifo_full(fifo_full),
    .fifo_wr_en(fifo_wr_en), .fifo_wr_data(fifo_wr_data), .accepted(xfer_accepted)
  );

  for (genvar i = 0; i < NUM_OUT; i++) begin : g_port
    flit_t                     head;
    logic [$clog2(FIFO_DEPTH):0] unused_count;

    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clock), .rst(reset),
      .wr_en(fifo_wr_en[i]), .wr_data(fifo_wr_data), .full(fifo_full[i]),
      .rd_en(read_enb[i]), .rd_data(head), .empty(fifo_empty[i]),
      .count(unused_count)
    );

    assign data_out[i]  = head.data;
    assign last_out[i]  = head.last;
    assign valid_out[i] = !fifo_empty[i];
  end

  logic unused_drop;
  assign unused_drop = drop;

endmodule
