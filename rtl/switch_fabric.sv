// switch_fabric: connects the input buffer's read port to the output FIFOs.
//
// The controller presents one flit (a byte plus its last-byte flag) with
// `req` and a one-hot `sel` naming the output port. If that port's FIFO is
// not full the fabric raises `accepted` and the write enable of that FIFO
// alone, and the flit is written at the clock edge; if it is full, nothing is
// written and the controller keeps presenting the same flit (a stall). All
// FIFOs see the same write data. Purely combinational. A switching fabric
// between the input and the output ports is part of the router description;
// this one-to-three demultiplexer is the simplest form it takes for a router
// with a single input port.
module switch_fabric
  import router_pkg::*;
#(
  parameter int NUM_PORTS = NUM_OUT
) (
  input  logic                 req,
  input  logic [NUM_PORTS-1:0] sel,
  input  flit_t                flit,
  input  logic [NUM_PORTS-1:0] fifo_full,
  output logic [NUM_PORTS-1:0] fifo_wr_en,
  output flit_t                fifo_wr_data,
  output logic                 accepted
);

  assign accepted     = req && ((sel & fifo_full) == '0);
  assign fifo_wr_en   = accepted ? sel : '0;
  assign fifo_wr_data = flit;

endmodule
