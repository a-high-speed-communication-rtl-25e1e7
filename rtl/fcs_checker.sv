// fcs_checker: frame check sequence accumulator.
//
// The FCS byte that closes a packet is the XOR of its header and payload
// bytes, so the XOR of every byte of a correct packet, FCS included, is zero.
// The checker loads the header byte on `start`, XORs each further byte in on
// `update`, and `ok` is high while the running value is zero. `acc` and `ok`
// are registered: they include the bytes presented up to the previous clock
// edge. That the FCS covers header and data follows the router
// specification; the XOR code itself is this design's choice, as the code is
// not specified. Synchronous active-high reset.
module fcs_checker
  import router_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,   // first byte of a packet
  input  logic  update,  // any later byte
  input  byte_t din,
  output byte_t acc,
  output logic  ok
);

  always_ff @(posedge clk) begin
    if (rst)         acc <= '0;
    else if (start)  acc <= din;
    else if (update) acc <= fcs_next(acc, din);
  end

  assign ok = (acc == '0);

endmodule
