// router_system: top level.
//
// Two independent designs stand side by side. The first is the one-input,
// three-output store-and-forward packet router (router_1x3), its ports named
// as in the router's block diagram: data/packet_valid in, suspend_data and
// err back to the source, and per output port data_out_N, valid_out_N and
// read_enb_N, plus last_out_N marking the final (FCS) byte of each packet.
// The second is the 4-bit three-operand carry-save adder (csa_adder) with
// operands x, y, z and result {cout, s}. Nothing connects the two.
// Timing: see router_1x3 and csa_adder; synchronous active-high reset.
module router_system
  import router_pkg::*;
#(
  parameter logic [NUM_OUT-1:0][DATA_W-1:0] PORT_ADDR = DEFAULT_PORT_ADDR,
  parameter int FIFO_DEPTH = 64,
  parameter int CSA_N = 4
) (
  input  logic         clock,
  input  logic         reset,
  input  byte_t        data,
  input  logic         packet_valid,
  output logic         suspend_data,
  output logic         err,
  output byte_t        data_out_0,
  output logic         valid_out_0,
  output logic         last_out_0,
  input  logic         read_enb_0,
  output byte_t        data_out_1,
  output logic         valid_out_1,
  output logic         last_out_1,
  input  logic         read_enb_1,
  output byte_t        data_out_2,
  output logic         valid_out_2,
  output logic         last_out_2,
  input  logic         read_enb_2,
  input  logic [CSA_N-1:0] csa_x,
  input  logic [CSA_N-1:0] csa_y,
  input  logic [CSA_N-1:0] csa_z,
  output logic [CSA_N:0]   csa_s,
  output logic             csa_cout
);

  byte_t              dout [NUM_OUT];
  logic [NUM_OUT-1:0] vout, lout;

  router_1x3 #(.PORT_ADDR(PORT_ADDR), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
    .clock(clock), .reset(reset), .data(data), .packet_valid(packet_valid),
    .suspend_data(suspend_data), .err(err),
    .data_out(dout), .valid_out(vout), .last_out(lout),
    .read_enb({read_enb_2, read_enb_1, read_enb_0})
  );

  assign data_out_0 = dout[0];  assign valid_out_0 = vout[0];  assign last_out_0 = lout[0];
  assign data_out_1 = dout[1];  assign valid_out_1 = vout[1];  assign last_out_1 = lout[1];
  assign data_out_2 = dout[2];  assign valid_out_2 = vout[2];  assign last_out_2 = lout[2];

  csa_adder #(.N(CSA_N)) u_csa (
    .x(csa_x), .y(csa_y), .z(csa_z), .s(csa_s), .cout(csa_cout)
  );

endmodule
