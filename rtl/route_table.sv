// route_table: destination address to output port lookup.
//
// Every output port owns a unique 8-bit address (parameter PORT_ADDR, entry i
// for port i). The header byte of a packet is its destination address (DA);
// the table compares the DA with every port address in parallel and reports
// whether one matched, as a one-hot vector and as an index. Purely
// combinational. Matching the DA against per-port addresses follows the router
// specification; a DA that matches no port is reported as a miss (hit = 0)
// and the caller drops the packet. If two entries were equal the lower port
// index would win.
module route_table
  import router_pkg::*;
#(
  parameter int NUM_PORTS = NUM_OUT,
  parameter logic [NUM_PORTS-1:0][DATA_W-1:0] PORT_ADDR = DEFAULT_PORT_ADDR
) (
  input  byte_t                          da,
  output logic                           hit,
  output logic [NUM_PORTS-1:0]           port_onehot,
  output logic [$clog2(NUM_PORTS)-1:0]   port_idx
);

  always_comb begin
    hit         = 1'b0;
    port_onehot = '0;
    port_idx    = '0;
    for (int i = NUM_PORTS - 1; i >= 0; i--) begin
      if (da == PORT_ADDR[i]) begin
        hit         = 1'b1;
        port_onehot = '0;
        port_onehot[i] = 1'b1;
        port_idx    = i[$clog2(NUM_PORTS)-1:0];
      end
    end
  end

endmodule
