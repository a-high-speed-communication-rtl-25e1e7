// router_pkg: constants and types shared by the packet router.
//
// A packet is a sequence of bytes on an 8-bit port: one header byte that is the
// destination address, 1 to 63 payload bytes, and one frame check sequence
// (FCS) byte that covers header and payload. The byte width, the payload limits
// and the three output ports follow the router specification; the FCS being
// the bytewise XOR of header and payload, and the flit struct that carries an
// end-of-packet flag next to each byte through the output FIFOs, are this
// design's own choices.
package router_pkg;

  localparam int DATA_W        = 8;                 // port and packet width
  localparam int NUM_OUT       = 3;                 // output ports
  localparam int MIN_PAYLOAD   = 1;                 // payload bytes, minimum
  localparam int MAX_PAYLOAD   = 63;                // payload bytes, maximum
  localparam int MIN_PKT_BYTES = MIN_PAYLOAD + 2;   // header + payload + FCS
  localparam int MAX_PKT_BYTES = MAX_PAYLOAD + 2;   // 65 bytes
  localparam int PKT_IDX_W     = $clog2(MAX_PKT_BYTES + 1); // counts 0..65

  typedef logic [DATA_W-1:0] byte_t;

  // One entry of an output FIFO: a packet byte and whether it is the last
  // (FCS) byte of its packet.
  typedef struct packed {
    logic  last;
    byte_t data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Default port addresses: port 0 answers to 8'h00, port 1 to 8'h01, port 2
  // to 8'h02 (the specification only requires them to be unique).
  localparam logic [NUM_OUT-1:0][DATA_W-1:0] DEFAULT_PORT_ADDR = {8'h02, 8'h01, 8'h00};

  // Frame check sequence of a header/payload byte stream: XOR of all bytes.
  function automatic byte_t fcs_next(byte_t acc, byte_t b);
    return acc ^ b;
  endfunction

endpackage
