// router_controller: the FSM controller of the store-and-forward router.
//
// Two state machines share the input buffer.
//
// Receive FSM (RX_IDLE, RX_BODY). Input bytes are taken at a clock edge where
// `packet_valid` is high and `suspend_data` is low; a packet is a run of
// taken bytes that ends when `packet_valid` goes low, so packets are
// separated by at least one idle cycle. The first byte is the destination
// address (DA). The route table maps it to an output port; if that port's
// buffer slot still holds an unforwarded packet, `suspend_data` is raised
// (combinationally, only in RX_IDLE while the header is presented) and the
// source must hold the header until it falls. Otherwise the header and the
// following bytes are written into the port's slot and XORed into the FCS
// checker. In the cycle `packet_valid` is low after a packet the FSM judges
// it: the packet is good when the FCS checks, it has 3..65 bytes and its DA
// matched a port. A good packet is committed to its slot (it becomes ready
// for forwarding at the next edge). A packet that fails the FCS or length
// check is discarded and `err` pulses for one cycle, one cycle later. A packet
// whose DA matches no port is discarded without `err` (`drop` pulses instead).
//
// Forward FSM (TX_IDLE, TX_MOVE). In TX_IDLE the rotating-priority arbiter
// picks one slot that holds a committed packet; in TX_MOVE the packet is read
// from the slot one byte per cycle and written through the switch fabric into
// its port's output FIFO, the FCS byte flagged as last. While that FIFO is
// full the transfer pauses on the same byte. After the last byte the slot is
// released and the FSM returns to TX_IDLE, so a packet of L bytes occupies
// the forward path for L + 1 cycles plus any pauses.
//
// Timing: with the last byte taken at edge t (packet_valid low in the cycle
// after), the packet is committed at edge t+1, granted at t+2, its header is
// written into the output FIFO at t+3 and shows on the FIFO output after
// that edge.
//
// From the router specification: FSM control, store-and-forward with a frame
// check over header and data, the 8-bit DA matched against per-port
// addresses, rotating priority, forwarding only error-free packets. This
// design's choices: the framing by packet_valid, the XOR FCS, the suspend
// rule, the err pulse, and discarding packets for unknown addresses.
module router_controller
  import router_pkg::*;
#(
  parameter int NUM_PORTS = NUM_OUT,
  parameter logic [NUM_PORTS-1:0][DATA_W-1:0] PORT_ADDR = DEFAULT_PORT_ADDR
) (
  input  logic                         clk,
  input  logic                         rst,
  // input port
  input  byte_t                        data_in,
  input  logic                         packet_valid,
  output logic                         suspend_data,
  output logic                         err,
  output logic                         drop,
  // input buffer
  output logic                         buf_wr_en,
  output logic [$clog2(NUM_PORTS)-1:0] buf_wr_vc,
  output logic [PKT_IDX_W-1:0]         buf_wr_idx,
  output byte_t                        buf_wr_data,
  output logic [$clog2(NUM_PORTS)-1:0] buf_rd_vc,
  output logic [PKT_IDX_W-1:0]         buf_rd_idx,
  input  byte_t                        buf_rd_data,
  output logic                         buf_commit,
  output logic [$clog2(NUM_PORTS)-1:0] buf_commit_vc,
  output logic [PKT_IDX_W-1:0]         buf_commit_len,
  output logic                         buf_release,
  output logic [$clog2(NUM_PORTS)-1:0] buf_release_vc,
  input  logic [NUM_PORTS-1:0]         buf_full,
  input  logic [NUM_PORTS-1:0][PKT_IDX_W-1:0] buf_len,
  // switch fabric
  output logic                         xfer_req,
  output logic [NUM_PORTS-1:0]         xfer_sel,
  output flit_t                        xfer_flit,
  input  logic                         xfer_accepted
);

  localparam int VW = $clog2(NUM_PORTS);

  typedef enum logic { RX_IDLE, RX_BODY } rx_state_t;
  typedef enum logic { TX_IDLE, TX_MOVE } tx_state_t;

  // ---------------- receive side ----------------
  rx_state_t            rx_state;
  logic [VW-1:0]        rx_vc;
  logic                 rx_hit;
  logic                 rx_over;
  logic [PKT_IDX_W-1:0] rx_cnt;

  logic                 hdr_hit;
  logic [NUM_PORTS-1:0] hdr_onehot;
  logic [VW-1:0]        hdr_idx;
  logic                 take_hdr, take_body, pkt_end, len_ok, pkt_good;
  logic                 fcs_ok;
  byte_t                fcs_acc;

  route_table #(.NUM_PORTS(NUM_PORTS), .PORT_ADDR(PORT_ADDR)) u_route (
    .da(data_in), .hit(hdr_hit), .port_onehot(hdr_onehot), .port_idx(hdr_idx)
  );

  assign suspend_data = (rx_state == RX_IDLE) && packet_valid && hdr_hit && buf_full[hdr_idx];
  assign take_hdr     = (rx_state == RX_IDLE) && packet_valid && !suspend_data;
  assign take_body    = (rx_state == RX_BODY) && packet_valid;
  assign pkt_end      = (rx_state == RX_BODY) && !packet_valid;
  assign len_ok       = !rx_over && (rx_cnt >= PKT_IDX_W'(MIN_PKT_BYTES));
  assign pkt_good     = fcs_ok && len_ok;

  fcs_checker u_fcs (
    .clk(clk), .rst(rst), .start(take_hdr), .update(take_body),
    .din(data_in), .acc(fcs_acc), .ok(fcs_ok)
  );

  always_comb begin
    buf_wr_en   = 1'b0;
    buf_wr_vc   = rx_vc;
    buf_wr_idx  = rx_cnt;
    buf_wr_data = data_in;
    if (take_hdr) begin
      buf_wr_en  = hdr_hit;
      buf_wr_vc  = hdr_idx;
      buf_wr_idx = '0;
    end else if (take_body) begin
      buf_wr_en  = rx_hit && (rx_cnt < PKT_IDX_W'(MAX_PKT_BYTES));
    end
  end

  assign buf_commit     = pkt_end && rx_hit && pkt_good;
  assign buf_commit_vc  = rx_vc;
  assign buf_commit_len = rx_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_state <= RX_IDLE;
      rx_vc    <= '0;
      rx_hit   <= 1'b0;
      rx_over  <= 1'b0;
      rx_cnt   <= '0;
      err      <= 1'b0;
      drop     <= 1'b0;
    end else begin
      err  <= 1'b0;
      drop <= 1'b0;
      unique case (rx_state)
        RX_IDLE: if (take_hdr) begin
          rx_state <= RX_BODY;
          rx_vc    <= hdr_idx;
          rx_hit   <= hdr_hit;
          rx_over  <= 1'b0;
          rx_cnt   <= PKT_IDX_W'(1);
        end
        RX_BODY: begin
          if (take_body) begin
            if (rx_cnt < PKT_IDX_W'(MAX_PKT_BYTES)) rx_cnt <= rx_cnt + 1'b1;
            else                                    rx_over <= 1'b1;
          end else begin
            rx_state <= RX_IDLE;
            err      <= !pkt_good;
            drop     <= pkt_good && !rx_hit;
          end
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ---------------- forward side ----------------
  tx_state_t            tx_state;
  logic [VW-1:0]        tx_vc;
  logic [PKT_IDX_W-1:0] tx_idx;
  logic [NUM_PORTS-1:0] arb_grant;
  logic [VW-1:0]        arb_idx;
  logic                 arb_any, tx_last;

  rr_arbiter #(.N(NUM_PORTS)) u_arb (
    .clk(clk), .rst(rst),
    .req(tx_state == TX_IDLE ? buf_full : '0),
    .accept(tx_state == TX_IDLE),
    .grant(arb_grant), .grant_idx(arb_idx), .any(arb_any)
  );

  assign buf_rd_vc  = tx_vc;
  assign buf_rd_idx = tx_idx;
  assign tx_last    = (tx_idx == buf_len[tx_vc] - 1'b1);

  always_comb begin
    xfer_req       = (tx_state == TX_MOVE);
    xfer_sel       = '0;
    xfer_sel[tx_vc] = 1'b1;
    xfer_flit.data = buf_rd_data;
    xfer_flit.last = tx_last;
  end

  assign buf_release    = xfer_accepted && tx_last;
  assign buf_release_vc = tx_vc;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_state <= TX_IDLE;
      tx_vc    <= '0;
      tx_idx   <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE: if (arb_any) begin
          tx_state <= TX_MOVE;
          tx_vc    <= arb_idx;
          tx_idx   <= '0;
        end
        TX_MOVE: if (xfer_accepted) begin
          tx_idx <= tx_idx + 1'b1;
          if (tx_last) tx_state <= TX_IDLE;
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // Handshake rules of the input port and the forward path.
  a_suspend_only_on_header: assert property (@(posedge clk) disable iff (rst)
    suspend_data |-> (rx_state == RX_IDLE) && packet_valid);
  a_xfer_from_full_slot: assert property (@(posedge clk) disable iff (rst)
    xfer_req |-> buf_full[tx_vc]);

  logic [NUM_PORTS-1:0] unused_onehot;
  assign unused_onehot = hdr_onehot | arb_grant;
  byte_t unused_acc;
  assign unused_acc = fcs_acc;

endmodule
