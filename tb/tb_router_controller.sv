// tb_router_controller: the FSM controller with an input buffer, its output
// side attached to a model of three output ports that accept a byte with a
// random per-phase probability (so the forward path stalls). A packet source
// honours suspend_data. A scoreboard predicts the flits (byte and last flag)
// that must be accepted per port, the err pulses (bad FCS, too long, too
// short) and the drop pulses (unknown address). Directed parts check that the
// header is offered two cycles after the packet ends and that a packet then
// moves one byte per cycle. Each mechanism must occur at least once.
module tb_router_controller;
  import router_pkg::*;

  int checks = 0, failures = 0;
  logic clock = 0, reset = 1;
  byte_t data = 0;
  logic packet_valid = 0, suspend_data, err;
  logic [2:0] read_enb = '0;   // here: the ports' readiness to accept a byte
  logic drop;
  localparam logic [2:0][7:0] ADDR = DEFAULT_PORT_ADDR;

  logic       buf_wr_en, buf_commit, buf_release;
  logic [1:0] buf_wr_vc, buf_rd_vc, buf_commit_vc, buf_release_vc;
  logic [6:0] buf_wr_idx, buf_rd_idx, buf_commit_len;
  byte_t      buf_wr_data, buf_rd_data;
  logic [2:0] buf_full;
  logic [2:0][6:0] buf_len;
  logic       xfer_req, xfer_accepted;
  logic [2:0] xfer_sel;
  flit_t      xfer_flit;

  router_controller dut (.clk(clock), .rst(reset), .data_in(data), .packet_valid(packet_valid),
    .suspend_data(suspend_data), .err(err), .drop(drop), .*);

  input_buffer u_buf (.clk(clock), .rst(reset), .wr_en(buf_wr_en), .wr_vc(buf_wr_vc),
    .wr_idx(buf_wr_idx), .wr_data(buf_wr_data), .rd_vc(buf_rd_vc), .rd_idx(buf_rd_idx),
    .rd_data(buf_rd_data), .commit(buf_commit), .commit_vc(buf_commit_vc),
    .commit_len(buf_commit_len), .release_en(buf_release), .release_vc(buf_release_vc),
    .full(buf_full), .len(buf_len));

  assign xfer_accepted = xfer_req && ((xfer_sel & read_enb) != 0);

  always #5 clock = ~clock;

  // ---------------- scoreboard ----------------
  flit_t expq [3][$];
  int exp_err = 0, got_err = 0, exp_drop = 0;
  int delivered [3] = '{0, 0, 0};
  int rd_prob = 100;

  // mechanism counters
  int n_suspend = 0, n_stall = 0, n_contend = 0, n_fcs_err = 0, n_long_err = 0,
      n_short_err = 0, n_drop = 0, n_min = 0, n_max = 0, n_drop_seen = 0;

  function automatic int port_of(byte_t da);
    for (int p = 0; p < 3; p++) if (da == ADDR[p]) return p;
    return -1;
  endfunction

  // kind: 0 good, 1 bad FCS; npay outside 1..63 makes a length error
  task automatic send(byte_t da, int npay, bit bad_fcs);
    byte_t b[$];
    byte_t f;
    int p;
    bit good;
    b.push_back(da);
    for (int i = 0; i < npay; i++) b.push_back(byte_t'($urandom));
    f = '0;
    foreach (b[i]) f ^= b[i];
    if (bad_fcs) f ^= byte_t'(1 << $urandom_range(7));
    b.push_back(f);
    p = port_of(da);
    good = !bad_fcs && npay >= MIN_PAYLOAD && npay <= MAX_PAYLOAD;
    if (!good) begin
      exp_err++;
      if (npay > MAX_PAYLOAD) n_long_err++;
      else if (npay < MIN_PAYLOAD) n_short_err++;
      else n_fcs_err++;
    end else if (p < 0) begin
      exp_drop++; n_drop++;
    end else begin
      if (npay == MIN_PAYLOAD) n_min++;
      if (npay == MAX_PAYLOAD) n_max++;
      foreach (b[i]) expq[p].push_back('{last: (i == b.size() - 1), data: b[i]});
    end
    foreach (b[i]) begin
      data = b[i];
      packet_valid = 1;
      #1;
      while (suspend_data) begin
        n_suspend++;
        @(negedge clock);
        #1;
      end
      @(negedge clock);
    end
    packet_valid = 0;
    data = byte_t'($urandom);
  endtask

  // sinks
  always @(negedge clock) begin
    for (int p = 0; p < 3; p++) read_enb[p] <= ($urandom_range(99) < rd_prob);
  end

  task automatic take(int p, logic v, logic r, byte_t d, logic l);
    flit_t e;
    if (v && r) begin
      checks++;
      if (expq[p].size() == 0) begin
        failures++;
        $display("FAIL port %0d: unexpected byte %h", p, d);
      end else begin
        e = expq[p].pop_front();
        if (e.data !== d || e.last !== l) begin
          failures++;
          $display("FAIL port %0d: got %h/%b expected %h/%b", p, d, l, e.data, e.last);
        end
        if (l) delivered[p]++;
      end
    end
  endtask

  always @(posedge clock) if (!reset) begin
    for (int p = 0; p < 3; p++) take(p, xfer_req && xfer_sel[p], read_enb[p], xfer_flit.data, xfer_flit.last);
    if (err) got_err++;
    if (drop) n_drop_seen++;
    if (xfer_req && !xfer_accepted) n_stall++;
    if (dut.tx_state == 1'b0 && $countones(buf_full) >= 2) n_contend++;
  end

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  function automatic byte_t rand_da();
    int r = $urandom_range(99);
    if (r < 8) return 8'hE7;          // no port has this address
    return ADDR[$urandom_range(2)];
  endfunction

  initial begin
    int n, L;
    repeat (3) @(negedge clock);
    reset = 0;
    @(negedge clock);

    // ---- latency and rate: one packet of 10 payload bytes, reader always ready
    rd_prob = 100;
    L = 12;
    send(ADDR[1], 10, 0);
    n = 0;
    while (!(xfer_req && xfer_sel[1]) && n < 20) begin @(negedge clock); n++; end
    checks++;
    if (n != 2) begin failures++; $display("FAIL latency %0d cycles, expected 2", n); end
    for (int k = 0; k < L; k++) begin
      checks++;
      if (!(xfer_req && xfer_sel[1]) || xfer_flit.last !== (k == L - 1)) begin
        failures++; $display("FAIL byte %0d of packet not on consecutive cycle", k);
      end
      @(negedge clock);
    end
    repeat (4) @(negedge clock);

    // ---- back-to-back packets to the three ports while readers are stalled:
    // all three slots fill, the source is suspended, arbitration rotates
    rd_prob = 0;
    fork
      begin repeat (400) @(negedge clock); rd_prob = 100; end
    join_none
    for (int i = 0; i < 9; i++) begin
      send(ADDR[i % 3], 63, 0);
      @(negedge clock);
    end
    repeat (400) @(negedge clock);

    // ---- error and drop cases
    send(ADDR[0], 5, 1);  @(negedge clock);   // bad FCS
    send(ADDR[1], 70, 0); @(negedge clock);   // too long
    send(ADDR[2], 0, 0);  @(negedge clock);   // too short
    send(8'hE7, 4, 0);                 @(negedge clock);   // unknown address
    send(ADDR[2], 1, 0);  @(negedge clock);   // minimum length
    repeat (50) @(negedge clock);

    // ---- random traffic in phases of different read rates
    for (int ph = 0; ph < 6; ph++) begin
      rd_prob = (ph % 3 == 0) ? 100 : (ph % 3 == 1) ? 30 : 5;
      for (int i = 0; i < 60; i++) begin
        int r, npay;
        r = $urandom_range(99);
        npay = (r < 4) ? 64 + $urandom_range(3) : (r < 7) ? 0 : (r < 12) ? 63 : $urandom_range(1, 63);
        send(rand_da(), npay, $urandom_range(99) < 5);
        repeat ($urandom_range(1, 3)) @(negedge clock);
      end
    end

    // ---- drain
    rd_prob = 100;
    repeat (2000) @(negedge clock);
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (expq[p].size() != 0) begin failures++; $display("FAIL port %0d: %0d bytes never arrived", p, expq[p].size()); end
    end
    checks++;
    if (got_err != exp_err) begin failures++; $display("FAIL err pulses %0d expected %0d", got_err, exp_err); end
    checks++;
    if (n_drop_seen != exp_drop) begin failures++; $display("FAIL drops %0d expected %0d", n_drop_seen, exp_drop); end

    $display("mechanisms:");
    expect_count("source suspended (cycles)", n_suspend);
    expect_count("transfer stalled (cycles)", n_stall);
    expect_count("arbitration contention", n_contend);
    expect_count("FCS errors", n_fcs_err);
    expect_count("too-long errors", n_long_err);
    expect_count("too-short errors", n_short_err);
    expect_count("unknown-address drops", n_drop_seen);
    expect_count("1-byte payloads", n_min);
    expect_count("63-byte payloads", n_max);
    expect_count("packets out of port 0", delivered[0]);
    expect_count("packets out of port 1", delivered[1]);
    expect_count("packets out of port 2", delivered[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
