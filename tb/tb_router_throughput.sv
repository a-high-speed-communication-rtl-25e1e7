// tb_router_throughput: saturation test of the top level at its default
// parameters. The source sends packets back to back (one idle cycle between
// them, the minimum the framing allows) to ports 0, 1, 2 in turn, and all
// readers are always ready. The forward path needs L + 1 cycles for an
// L-byte packet, the same as the input port, so the router must keep up:
// the source is never suspended, every byte arrives in order, and the last
// byte of the last packet leaves exactly N * (L + 1) + L + 2 cycles after the
// run starts: N packets at one per L + 1 cycles, then the last packet's
// store-and-forward delay (L + 2 from its end to its last output byte). Run with packets of 63, 1 and 20 payload bytes. (With mixed
// sizes a burst of short packets can catch up with a long one still being
// forwarded to the same port; the source is then suspended, which the other
// testbenches exercise.)
module tb_router_throughput;
  import router_pkg::*;

  int checks = 0, failures = 0;
  logic clock = 0, reset = 1;
  byte_t data = 0;
  logic packet_valid = 0, suspend_data, err;
  byte_t data_out_0, data_out_1, data_out_2;
  logic valid_out_0, valid_out_1, valid_out_2, last_out_0, last_out_1, last_out_2;
  logic read_enb_0 = 1, read_enb_1 = 1, read_enb_2 = 1;
  logic [3:0] csa_x = 0, csa_y = 0, csa_z = 0;
  logic [4:0] csa_s;
  logic csa_cout;

  router_system dut (.*);

  always #5 clock = ~clock;

  byte_t expq [3][$];
  int cycle = 0, last_out_cycle = 0, n_suspend = 0, n_err = 0;

  always @(posedge clock) begin
    cycle++;
    if (suspend_data) n_suspend++;
    if (err) n_err++;
  end

  task automatic take(int p, logic v, byte_t d);
    if (v) begin
      checks++;
      last_out_cycle = cycle;
      if (expq[p].size() == 0 || expq[p][0] !== d) begin
        failures++;
        $display("FAIL port %0d got %h", p, d);
      end
      if (expq[p].size() != 0) void'(expq[p].pop_front());
    end
  endtask

  always @(posedge clock) if (!reset) begin
    take(0, valid_out_0, data_out_0);
    take(1, valid_out_1, data_out_1);
    take(2, valid_out_2, data_out_2);
  end

  task automatic run(int npkt, int npay);
    int start, budget;
    budget = 0;
    start = cycle;
    for (int k = 0; k < npkt; k++) begin
      byte_t b[$];
      byte_t f;
      b.push_back(DEFAULT_PORT_ADDR[k % 3]);
      for (int i = 0; i < npay; i++) b.push_back(byte_t'($urandom));
      f = '0;
      foreach (b[i]) f ^= b[i];
      b.push_back(f);
      foreach (b[i]) expq[k % 3].push_back(b[i]);
      budget += b.size() + 1;
      foreach (b[i]) begin
        data = b[i];
        packet_valid = 1;
        #1;
        while (suspend_data) begin @(negedge clock); #1; end
        @(negedge clock);
      end
      packet_valid = 0;
      @(negedge clock);
    end
    repeat (200) @(negedge clock);
    checks++;
    if (last_out_cycle - start != budget + npay + 4) begin
      failures++;
      $display("FAIL %0d packets took %0d cycles, expected %0d", npkt, last_out_cycle - start, budget + npay + 4);
    end else
      $display("  %0d packets of %0d bytes: %0d cycles, as expected %0d", npkt, npay + 2,
               last_out_cycle - start, budget + npay + 4);
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    @(negedge clock);
    run(60, MAX_PAYLOAD);
    run(200, MIN_PAYLOAD);
    run(100, 20);
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (expq[p].size() != 0) begin failures++; $display("FAIL port %0d missing %0d bytes", p, expq[p].size()); end
    end
    checks++;
    if (n_suspend != 0 || n_err != 0) begin
      failures++; $display("FAIL suspend cycles %0d, err pulses %0d", n_suspend, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
