// tb_sync_fifo: random pushes and pops on the default 64-deep, 9-bit FIFO
// against a queue model: head data, empty, full and count every cycle, the
// one-cycle write-to-output latency, and that reads when empty are ignored.
// Writes are only issued when the FIFO is not full, as its writer must.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [8:0] wdata = 0, rdata;
  logic [6:0] count;
  logic [8:0] q[$];
  int nfull = 0;

  sync_fifo dut (.clk(clk), .rst(rst), .wr_en(wr_en), .wr_data(wdata), .full(full),
                 .rd_en(rd_en), .rd_data(rdata), .empty(empty), .count(count));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == 64) || count !== 7'(q.size()) ||
        (q.size() > 0 && rdata !== q[0])) begin
      failures++;
      $display("FAIL size=%0d empty=%b full=%b count=%0d rdata=%h", q.size(), empty, full, count, rdata);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    #1 compare();
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 80 : 30;  // alternate phases: filling and draining
      @(negedge clk);
      wr_en = ($urandom_range(99) < bias) && !full;
      rd_en = $urandom_range(99) < (100 - bias);
      wdata = 9'($urandom);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
      if (q.size() == 64) nfull++;
      #1 compare();
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
