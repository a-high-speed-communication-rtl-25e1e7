// tb_input_buffer: fills each packet slot with random bytes, commits it with
// a length, reads every byte back through the asynchronous read port while
// other slots are being written, checks full flags and lengths, releases
// slots, and checks that commit and release in the same cycle on different
// slots both take effect.
module tb_input_buffer;
  import router_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic wr_en = 0, commit = 0, release_en = 0;
  logic [1:0] wr_vc = 0, rd_vc = 0, commit_vc = 0, release_vc = 0;
  logic [6:0] wr_idx = 0, rd_idx = 0, commit_len = 0;
  byte_t wr_data = 0, rd_data;
  logic [2:0] full;
  logic [2:0][6:0] len;
  byte_t model [3][65];
  int mlen [3];

  input_buffer dut (.clk(clk), .rst(rst), .wr_en(wr_en), .wr_vc(wr_vc), .wr_idx(wr_idx), .wr_data(wr_data),
    .rd_vc(rd_vc), .rd_idx(rd_idx), .rd_data(rd_data), .commit(commit), .commit_vc(commit_vc),
    .commit_len(commit_len), .release_en(release_en), .release_vc(release_vc), .full(full), .len(len));

  always #5 clk = ~clk;

  task automatic fill(int v, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en = 1; wr_vc = 2'(v); wr_idx = 7'(i); wr_data = byte_t'($urandom);
      model[v][i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0; commit = 1; commit_vc = 2'(v); commit_len = 7'(n);
    mlen[v] = n;
    @(negedge clk);
    commit = 0;
  endtask

  task automatic readback(int v);
    for (int i = 0; i < mlen[v]; i++) begin
      rd_vc = 2'(v); rd_idx = 7'(i);
      #1;
      checks++;
      if (rd_data !== model[v][i]) begin failures++; $display("FAIL vc%0d[%0d]=%h exp %h", v, i, rd_data, model[v][i]); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (full !== 0) begin failures++; $display("FAIL reset full"); end
    for (int round = 0; round < 5; round++) begin
      for (int v = 0; v < 3; v++) fill(v, $urandom_range(3, 65));
      checks++;
      if (full !== 3'b111) begin failures++; $display("FAIL full=%b", full); end
      for (int v = 0; v < 3; v++) begin
        checks++;
        if (len[v] !== 7'(mlen[v])) begin failures++; $display("FAIL len%0d", v); end
        readback(v);
      end
      // release 0 and 1 in turn, then 2 together with a new commit of 0
      @(negedge clk); release_en = 1; release_vc = 0;
      @(negedge clk); release_vc = 1;
      @(negedge clk); release_en = 0;
      checks++;
      if (full !== 3'b100) begin failures++; $display("FAIL after release full=%b", full); end
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); wr_en = 1; wr_vc = 0; wr_idx = 7'(i); wr_data = byte_t'($urandom); model[0][i] = wr_data;
      end
      @(negedge clk); wr_en = 0; commit = 1; commit_vc = 0; commit_len = 4; mlen[0] = 4;
      release_en = 1; release_vc = 2;
      @(negedge clk); commit = 0; release_en = 0;
      checks++;
      if (full !== 3'b001 || len[0] !== 4) begin failures++; $display("FAIL commit+release full=%b", full); end
      readback(0);
      @(negedge clk); release_en = 1; release_vc = 0;
      @(negedge clk); release_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
