// tb_fcs_checker: feeds random packets (header, 1..63 payload bytes, FCS)
// through the frame check accumulator and compares the running value with
// an independent XOR model after every byte; a correct packet must end with
// ok = 1 and a packet with one corrupted byte with ok = 0.
module tb_fcs_checker;
  import router_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, update = 0;
  byte_t din = 0, acc;
  logic ok;

  fcs_checker dut (.clk(clk), .rst(rst), .start(start), .update(update), .din(din), .acc(acc), .ok(ok));

  always #5 clk = ~clk;

  task automatic run_pkt(int npay, bit corrupt);
    byte_t b[$];
    byte_t model, f;
    int bad;
    b.push_back(byte_t'($urandom));
    for (int i = 0; i < npay; i++) b.push_back(byte_t'($urandom));
    f = '0;
    foreach (b[i]) f ^= b[i];
    b.push_back(f);
    if (corrupt) begin
      bad = $urandom_range(b.size() - 1);
      b[bad] ^= byte_t'(1 << $urandom_range(7));
    end
    model = '0;
    foreach (b[i]) begin
      @(negedge clk);
      din = b[i]; start = (i == 0); update = (i != 0);
      model = (i == 0) ? b[i] : (model ^ b[i]);
      @(negedge clk);
      start = 0; update = 0;
      checks++;
      if (acc !== model) begin failures++; $display("FAIL byte %0d acc=%h exp=%h", i, acc, model); end
    end
    checks++;
    if (ok !== !corrupt) begin failures++; $display("FAIL ok=%b corrupt=%b", ok, corrupt); end
    // holding: no start/update keeps the value
    @(negedge clk);
    checks++;
    if (acc !== model) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 60; k++) run_pkt($urandom_range(1, 63), k % 3 == 2);
    run_pkt(1, 0);
    run_pkt(63, 0);
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
