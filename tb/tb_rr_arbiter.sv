// tb_rr_arbiter: random requests and accepts against a model of the rotating
// priority (pointer moves past each accepted grant). Also checks that with
// all three requesting all the time the grants rotate 0, 1, 2, 0, ...
module tb_rr_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, accept = 0, any;
  logic [2:0] req = 0, grant;
  logic [1:0] gidx;
  int ptr;

  rr_arbiter #(.N(3)) dut (.clk(clk), .rst(rst), .req(req), .accept(accept), .grant(grant), .grant_idx(gidx), .any(any));

  always #5 clk = ~clk;

  task automatic check_now();
    int e = -1;
    for (int k = 0; k < 3; k++) if (e < 0 && req[(ptr + k) % 3]) e = (ptr + k) % 3;
    checks++;
    if (e < 0) begin
      if (any !== 0 || grant !== 0) begin failures++; $display("FAIL idle grant"); end
    end else if (any !== 1 || grant !== 3'(1 << e) || gidx !== 2'(e)) begin
      failures++; $display("FAIL req=%b ptr=%0d grant=%b exp=%0d", req, ptr, grant, e);
    end
    if (accept && e >= 0) ptr = (e + 1) % 3;
  endtask

  initial begin
    ptr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = 3'($urandom); accept = $urandom_range(1);
      #1 check_now();
    end
    // steady full request: strict rotation
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      req = 3'b111; accept = 1;
      #1;
      checks++;
      if (gidx !== 2'((ptr) % 3)) begin failures++; $display("FAIL rotation"); end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
