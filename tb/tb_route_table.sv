// tb_route_table: checks the destination-address lookup for all 256 header
// values against the port addresses, once with the default addresses and
// once with a second table of non-consecutive addresses.
module tb_route_table;
  import router_pkg::*;

  int checks = 0, failures = 0;

  localparam logic [2:0][7:0] ALT = {8'hC3, 8'h5A, 8'h17};

  byte_t da;
  logic hit_d, hit_a;
  logic [2:0] oh_d, oh_a;
  logic [1:0] ix_d, ix_a;

  route_table u_def (.da(da), .hit(hit_d), .port_onehot(oh_d), .port_idx(ix_d));
  route_table #(.NUM_PORTS(3), .PORT_ADDR(ALT)) u_alt (.da(da), .hit(hit_a), .port_onehot(oh_a), .port_idx(ix_a));

  task automatic check(logic [7:0] a, logic [2:0][7:0] tbl, logic hit, logic [2:0] oh, logic [1:0] ix);
    logic eh; logic [2:0] eoh; logic [1:0] eix;
    eh = 0; eoh = '0; eix = '0;
    for (int p = 0; p < 3; p++) if (a == tbl[p] && !eh) begin eh = 1; eoh[p] = 1; eix = 2'(p); end
    checks++;
    if (hit !== eh || oh !== eoh || (eh && ix !== eix)) begin
      failures++;
      $display("FAIL da=%h hit=%b/%b oh=%b/%b ix=%0d/%0d", a, hit, eh, oh, eoh, ix, eix);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      da = 8'(a);
      #1;
      check(8'(a), DEFAULT_PORT_ADDR, hit_d, oh_d, ix_d);
      check(8'(a), ALT, hit_a, oh_a, ix_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
