// tb_switch_fabric: all combinations of request, one-hot select and FIFO
// full flags, with random flits; checks write enables, data and accepted.
module tb_switch_fabric;
  import router_pkg::*;
  int checks = 0, failures = 0;
  logic req, accepted;
  logic [2:0] sel, full, wen;
  flit_t flit, wdata;

  switch_fabric dut (.req(req), .sel(sel), .flit(flit), .fifo_full(full), .fifo_wr_en(wen), .fifo_wr_data(wdata), .accepted(accepted));

  initial begin
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 3; s++)
        for (int f = 0; f < 8; f++) begin
          logic eacc;
          req = r[0]; sel = 3'(1 << s); full = 3'(f);
          flit = flit_t'($urandom);
          #1;
          eacc = r[0] && !f[s];
          checks++;
          if (accepted !== eacc || wen !== (eacc ? 3'(1 << s) : 3'b0) || wdata !== flit) begin
            failures++; $display("FAIL r=%0d s=%0d f=%b acc=%b wen=%b", r, s, f, accepted, wen);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
