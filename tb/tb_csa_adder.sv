// tb_csa_adder: exhaustive check of the 4-bit three-operand carry-save
// adder: {cout, s} must equal x + y + z for all 4096 operand triples.
module tb_csa_adder;
  int checks = 0, failures = 0;
  logic [3:0] x, y, z;
  logic [4:0] s;
  logic cout;

  csa_adder dut (.x(x), .y(y), .z(z), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {x, y, z} = 12'(i);
      #1;
      checks++;
      if ({cout, s} !== 6'(int'(x) + int'(y) + int'(z))) begin
        failures++; $display("FAIL %0d+%0d+%0d = %0d", x, y, z, {cout, s});
      end
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
