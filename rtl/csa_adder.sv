// csa_adder: three-operand carry-save adder built from full adders.
//
// The first row of N full adders (FA0..FA3 for N = 4) adds the three bits
// X(i), Y(i), Z(i) of each position independently, giving a sum bit SS(i)
// and a carry bit C(i) with no carry chain. SS(0) is already result bit
// S(0). The second row (FA4..FA7) is a ripple-carry adder of the sum vector
// shifted right by one position and the carry vector: FA(N+i) adds SS(i+1),
// C(i) and the ripple carry from FA(N+i-1), with a constant 0 in place of the
// missing SS(N) at the top cell and a carry-in of 0 at the bottom cell. The
// top cell's carry is Cout. So {cout, s} = x + y + z, N + 2 bits.
// Combinational, one carry-save level plus an N-bit ripple.
//
// The cell names, the two rows of four, the operand names X, Y, Z, the
// result S, Cout and the constant 0 entering the top cell of the ripple row
// follow the adder diagram; the carry-in of 0 of the bottom ripple cell is
// this design's reading of it.
module csa_adder #(
  parameter int N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N:0]   s,
  output logic         cout
);

  logic [N-1:0] ss, cc;   // carry-save row outputs
  logic [N:0]   rc;       // ripple carries, rc[0] = 0
  logic [N-1:0] ss_up;    // SS(i+1), 0 above the top bit

  for (genvar i = 0; i < N; i++) begin : g_csa
    full_adder u_fa (.a(x[i]), .b(y[i]), .c(z[i]), .s(ss[i]), .co(cc[i]));
  end

  assign ss_up  = {1'b0, ss[N-1:1]};
  assign rc[0]  = 1'b0;
  assign s[0]   = ss[0];

  for (genvar i = 0; i < N; i++) begin : g_ripple
    full_adder u_fa (.a(ss_up[i]), .b(cc[i]), .c(rc[i]), .s(s[i+1]), .co(rc[i+1]));
  end

  assign cout = rc[N];

endmodule
