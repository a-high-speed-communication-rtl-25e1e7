// full_adder: one-bit full adder, the FA cell of the carry-save adder.
// s = a xor b xor c, co = majority(a, b, c). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule
