// gf_add: field adder of GF(2^M). Addition of binary polynomials is carry-free,
// so the sum is the bitwise XOR of the two operands: M two-input XOR gates,
// purely combinational, as the design specifies for its 193-bit adder.
module gf_add #(
  parameter int unsigned M = 193
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] s
);
  assign s = a ^ b;
endmodule
