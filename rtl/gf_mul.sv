// gf_mul: single-cycle M x M bit polynomial multiplier (M = 193 by default),
// the design's Karatsuba-Ofman field multiplier.
//
// It returns the unreduced (2M-1)-bit product of a and b; reduction modulo
// x^193 + x^15 + 1 is a separate unit (gf_reduce), as in the design, where
// multiplier and modulo are listed as separate components. Purely
// combinational: the product is valid in the cycle its operands are. The
// Karatsuba recursion lives in gf_kmul; its base-case width is this
// implementation's choice.
module gf_mul #(
  parameter int unsigned M  = 193,
  parameter int unsigned TH = 16
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-2:0] p
);
  gf_kmul #(.W(M), .TH(TH)) u_kmul (.a(a), .b(b), .p(p));
endmodule
