// gf_reduce: combinational reduction modulo the trinomial x^M + x^K + 1
// (x^193 + x^15 + 1 by default).
//
// Input c is an unreduced polynomial of degree <= 2M-2 (as produced by gf_mul
// or by spreading a square). Since x^M = x^K + 1, every term x^i with i >= M is
// folded to x^(i-M+K) + x^(i-M). Folding runs from the highest term down, so a
// term folded onto a position that is still >= M is folded again; the loop is
// unrolled into a fixed XOR array. The result is available in the same cycle.
// The design calls for a 193-bit modulo built as an XOR array; unrolling the
// fold is how this implementation generates that array.
module gf_reduce #(
  parameter int unsigned M = 193,
  parameter int unsigned K = 15
) (
  input  logic [2*M-2:0] c,
  output logic [M-1:0]   r
);
  logic [2*M-2:0] t;

  always_comb begin
    t = c;
    for (int i = 2*M-2; i >= int'(M); i--) begin
      if (t[i]) begin
        t[i]       = 1'b0;
        t[i-M+K]   = ~t[i-M+K];
        t[i-M]     = ~t[i-M];
      end
    end
    r = t[M-1:0];
  end
endmodule
