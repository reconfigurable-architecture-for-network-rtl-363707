// gf_sqr_n: single-cycle field multi-squarer, r = a^(2^N) in GF(2^M) with
// reduction polynomial x^M + x^K + 1.
//
// Squaring is linear over GF(2): bit i of a moves to bit 2i, then the
// (2M-1)-bit result is reduced. N such stages are chained combinationally, so
// the whole power 2^N takes one cycle. The design uses squarers for N = 1, 6
// and 15, each taking one cycle; building them as chains of one squarer and one
// reduction array per stage is this implementation's choice.
module gf_sqr_n #(
  parameter int unsigned M = 193,
  parameter int unsigned K = 15,
  parameter int unsigned N = 1
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] r
);
  for (genvar s = 0; s < int'(N); s++) begin : g_stage
    logic [M-1:0]   si, so;
    logic [2*M-2:0] spread;
    if (s == 0) begin : g_first
      assign si = a;
    end else begin : g_next
      assign si = g_stage[s-1].so;
    end
    always_comb begin
      spread = '0;
      for (int i = 0; i < int'(M); i++) spread[2*i] = si[i];
    end
    gf_reduce #(.M(M), .K(K)) u_red (.c(spread), .r(so));
  end

  assign r = g_stage[N-1].so;
endmodule
