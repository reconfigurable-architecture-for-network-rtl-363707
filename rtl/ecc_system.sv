// ecc_system: the two elliptic-curve processors of the design side by side,
// sharing only clock and reset.
//
//   u_p193 (ecc_top)     GF(2^193), polynomial basis: key generation (kP),
//                        EC-ElGamal encryption and decryption
//   u_p163 (ecc163_top)  GF(2^163), Gaussian normal basis: kP through the
//                        eight-component processor (host interface, two
//                        controllers, two arithmetic units, register file,
//                        instruction and data memories)
//
// Interface: the GF(2^193) ports keep the names of ecc_top (start, op, k, a,
// b, p_in, u_in, m_in -> busy, done, q0, q0_inf, q1, q1_inf); the GF(2^163)
// ports carry an n_ prefix (n_start, n_k, n_x, n_y, n_b -> n_busy, n_end,
// n_xk, n_yk). Each side has its own start/busy/done handshake and its own
// timing (see the two processor modules); both may run at the same time.
// The design describes the two processors separately; putting them under one
// top with independent ports is this implementation's choice.
module ecc_system
  import ecc_pkg::*;
  import ecc163_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // GF(2^193) processor
  input  logic   start,
  input  op_t    op,
  input  felem_t k,
  input  felem_t a,
  input  felem_t b,
  input  point_t p_in,
  input  point_t u_in,
  input  point_t m_in,
  output logic   busy,
  output logic   done,
  output point_t q0,
  output logic   q0_inf,
  output point_t q1,
  output logic   q1_inf,
  // GF(2^163) processor
  input  logic   n_start,
  input  ne_t    n_k,
  input  ne_t    n_x,
  input  ne_t    n_y,
  input  ne_t    n_b,
  output logic   n_busy,
  output logic   n_end,
  output ne_t    n_xk,
  output ne_t    n_yk
);
  ecc_top u_p193 (.clk, .rst_n, .start, .op, .k, .a, .b, .p_in, .u_in, .m_in,
                  .busy, .done, .q0, .q0_inf, .q1, .q1_inf);

  ecc163_top u_p163 (.clk, .rst_n, .start(n_start), .k(n_k), .x(n_x), .y(n_y), .b(n_b),
                     .busy(n_busy), .end_o(n_end), .xk(n_xk), .yk(n_yk));
endmodule
