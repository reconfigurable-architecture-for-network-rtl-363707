// ecc_top: GF(2^193) elliptic-curve crypto processor (key generation,
// encryption, decryption) on the curve y^2 + xy = x^3 + a x^2 + b over
// GF(2)[x] / (x^193 + x^15 + 1).
//
// The FSM controller (ecc_ctrl) drives the register buffer and field units
// (ecc_datapath) with one control word per cycle; control and data path are
// kept apart so that the arithmetic units can be changed without touching the
// sequencing.
//
// Operations, selected by op when start is pulsed:
//   OP_KP   q0 = q1 = k * P                                   (P = p_in)
//   OP_ENC  q0 = C1 = k * G,  q1 = C2 = Pm + k * PB           (G = p_in, PB = u_in, Pm = m_in)
//   OP_DEC  q0 = k * C1,      q1 = Pm = C2 - k * C1           (C1 = p_in, C2 = m_in)
// All inputs are sampled in the start cycle. busy is high while an operation
// runs and done pulses for one cycle when q0/q1 are valid; they then hold
// until the next start. q0_inf / q1_inf mark a result at infinity. A scalar
// multiplication takes about 6 cycles per key bit plus about 60 cycles for
// set-up and the final inversion (see ecc_ctrl).
//
// The operation set, the curve and field and the units follow the design; the
// port list and the encoding of op are this implementation's choices.
module ecc_top
  import ecc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
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
  output logic   q1_inf
);
  logic load, sq_zero;
  ctl_t ctl;

  ecc_ctrl u_ctrl (
    .clk, .rst_n, .start, .op, .k, .sq_zero,
    .load, .ctl, .busy, .done, .r_inf(q1_inf), .o_inf(q0_inf)
  );

  ecc_datapath u_dp (
    .clk, .rst_n, .load,
    .ld_px(p_in.x), .ld_py(p_in.y),
    .ld_ux(u_in.x), .ld_uy(u_in.y),
    .ld_mx(m_in.x), .ld_my(m_in.y),
    .ld_a(a), .ld_b(b),
    .ctl, .sq_zero,
    .rx(q1.x), .ry(q1.y), .ox(q0.x), .oy(q0.y)
  );
endmodule
