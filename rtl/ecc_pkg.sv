// ecc_pkg: shared constants and types of the GF(2^193) elliptic-curve processor.
//
// The field is GF(2^193) in polynomial basis with the reduction trinomial
// x^193 + x^15 + 1; both numbers are fixed by the design. Curve points are
// affine (x, y) pairs on y^2 + xy = x^3 + a x^2 + b.
//
// The control word ctl_t is what the FSM controller (ecc_ctrl) hands the data
// path (ecc_datapath) each cycle: one multiply-accumulate
//   R[mul_dst] = R[mul_a] * R[mul_b] + R[mul_x]
// and one add-then-square
//   R[sq_dst]  = (R[sq_a] + R[sq_b]) ^ (2^n),  n in {0, 1, 6, 15}
// may both run in the same cycle. This split of control and data path, the
// register map and the encoding are choices of this design.
package ecc_pkg;

  localparam int unsigned M      = 193;  // field degree
  localparam int unsigned POLY_K = 15;   // middle term of x^M + x^K + 1

  typedef logic [M-1:0] felem_t;

  typedef struct packed {
    felem_t x;
    felem_t y;
  } point_t;

  // Operations of the processor.
  typedef enum logic [1:0] {
    OP_KP  = 2'd0,   // Q = k P (key generation / plain scalar multiplication)
    OP_ENC = 2'd1,   // C1 = k G, C2 = Pm + k PB
    OP_DEC = 2'd2    // R = k C1, Pm = C2 - R
  } op_t;

  // Register map of the buffer. R_ZERO and R_ONE read as constants.
  typedef enum logic [4:0] {
    R_ZERO = 5'd0,  R_ONE = 5'd1,
    R_X1   = 5'd2,  R_Z1  = 5'd3,  R_X2 = 5'd4,  R_Z2 = 5'd5,
    R_T1   = 5'd6,  R_T2  = 5'd7,  R_T3 = 5'd8,  R_S1 = 5'd9,  R_S2 = 5'd10,
    R_PX   = 5'd11, R_PY  = 5'd12,           // base point of the ladder
    R_A    = 5'd13, R_B   = 5'd14,           // curve coefficients
    R_UX   = 5'd15, R_UY  = 5'd16,           // second input point (PB)
    R_MX   = 5'd17, R_MY  = 5'd18,           // addend point (Pm or C2)
    R_RX   = 5'd19, R_RY  = 5'd20,           // working result
    R_OX   = 5'd21, R_OY  = 5'd22,           // first output point (C1 or kC1)
    R_IB   = 5'd23, R_IS  = 5'd24            // Itoh-Tsujii accumulators
  } reg_t;

  localparam int unsigned NREG = 25;

  // Squarer selection of the add-then-square path.
  typedef enum logic [1:0] {
    SQ_0  = 2'd0,   // plain addition (copy when one operand is R_ZERO)
    SQ_1  = 2'd1,   // (.)^2
    SQ_6  = 2'd2,   // (.)^(2^6)
    SQ_15 = 2'd3    // (.)^(2^15)
  } sqn_t;

  typedef struct packed {
    logic  mul_en;
    reg_t  mul_a;
    reg_t  mul_b;
    reg_t  mul_x;
    reg_t  mul_dst;
    logic  sq_en;
    reg_t  sq_a;
    reg_t  sq_b;
    sqn_t  sq_n;
    reg_t  sq_dst;
  } ctl_t;

  localparam ctl_t CTL_NOP = '{mul_en: 1'b0, mul_a: R_ZERO, mul_b: R_ZERO, mul_x: R_ZERO,
                               mul_dst: R_ZERO, sq_en: 1'b0, sq_a: R_ZERO, sq_b: R_ZERO,
                               sq_n: SQ_0, sq_dst: R_ZERO};

endpackage
