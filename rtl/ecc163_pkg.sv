// ecc163_pkg: shared constants and types of the GF(2^163) processor.
//
// Field elements are 163-bit vectors in Gaussian normal basis (type 4):
// squaring is a one-position rotation, 1 is the all-ones vector.
//
// AU-1 micro-operation (issued by control-1, operands from the 7-entry
// register file or from the host interface):
//   MUL: R[dst] = rot^ra(A) * rot^rb(B) + rot^rc(C)
//   ADD: R[dst] = rot^ra(A) + rot^rc(C)
// AU-2 instruction (held in the instruction memory, executed by control-2 on
// data memory words):
//   MUL: D[dst] = rot^ra(A) * B + C
//   ADD: D[dst] = rot^ra(A) + C
//   END: kP finished
// rot^r is r squarings. The encodings are this design's own.
package ecc163_pkg;

  localparam int unsigned N163 = 163;

  typedef logic [N163-1:0] ne_t;

  // AU-1 operand sources: register file entries, host values, constants.
  typedef enum logic [3:0] {
    A1_X1 = 4'd0, A1_Z1 = 4'd1, A1_X2 = 4'd2, A1_Z2 = 4'd3,
    A1_T1 = 4'd4, A1_T2 = 4'd5, A1_T3 = 4'd6,
    A1_X  = 4'd7, A1_B  = 4'd8, A1_ONE = 4'd9, A1_ZERO = 4'd10
  } a1src_t;

  typedef struct packed {
    logic       mul;
    a1src_t     a;
    logic [1:0] ra;
    a1src_t     b;
    logic [1:0] rb;
    a1src_t     c;
    logic [1:0] rc;
    logic [2:0] dst;     // register file entry 0..6
  } au1_op_t;

  // Data memory map (16 words).
  typedef enum logic [3:0] {
    D_X  = 4'd0,  D_Y  = 4'd1,  D_X1 = 4'd2,  D_Z1 = 4'd3,
    D_X2 = 4'd4,  D_Z2 = 4'd5,  D_T1 = 4'd6,  D_T2 = 4'd7,
    D_T3 = 4'd8,  D_T4 = 4'd9,  D_T5 = 4'd10, D_T6 = 4'd11,
    D_T7 = 4'd12, D_XK = 4'd13, D_YK = 4'd14, D_ZERO = 4'd15
  } daddr_t;

  typedef enum logic [1:0] {
    I_END = 2'd0, I_MUL = 2'd1, I_ADD = 2'd2
  } iop_t;

  typedef struct packed {
    iop_t       op;
    daddr_t     dst;
    daddr_t     a;
    logic [7:0] ra;
    daddr_t     b;
    daddr_t     c;
  } instr_t;

endpackage
