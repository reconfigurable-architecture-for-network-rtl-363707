// instruction_memory_163: instruction memory of the GF(2^163) processor; a
// ROM holding the AU-2 program that converts the ladder result to affine
// coordinates (Mxy):
//   xk = X1/Z1
//   yk = (x + xk)[(X1 + xZ1)(X2 + xZ2) + (x^2 + y)Z1Z2] / (xZ1Z2) + y
// with one inversion of xZ1Z2 by Itoh-Tsujii on the addition chain
// 1, 2, 4, 5, 10, 20, 40, 80, 81, 162 for 2^162 - 1. In normal basis the
// powers 2^j are rotations, so each chain step b_(i+j) = b_i^(2^j) * b_j is one
// MUL instruction with rotation j. Combinational read. The program's content
// follows the design's conversion formula and inversion method; the program
// itself and its encoding are this implementation's. The ROM content is the
// case table below (23 instructions and END).
module instruction_memory_163
  import ecc163_pkg::*;
(
  input  logic [4:0] addr,
  output instr_t     instr
);
  function automatic instr_t ins(iop_t o, daddr_t d, daddr_t ia, logic [7:0] r, daddr_t ib, daddr_t ic);
    instr_t i;
    i.op = o; i.dst = d; i.a = ia; i.ra = r; i.b = ib; i.c = ic;
    return i;
  endfunction

  always_comb begin
    unique case (addr)
      5'd0:  instr = ins(I_MUL, D_T1, D_Z1, 0,  D_Z2, D_ZERO);  // Z1 Z2
      5'd1:  instr = ins(I_MUL, D_T2, D_X,  0,  D_T1, D_ZERO);  // x Z1 Z2
      5'd2:  instr = ins(I_MUL, D_T3, D_X,  0,  D_Z1, D_X1);    // X1 + x Z1
      5'd3:  instr = ins(I_MUL, D_T4, D_X,  0,  D_Z2, D_X2);    // X2 + x Z2
      5'd4:  instr = ins(I_MUL, D_T3, D_T3, 0,  D_T4, D_ZERO);
      5'd5:  instr = ins(I_ADD, D_T4, D_X,  1,  D_ZERO, D_Y);   // x^2 + y
      5'd6:  instr = ins(I_MUL, D_T3, D_T4, 0,  D_T1, D_T3);    // bracket
      5'd7:  instr = ins(I_MUL, D_T6, D_T2, 1,  D_T2, D_ZERO);  // b2
      5'd8:  instr = ins(I_MUL, D_T7, D_T6, 2,  D_T6, D_ZERO);  // b4
      5'd9:  instr = ins(I_MUL, D_T6, D_T7, 1,  D_T2, D_ZERO);  // b5
      5'd10: instr = ins(I_MUL, D_T7, D_T6, 5,  D_T6, D_ZERO);  // b10
      5'd11: instr = ins(I_MUL, D_T6, D_T7, 10, D_T7, D_ZERO);  // b20
      5'd12: instr = ins(I_MUL, D_T7, D_T6, 20, D_T6, D_ZERO);  // b40
      5'd13: instr = ins(I_MUL, D_T6, D_T7, 40, D_T7, D_ZERO);  // b80
      5'd14: instr = ins(I_MUL, D_T7, D_T6, 1,  D_T2, D_ZERO);  // b81
      5'd15: instr = ins(I_MUL, D_T6, D_T7, 81, D_T7, D_ZERO);  // b162
      5'd16: instr = ins(I_ADD, D_T5, D_T6, 1,  D_ZERO, D_ZERO); // (x Z1 Z2)^-1
      5'd17: instr = ins(I_MUL, D_T1, D_T5, 0,  D_X,  D_ZERO);  // 1/(Z1 Z2)
      5'd18: instr = ins(I_MUL, D_T1, D_T1, 0,  D_Z2, D_ZERO);  // 1/Z1
      5'd19: instr = ins(I_MUL, D_XK, D_X1, 0,  D_T1, D_ZERO);  // xk
      5'd20: instr = ins(I_MUL, D_T3, D_T3, 0,  D_T5, D_ZERO);
      5'd21: instr = ins(I_ADD, D_T4, D_XK, 0,  D_ZERO, D_X);   // x + xk
      5'd22: instr = ins(I_MUL, D_YK, D_T4, 0,  D_T3, D_Y);     // yk
      default: instr = ins(I_END, D_ZERO, D_ZERO, 0, D_ZERO, D_ZERO);
    endcase
  end
endmodule
