// ecc_datapath: the register buffer and field arithmetic units of the
// GF(2^193) elliptic-curve processor, driven cycle by cycle by ecc_ctrl.
//
// Contents: a buffer of 23 field registers (plus the constants 0 and 1, read
// through addresses R_ZERO and R_ONE), one single-cycle Karatsuba multiplier
// followed by the x^193 + x^15 + 1 reduction array, one field adder on the
// multiplier output, and an add-then-square path with squarers for the powers
// 2^1, 2^6 and 2^15. Each cycle the control word ctl may request
//   mul path : R[mul_dst] <= reduce(R[mul_a] * R[mul_b]) + R[mul_x]
//   sq path  : R[sq_dst]  <= (R[sq_a] + R[sq_b]) ^ (2^n),  n = 0, 1, 6, 15
// and both results are written at the next rising clock edge. sq_zero is a
// registered flag telling whether the last sq-path result was zero; the
// controller uses it for its comparisons (z = 0, x1 = x2, ...).
//
// load writes the operand registers (base point, second point, addend point,
// curve coefficients a, b) in one cycle; the working and output points are read
// continuously on rx/ry and ox/oy.
//
// The units (multiplier, modulo, squarer, adder) and their one-cycle latency
// follow the design; the register map, the two write ports and the control
// word are this implementation's choices. Active-low synchronous reset clears
// every register.
module ecc_datapath
  import ecc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  felem_t ld_px, ld_py,    // ladder base point
  input  felem_t ld_ux, ld_uy,    // second point (public key PB)
  input  felem_t ld_mx, ld_my,    // addend point (Pm or C2)
  input  felem_t ld_a,  ld_b,     // curve coefficients
  input  ctl_t   ctl,
  output logic   sq_zero,
  output felem_t rx, ry,          // working result point
  output felem_t ox, oy           // first output point
);
  felem_t rf [NREG];

  function automatic felem_t rd(input reg_t r);
    case (r)
      R_ZERO:  rd = '0;
      R_ONE:   rd = felem_t'(1);
      default: rd = rf[r];
    endcase
  endfunction

  // Multiplier path: multiply, reduce, add.
  felem_t           mul_a, mul_b, mul_r, mul_res;
  logic [2*M-2:0]   mul_p;
  assign mul_a = rd(ctl.mul_a);
  assign mul_b = rd(ctl.mul_b);
  gf_mul    #(.M(M))              u_mul (.a(mul_a), .b(mul_b), .p(mul_p));
  gf_reduce #(.M(M), .K(POLY_K))  u_red (.c(mul_p), .r(mul_r));
  gf_add    #(.M(M))              u_acc (.a(mul_r), .b(rd(ctl.mul_x)), .s(mul_res));

  // Add-then-square path.
  felem_t sq_in, sq1, sq6, sq15, sq_res;
  gf_add   #(.M(M))                     u_add  (.a(rd(ctl.sq_a)), .b(rd(ctl.sq_b)), .s(sq_in));
  gf_sqr_n #(.M(M), .K(POLY_K), .N(1))  u_sq1  (.a(sq_in), .r(sq1));
  gf_sqr_n #(.M(M), .K(POLY_K), .N(6))  u_sq6  (.a(sq_in), .r(sq6));
  gf_sqr_n #(.M(M), .K(POLY_K), .N(15)) u_sq15 (.a(sq_in), .r(sq15));

  always_comb begin
    unique case (ctl.sq_n)
      SQ_0:    sq_res = sq_in;
      SQ_1:    sq_res = sq1;
      SQ_6:    sq_res = sq6;
      default: sq_res = sq15;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) rf[i] <= '0;
      sq_zero <= 1'b0;
    end else if (load) begin
      rf[R_PX] <= ld_px;  rf[R_PY] <= ld_py;
      rf[R_UX] <= ld_ux;  rf[R_UY] <= ld_uy;
      rf[R_MX] <= ld_mx;  rf[R_MY] <= ld_my;
      rf[R_A]  <= ld_a;   rf[R_B]  <= ld_b;
    end else begin
      if (ctl.mul_en) rf[ctl.mul_dst] <= mul_res;
      if (ctl.sq_en) begin
        rf[ctl.sq_dst] <= sq_res;
        sq_zero        <= (sq_res == '0);
      end
    end
  end

  assign rx = rf[R_RX];
  assign ry = rf[R_RY];
  assign ox = rf[R_OX];
  assign oy = rf[R_OY];

  // The two write ports must never target the same register or a constant.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
      (ctl.mul_en && ctl.sq_en) |-> (ctl.mul_dst != ctl.sq_dst));
  a_no_const_mul: assert property (@(posedge clk) disable iff (!rst_n)
      ctl.mul_en |-> (ctl.mul_dst != R_ZERO && ctl.mul_dst != R_ONE));
  a_no_const_sq: assert property (@(posedge clk) disable iff (!rst_n)
      ctl.sq_en |-> (ctl.sq_dst != R_ZERO && ctl.sq_dst != R_ONE));
endmodule
