// ecc163_top: GF(2^163) elliptic-curve scalar multiplier, Q = kP, with field
// arithmetic in Gaussian normal basis (type 4).
//
// Eight components, as in the design:
//   host interface (hi_163)        takes k, P = (x, y), b with start; returns
//                                  (xk, yk) with an end pulse
//   register file (regfile_163)    7 x 163 bits: X1, Z1, X2, Z2 and temporaries
//   control-1 (control1_163)       Montgomery ladder sequencing of AU-1
//   AU-1 (au1_163)                 point doubling and addition operations
//   data memory (data_memory_163)  receives X1, Z1, X2, Z2 and the input point
//   instruction memory             AU-2 program: conversion to affine
//     (instruction_memory_163)       coordinates with Itoh-Tsujii inversion
//   control-2 (control2_163)       fetches instructions, drives AU-2 and data
//                                  memory, signals the end to the host interface
//   AU-2 (au2_163)                 coordinate conversion arithmetic
// Both arithmetic units use the word-level normal-basis multiplier with a
// 55-bit digit (3 cycles per product); squaring is a rotation.
//
// Timing: roughly 30 cycles per key bit on AU-1 (six products and two
// additions) plus about 130 cycles for the AU-2 program. Results for k = 0,
// or when kP or (k+1)P is the point at infinity, are not defined.
// Lint note: the busy outputs of the controllers and arithmetic units are left
// unused (the handshakes run on start/done), and the destination field of
// AU-1's operation word is used inside control-1 only.
// The component list, the normal basis, the digit size and the ladder follow
// the design; how the components exchange data, the instruction format and
// the AU-2 program are this implementation's choices.
module ecc163_top
  import ecc163_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  ne_t  k,
  input  ne_t  x,
  input  ne_t  y,
  input  ne_t  b,
  output logic busy,
  output logic end_o,
  output ne_t  xk,
  output ne_t  yk
);
  // host interface
  ne_t    hk, hx, hb, hi_wd, dm_xk, dm_yk;
  logic   hi_we, c1_start, c2_done;
  daddr_t hi_wa;

  hi_163 u_hi (.clk, .rst_n, .start, .k_in(k), .x_in(x), .y_in(y), .b_in(b),
               .busy, .end_o, .xk, .yk, .k(hk), .x(hx), .b(hb),
               .dm_we(hi_we), .dm_wa(hi_wa), .dm_wd(hi_wd),
               .c1_start, .c2_done, .dm_xk, .dm_yk);

  // control-1, register file, AU-1
  au1_op_t    op;
  logic       au1_start, au1_done, au1_busy, rf_we, c1_dm_we, c1_busy, c1_done;
  logic [2:0] rf_wa;
  logic [1:0] c1_sel;
  daddr_t     c1_wa;
  ne_t        rfa, rfb, rfc, rx1, rz1, rx2, rz2, au1_y, va, vb, vc;

  control1_163 u_c1 (.clk, .rst_n, .start(c1_start), .k(hk), .op, .au_start(au1_start),
                     .au_done(au1_done), .rf_we, .rf_wa, .dm_we(c1_dm_we), .dm_wa(c1_wa),
                     .dm_sel(c1_sel), .busy(c1_busy), .done(c1_done));

  regfile_163 u_rf (.clk, .rst_n, .ra(op.a[2:0]), .rb(op.b[2:0]), .rc(op.c[2:0]),
                    .da(rfa), .db(rfb), .dc(rfc), .we(rf_we), .wa(rf_wa), .wd(au1_y),
                    .x1(rx1), .z1(rz1), .x2(rx2), .z2(rz2));

  function automatic ne_t pick(a1src_t s, ne_t rfv);
    unique case (s)
      A1_X:    pick = hx;
      A1_B:    pick = hb;
      A1_ONE:  pick = '1;
      A1_ZERO: pick = '0;
      default: pick = rfv;
    endcase
  endfunction

  assign va = pick(op.a, rfa);
  assign vb = pick(op.b, rfb);
  assign vc = pick(op.c, rfc);

  au1_163 u_au1 (.clk, .rst_n, .start(au1_start), .mul(op.mul), .a(va), .b(vb), .c(vc),
                 .ra(op.ra), .rb(op.rb), .rc(op.rc), .busy(au1_busy), .done(au1_done), .y(au1_y));

  // control-2, instruction memory, data memory, AU-2
  logic [4:0] pc;
  instr_t     instr;
  logic       au2_start, au2_mul, au2_done, au2_busy, c2_we, c2_busy;
  ne_t        da, db, dc, au2_y, xfer_d;

  control2_163 u_c2 (.clk, .rst_n, .start(c1_done), .pc, .instr, .au_start(au2_start),
                     .au_mul(au2_mul), .au_done(au2_done), .dm_we(c2_we),
                     .busy(c2_busy), .done(c2_done));

  instruction_memory_163 u_im (.addr(pc), .instr);

  always_comb begin
    unique case (c1_sel)
      2'd0:    xfer_d = rx1;
      2'd1:    xfer_d = rz1;
      2'd2:    xfer_d = rx2;
      default: xfer_d = rz2;
    endcase
  end

  logic   dm_we;
  daddr_t dm_wa;
  ne_t    dm_wd;
  always_comb begin
    if (hi_we)         begin dm_we = 1'b1; dm_wa = hi_wa;     dm_wd = hi_wd;  end
    else if (c1_dm_we) begin dm_we = 1'b1; dm_wa = c1_wa;     dm_wd = xfer_d; end
    else if (c2_we)    begin dm_we = 1'b1; dm_wa = instr.dst; dm_wd = au2_y;  end
    else               begin dm_we = 1'b0; dm_wa = D_ZERO;    dm_wd = '0;     end
  end

  data_memory_163 u_dm (.clk, .rst_n, .we(dm_we), .wa(dm_wa), .wd(dm_wd),
                        .ra(instr.a), .rb(instr.b), .rc(instr.c),
                        .da, .db, .dc, .xk(dm_xk), .yk(dm_yk));

  au2_163 u_au2 (.clk, .rst_n, .start(au2_start), .mul(au2_mul), .a(da), .b(db), .c(dc),
                 .ra(instr.ra), .busy(au2_busy), .done(au2_done), .y(au2_y));

  // Only one writer of data memory at a time.
  a_dm_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({hi_we, c1_dm_we, c2_we}));
endmodule
