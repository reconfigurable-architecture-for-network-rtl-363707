// ecc_ctrl: finite-state controller of the GF(2^193) elliptic-curve processor.
//
// It runs one of three operations on the data path (ecc_datapath), issuing
// one control word per cycle:
//   OP_KP   Q = kP                          (key generation)
//   OP_ENC  C1 = kG,  C2 = Pm + k*PB        (encryption, k = sender's secret)
//   OP_DEC  R = kC1,  Pm = C2 - R           (decryption, k = receiver's secret)
// Scalar multiplication is the Montgomery ladder in Lopez-Dahab projective
// coordinates (x and z only): after finding the top set bit of k it sets
// (X1,Z1) = (x,1), (X2,Z2) = (x^4+b, x^2) in two cycles, then for each lower
// bit runs Madd on both points and Mdouble on one, six cycles per bit with the
// multiplier busy every cycle:
//   1: T1 = XO*ZD          S1 = XD^2
//   2: T2 = XD*ZO          S2 = ZD^2
//   3: T3 = T1*T2          ZO = (T1+T2)^2
//   4: XO = x*ZO + T3      T1 = S1^2
//   5: ZD = S1*S2          S2 = S2^2
//   6: XD = b*S2 + T1
// where (XO,ZO) is the point that receives the sum and (XD,ZD) the point that
// is doubled: point 1 and point 2 respectively when the key bit is 1, the
// other way round when it is 0. Mxy then recovers affine (xk, yk) with one
// field inversion. The inversion is Itoh-Tsujii on the addition chain
// 1,2,3,6,12,24,48,96,192 for 2^192 - 1, with the squaring runs broken into
// single-cycle steps of 2^15, 2^6 and 2^1 (greedy), 36 cycles in all.
// Affine point addition (for encryption and decryption) uses one inversion and
// one formula for both P+Q and 2P: lambda = (y1+y2)/(x1+x2), or x1 + y1/x1
// when P = Q; x3 = lambda^2 + lambda + x1 + x2 + a; y3 = lambda(x1+x3) + x3 + y1.
//
// Interface: pulse start with op and k valid (the data path loads its operand
// registers in the same cycle); busy stays high until done pulses for one
// cycle. r_inf / o_inf flag a result that is the point at infinity.
// Timing of OP_KP with the top set bit of k at position t:
//   (193 - t) + 2 + 6t + 3 + 5 + 36 + 5 + 1 + 1 cycles from start to done.
//
// The algorithm (Montgomery ladder, Madd/Mdouble/Mxy, Itoh-Tsujii inversion,
// single-cycle 2^1/2^6/2^15 squarers, the encryption and decryption equations)
// follows the design; the cycle schedule, the handling of k = 0 and of points
// at infinity, and the use of the sender's scalar for both C1 and C2 are this
// implementation's choices.
module ecc_ctrl
  import ecc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  op_t    op,
  input  felem_t k,
  input  logic   sq_zero,
  output logic   load,
  output ctl_t   ctl,
  output logic   busy,
  output logic   done,
  output logic   r_inf,
  output logic   o_inf
);
  typedef enum logic [5:0] {
    S_IDLE, S_SCAN, S_INIT1, S_INIT2,
    S_L1, S_L2, S_L3, S_L4, S_L5, S_L6,
    S_MXY0, S_MXY1, S_MXY2, S_Y2, S_Y3, S_Y4, S_Y5, S_Y6,
    S_Y7, S_Y8, S_Y9, S_Y10, S_Y11,
    S_INV0, S_INVSQ, S_INVMUL, S_INVFIN,
    S_LAD_END, S_SAVE0, S_COPYPB, S_NEG,
    S_PADD0, S_PADD1, S_PADD2, S_PADD3,
    S_A3, S_A4, S_A5, S_A6, S_A7, S_A8, S_A9, S_A10, S_A11,
    S_DONE
  } state_t;

  state_t      state, inv_ret;
  op_t         op_r;
  felem_t      k_r;
  logic [7:0]  idx;        // current key bit
  logic        pass;       // second ladder of OP_ENC
  logic [2:0]  istep;      // Itoh-Tsujii chain step
  logic [6:0]  sq_rem;     // squarings left in this chain step
  logic        first_sq;   // next squaring is the first of its step
  reg_t        inv_src, num_r;
  logic        dbl, eqx;

  // Itoh-Tsujii chain: squarings per step; steps 0 and 1 multiply by the
  // input, the others by the value the step started from.
  function automatic logic [6:0] chain_sq(input logic [2:0] s);
    case (s)
      3'd0: chain_sq = 7'd1;   3'd1: chain_sq = 7'd1;
      3'd2: chain_sq = 7'd3;   3'd3: chain_sq = 7'd6;
      3'd4: chain_sq = 7'd12;  3'd5: chain_sq = 7'd24;
      3'd6: chain_sq = 7'd48;  default: chain_sq = 7'd96;
    endcase
  endfunction

  // Largest single-cycle squarer that fits what is left.
  sqn_t        sq_pick;
  logic [6:0]  sq_step;
  always_comb begin
    if (sq_rem >= 7'd15)      begin sq_pick = SQ_15; sq_step = 7'd15; end
    else if (sq_rem >= 7'd6)  begin sq_pick = SQ_6;  sq_step = 7'd6;  end
    else                      begin sq_pick = SQ_1;  sq_step = 7'd1;  end
  end

  // Ladder register roles for the current key bit.
  logic kb;
  reg_t xo, zo, xd, zd;
  assign kb = k_r[idx];
  assign xo = kb ? R_X1 : R_X2;
  assign zo = kb ? R_Z1 : R_Z2;
  assign xd = kb ? R_X2 : R_X1;
  assign zd = kb ? R_Z2 : R_Z1;

  // Control word of the current state.
  always_comb begin
    ctl = CTL_NOP;
    `define MUL(D, A, B, X) begin ctl.mul_en = 1'b1; ctl.mul_dst = D; ctl.mul_a = A; ctl.mul_b = B; ctl.mul_x = X; end
    `define SQ(D, A, B, N)  begin ctl.sq_en  = 1'b1; ctl.sq_dst  = D; ctl.sq_a  = A; ctl.sq_b  = B; ctl.sq_n  = N; end
    unique case (state)
      S_INIT1:  begin `MUL(R_X1, R_PX, R_ONE, R_ZERO) `SQ(R_Z2, R_PX, R_ZERO, SQ_1) end
      S_INIT2:  begin `MUL(R_X2, R_Z2, R_Z2, R_B)     `SQ(R_Z1, R_ONE, R_ZERO, SQ_0) end
      S_L1:     begin `MUL(R_T1, xo, zd, R_ZERO)      `SQ(R_S1, xd, R_ZERO, SQ_1) end
      S_L2:     begin `MUL(R_T2, xd, zo, R_ZERO)      `SQ(R_S2, zd, R_ZERO, SQ_1) end
      S_L3:     begin `MUL(R_T3, R_T1, R_T2, R_ZERO)  `SQ(zo, R_T1, R_T2, SQ_1) end
      S_L4:     begin `MUL(xo, R_PX, zo, R_T3)        `SQ(R_T1, R_S1, R_ZERO, SQ_1) end
      S_L5:     begin `MUL(zd, R_S1, R_S2, R_ZERO)    `SQ(R_S2, R_S2, R_ZERO, SQ_1) end
      S_L6:     `MUL(xd, R_B, R_S2, R_T1)
      S_MXY0:   `SQ(R_T1, R_Z1, R_ZERO, SQ_0)
      S_MXY1:   `SQ(R_T2, R_Z2, R_ZERO, SQ_0)
      S_MXY2:   if (sq_zero) begin `MUL(R_RX, R_PX, R_ONE, R_ZERO) `SQ(R_RY, R_PX, R_PY, SQ_0) end
                else         begin `MUL(R_T1, R_Z1, R_Z2, R_ZERO)  `SQ(R_S1, R_PX, R_ZERO, SQ_1) end
      S_Y2:     begin `MUL(R_T2, R_PX, R_T1, R_ZERO)  `SQ(R_S1, R_S1, R_PY, SQ_0) end
      S_Y3:     `MUL(R_T3, R_PX, R_Z1, R_ZERO)
      S_Y4:     begin `MUL(R_S2, R_PX, R_Z2, R_ZERO)  `SQ(R_T3, R_X1, R_T3, SQ_0) end
      S_Y5:     begin `MUL(R_T1, R_S1, R_T1, R_ZERO)  `SQ(R_S2, R_X2, R_S2, SQ_0) end
      S_Y6:     `MUL(R_T3, R_T3, R_S2, R_T1)
      S_Y7:     `MUL(R_T1, R_IB, R_PX, R_ZERO)
      S_Y8:     `MUL(R_T1, R_T1, R_Z2, R_ZERO)
      S_Y9:     `MUL(R_RX, R_X1, R_T1, R_ZERO)
      S_Y10:    begin `MUL(R_T3, R_T3, R_IB, R_ZERO)  `SQ(R_S1, R_RX, R_PX, SQ_0) end
      S_Y11:    `MUL(R_RY, R_S1, R_T3, R_PY)
      S_INVSQ:  `SQ(R_IS, first_sq ? ((istep == 3'd0) ? inv_src : R_IB) : R_IS, R_ZERO, sq_pick)
      S_INVMUL: `MUL(R_IB, R_IS, (istep <= 3'd1) ? inv_src : R_IB, R_ZERO)
      S_INVFIN: `SQ(R_IB, R_IB, R_ZERO, SQ_1)
      S_SAVE0:  begin `MUL(R_OY, R_RY, R_ONE, R_ZERO) `SQ(R_OX, R_RX, R_ZERO, SQ_0) end
      S_COPYPB: begin `MUL(R_PY, R_UY, R_ONE, R_ZERO) `SQ(R_PX, R_UX, R_ZERO, SQ_0) end
      S_NEG:    `SQ(R_RY, R_RX, R_RY, SQ_0)
      S_PADD0:  if (r_inf) begin `MUL(R_RY, R_MY, R_ONE, R_ZERO) `SQ(R_RX, R_MX, R_ZERO, SQ_0) end
                else       `SQ(R_T1, R_RX, R_MX, SQ_0)
      S_PADD1:  `SQ(R_T2, R_RY, R_MY, SQ_0)
      S_PADD2:  `SQ(R_S1, R_RX, R_ZERO, SQ_0)
      S_A3:     `MUL(R_T3, num_r, R_IB, dbl ? R_RX : R_ZERO)
      S_A4:     `SQ(R_S1, R_T3, R_ZERO, SQ_1)
      S_A5:     `SQ(R_S2, R_T3, R_A, SQ_0)
      S_A6:     `SQ(R_S2, R_S2, R_S1, SQ_0)
      S_A7:     `SQ(R_S1, R_RX, R_MX, SQ_0)
      S_A8:     `SQ(R_S1, R_S1, R_S2, SQ_0)
      S_A9:     `SQ(R_S2, R_RX, R_S1, SQ_0)
      S_A10:    `SQ(R_T1, R_S1, R_RY, SQ_0)
      S_A11:    begin `MUL(R_RY, R_T3, R_S2, R_T1)    `SQ(R_RX, R_S1, R_ZERO, SQ_0) end
      default:  ;
    endcase
    `undef MUL
    `undef SQ
  end

  assign load = (state == S_IDLE) && start;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      inv_ret  <= S_IDLE;
      op_r     <= OP_KP;
      k_r      <= '0;
      idx      <= '0;
      pass     <= 1'b0;
      istep    <= '0;
      sq_rem   <= '0;
      first_sq <= 1'b0;
      inv_src  <= R_ZERO;
      num_r    <= R_ZERO;
      dbl      <= 1'b0;
      eqx      <= 1'b0;
      r_inf    <= 1'b0;
      o_inf    <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_r  <= op;
          k_r   <= k;
          idx   <= 8'(M - 1);
          pass  <= 1'b0;
          r_inf <= 1'b0;
          o_inf <= 1'b0;
          state <= S_SCAN;
        end
        // Find the most significant set bit of k.
        S_SCAN:
          if (kb)                state <= S_INIT1;
          else if (idx == 8'd0)  begin r_inf <= 1'b1; state <= S_LAD_END; end
          else                   idx <= idx - 8'd1;
        S_INIT1: state <= S_INIT2;
        S_INIT2, S_L6:
          if (idx == 8'd0) state <= S_MXY0;
          else begin idx <= idx - 8'd1; state <= S_L1; end
        S_L1: state <= S_L2;
        S_L2: state <= S_L3;
        S_L3: state <= S_L4;
        S_L4: state <= S_L5;
        S_L5: state <= S_L6;
        S_MXY0: state <= S_MXY1;
        S_MXY1:                                   // sq_zero: Z1 == 0, kP = O
          if (sq_zero) begin r_inf <= 1'b1; state <= S_LAD_END; end
          else state <= S_MXY2;
        S_MXY2:                                   // sq_zero: Z2 == 0, kP = -P
          if (sq_zero) state <= S_LAD_END;
          else         state <= S_Y2;
        S_Y2: state <= S_Y3;
        S_Y3: state <= S_Y4;
        S_Y4: state <= S_Y5;
        S_Y5: state <= S_Y6;
        S_Y6: begin inv_src <= R_T2; inv_ret <= S_Y7; state <= S_INV0; end
        S_Y7: state <= S_Y8;
        S_Y8: state <= S_Y9;
        S_Y9: state <= S_Y10;
        S_Y10: state <= S_Y11;
        S_Y11: state <= S_LAD_END;
        // Itoh-Tsujii inversion of R[inv_src] into R_IB.
        S_INV0: begin
          istep    <= 3'd0;
          sq_rem   <= chain_sq(3'd0);
          first_sq <= 1'b1;
          state    <= S_INVSQ;
        end
        S_INVSQ: begin
          first_sq <= 1'b0;
          sq_rem   <= sq_rem - sq_step;
          if (sq_rem == sq_step) state <= S_INVMUL;
        end
        S_INVMUL:
          if (istep == 3'd7) state <= S_INVFIN;
          else begin
            istep    <= istep + 3'd1;
            sq_rem   <= chain_sq(istep + 3'd1);
            first_sq <= 1'b1;
            state    <= S_INVSQ;
          end
        S_INVFIN: state <= inv_ret;
        // End of a scalar multiplication: decide what the operation does next.
        S_LAD_END:
          if (op_r == OP_ENC && pass) state <= S_PADD0;
          else                        state <= S_SAVE0;
        S_SAVE0: begin
          o_inf <= r_inf;
          unique case (op_r)
            OP_ENC:  state <= S_COPYPB;
            OP_DEC:  state <= S_NEG;
            default: state <= S_DONE;
          endcase
        end
        S_COPYPB: begin
          pass  <= 1'b1;
          idx   <= 8'(M - 1);
          r_inf <= 1'b0;
          state <= S_SCAN;
        end
        S_NEG: state <= S_PADD0;
        // Affine addition R + M into R.
        S_PADD0:
          if (r_inf) begin r_inf <= 1'b0; state <= S_DONE; end
          else state <= S_PADD1;
        S_PADD1: begin eqx <= sq_zero; state <= S_PADD2; end
        S_PADD2:
          if (!eqx) begin
            inv_src <= R_T1; num_r <= R_T2; dbl <= 1'b0;
            inv_ret <= S_A3; state <= S_INV0;
          end else if (!sq_zero) begin            // P + (-P)
            r_inf <= 1'b1; state <= S_DONE;
          end else state <= S_PADD3;              // P + P
        S_PADD3:
          if (sq_zero) begin r_inf <= 1'b1; state <= S_DONE; end   // x = 0: 2P = O
          else begin
            inv_src <= R_RX; num_r <= R_RY; dbl <= 1'b1;
            inv_ret <= S_A3; state <= S_INV0;
          end
        S_A3:  state <= S_A4;
        S_A4:  state <= S_A5;
        S_A5:  state <= S_A6;
        S_A6:  state <= S_A7;
        S_A7:  state <= S_A8;
        S_A8:  state <= S_A9;
        S_A9:  state <= S_A10;
        S_A10: state <= S_A11;
        S_A11: state <= S_DONE;
        S_DONE: begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
