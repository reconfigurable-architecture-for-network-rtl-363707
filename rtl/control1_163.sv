// control1_163: controller of AU-1 in the GF(2^163) processor; runs the
// Montgomery ladder (Lopez-Dahab x/z coordinates) over the key.
//
// After start it scans k for its top set bit (one cycle per bit), issues four
// AU-1 operations that set X1 = x, Z1 = 1, X2 = x^4 + b, Z2 = x^2, and then,
// for each lower key bit, eight AU-1 operations:
//   T1 = XO*ZD;  T2 = XD*ZO;  T3 = T1*T2;  ZO = T1^2 + T2^2;  XO = x*ZO + T3;
//   T1 = b*ZD^4 + XD^4;  ZD = XD^2 * ZD^2;  XD = T1
// where (XO,ZO) is point 1 and (XD,ZD) point 2 when the bit is 1, and the
// other way round when it is 0 (Madd into one point, Mdouble of the other).
// Each operation is issued with au_start and its result written to the
// register file when AU-1 signals au_done. Finally the four coordinates are
// copied to data memory (one word per cycle, dm_sel 0..3 = X1, Z1, X2, Z2)
// and done pulses to start control-2.
// The ladder follows the design's algorithm; the micro-operation order is this
// implementation's. k must be non-zero. Active-low synchronous reset.
// Lint note: a destination is always a register (X1..T3), so the top bit of
// the 4-bit source code passed as destination is unused.
module control1_163
  import ecc163_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  ne_t        k,
  output au1_op_t    op,
  output logic       au_start,
  input  logic       au_done,
  output logic       rf_we,
  output logic [2:0] rf_wa,
  output logic       dm_we,
  output daddr_t     dm_wa,
  output logic [1:0] dm_sel,
  output logic       busy,
  output logic       done
);
  typedef enum logic [2:0] {C_IDLE, C_SCAN, C_ISSUE, C_WAIT, C_XFER, C_DONE} cst_t;

  cst_t       st;
  ne_t        k_r;
  logic [7:0] idx;
  logic       init;    // issuing the four set-up operations
  logic [2:0] upc;

  function automatic au1_op_t mk(logic m, a1src_t sa, logic [1:0] ra, a1src_t sb,
                                 logic [1:0] rb, a1src_t sc, logic [1:0] rc, a1src_t d);
    au1_op_t o;
    o.mul = m; o.a = sa; o.ra = ra; o.b = sb; o.rb = rb; o.c = sc; o.rc = rc;
    o.dst = d[2:0];
    return o;
  endfunction

  logic   kb;
  a1src_t xo, zo, xd, zd;
  assign kb = k_r[idx];
  assign xo = kb ? A1_X1 : A1_X2;
  assign zo = kb ? A1_Z1 : A1_Z2;
  assign xd = kb ? A1_X2 : A1_X1;
  assign zd = kb ? A1_Z2 : A1_Z1;

  always_comb begin
    if (init) begin
      unique case (upc[1:0])
        2'd0:    op = mk(1'b0, A1_X,   2'd0, A1_ZERO, 2'd0, A1_ZERO, 2'd0, A1_X1);
        2'd1:    op = mk(1'b0, A1_ONE, 2'd0, A1_ZERO, 2'd0, A1_ZERO, 2'd0, A1_Z1);
        2'd2:    op = mk(1'b0, A1_X,   2'd2, A1_ZERO, 2'd0, A1_B,    2'd0, A1_X2);
        default: op = mk(1'b0, A1_X,   2'd1, A1_ZERO, 2'd0, A1_ZERO, 2'd0, A1_Z2);
      endcase
    end else begin
      unique case (upc)
        3'd0:    op = mk(1'b1, xo,    2'd0, zd,    2'd0, A1_ZERO, 2'd0, A1_T1);
        3'd1:    op = mk(1'b1, xd,    2'd0, zo,    2'd0, A1_ZERO, 2'd0, A1_T2);
        3'd2:    op = mk(1'b1, A1_T1, 2'd0, A1_T2, 2'd0, A1_ZERO, 2'd0, A1_T3);
        3'd3:    op = mk(1'b0, A1_T1, 2'd1, A1_ZERO, 2'd0, A1_T2, 2'd1, zo);
        3'd4:    op = mk(1'b1, A1_X,  2'd0, zo,    2'd0, A1_T3,   2'd0, xo);
        3'd5:    op = mk(1'b1, A1_B,  2'd0, zd,    2'd2, xd,      2'd2, A1_T1);
        3'd6:    op = mk(1'b1, xd,    2'd1, zd,    2'd1, A1_ZERO, 2'd0, zd);
        default: op = mk(1'b0, A1_T1, 2'd0, A1_ZERO, 2'd0, A1_ZERO, 2'd0, xd);
      endcase
    end
  end

  assign au_start = (st == C_ISSUE);
  assign rf_we    = (st == C_WAIT) && au_done;
  assign rf_wa    = op.dst;
  assign dm_we    = (st == C_XFER);
  assign dm_wa    = daddr_t'(4'(D_X1) + 4'(upc[1:0]));
  assign dm_sel   = upc[1:0];
  assign busy     = (st != C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= C_IDLE; k_r <= '0; idx <= '0; init <= 1'b0; upc <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          k_r <= k; idx <= 8'(N163 - 1); st <= C_SCAN;
        end
        C_SCAN:
          if (kb || idx == 8'd0) begin init <= 1'b1; upc <= '0; st <= C_ISSUE; end
          else idx <= idx - 8'd1;
        C_ISSUE: st <= C_WAIT;
        C_WAIT: if (au_done) begin
          if (init && upc == 3'd3) begin
            init <= 1'b0; upc <= '0;
            if (idx == 8'd0) st <= C_XFER;
            else begin idx <= idx - 8'd1; st <= C_ISSUE; end
          end else if (!init && upc == 3'd7) begin
            upc <= '0;
            if (idx == 8'd0) st <= C_XFER;
            else begin idx <= idx - 8'd1; st <= C_ISSUE; end
          end else begin
            upc <= upc + 3'd1; st <= C_ISSUE;
          end
        end
        C_XFER:
          if (upc == 3'd3) begin upc <= '0; st <= C_DONE; end
          else upc <= upc + 3'd1;
        C_DONE: begin done <= 1'b1; st <= C_IDLE; end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
