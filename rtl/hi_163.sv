// hi_163: host interface of the GF(2^163) processor. The host presents k, the
// base point (x, y) and the curve coefficient b with a start pulse; the
// interface keeps k, x and b in registers for control-1 and AU-1, writes x and
// y into data memory (one word per cycle), starts control-1, and, when
// control-2 reports the end of the conversion, copies (xk, yk) from data
// memory to its result registers and pulses end_o. busy is high in between.
// The start/end behaviour follows the design; the register set and the cycle
// sequence are this implementation's choices. Active-low synchronous reset.
module hi_163
  import ecc163_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // host side
  input  logic   start,
  input  ne_t    k_in, x_in, y_in, b_in,
  output logic   busy,
  output logic   end_o,
  output ne_t    xk, yk,
  // processor side
  output ne_t    k, x, b,
  output logic   dm_we,
  output daddr_t dm_wa,
  output ne_t    dm_wd,
  output logic   c1_start,
  input  logic   c2_done,
  input  ne_t    dm_xk, dm_yk
);
  typedef enum logic [2:0] {H_IDLE, H_LDX, H_LDY, H_RUN, H_END} hst_t;
  hst_t st;
  ne_t  y;

  assign dm_we    = (st == H_LDX) || (st == H_LDY);
  assign dm_wa    = (st == H_LDX) ? D_X : D_Y;
  assign dm_wd    = (st == H_LDX) ? x : y;
  assign c1_start = (st == H_LDY);
  assign busy     = (st != H_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= H_IDLE; k <= '0; x <= '0; y <= '0; b <= '0; xk <= '0; yk <= '0; end_o <= 1'b0;
    end else begin
      end_o <= 1'b0;
      unique case (st)
        H_IDLE: if (start) begin
          k <= k_in; x <= x_in; y <= y_in; b <= b_in; st <= H_LDX;
        end
        H_LDX: st <= H_LDY;
        H_LDY: st <= H_RUN;
        H_RUN: if (c2_done) begin xk <= dm_xk; yk <= dm_yk; st <= H_END; end
        H_END: begin end_o <= 1'b1; st <= H_IDLE; end
        default: st <= H_IDLE;
      endcase
    end
  end
endmodule
