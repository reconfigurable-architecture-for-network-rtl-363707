// au1_163: arithmetic unit AU-1 of the GF(2^163) processor, which carries out
// the point doubling and point addition steps of the Montgomery ladder.
//
// One micro-operation per start pulse: the unit latches its operands, squares
// each by a rotation of 0..2 positions (squaring in normal basis), and returns
//   MUL: rot^ra(A) * rot^rb(B) + rot^rc(C)   (word-level GNB multiplier, 3 cycles)
//   ADD: rot^ra(A) + rot^rc(C)               (1 cycle)
// done pulses for one cycle with the result on y (held until the next start).
// The word-level normal-basis multiplier follows the design; the operation
// format is this implementation's choice. Active-low synchronous reset.
// Lint note: the multiplier's busy output is not needed (its done is used).
module au1_163
  import ecc163_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       mul,
  input  ne_t        a, b, c,
  input  logic [1:0] ra, rb, rc,
  output logic       busy,
  output logic       done,
  output ne_t        y
);
  function automatic ne_t rot(ne_t v, logic [1:0] r);
    ne_t t = v;
    for (int i = 0; i < 3; i++)
      if (i < int'(r)) t = {t[N163-2:0], t[N163-1]};
    return t;
  endfunction

  ne_t  ma, mb, cc, mp;
  logic m_start, m_busy, m_done, pend;

  assign ma      = rot(a, ra);
  assign mb      = rot(b, rb);
  assign m_start = start && mul && !busy;

  gnb_mul_163 u_mul (.clk, .rst_n, .start(m_start), .a(ma), .b(mb),
                     .busy(m_busy), .done(m_done), .c(mp));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cc <= '0; y <= '0; done <= 1'b0; pend <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        cc <= rot(c, rc);
        if (mul) pend <= 1'b1;
        else begin y <= rot(a, ra) ^ rot(c, rc); done <= 1'b1; end
      end else if (pend && m_done) begin
        y    <= mp ^ cc;
        done <= 1'b1;
        pend <= 1'b0;
      end
    end
  end

  assign busy = pend;
endmodule
