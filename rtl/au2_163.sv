// au2_163: arithmetic unit AU-2 of the GF(2^163) processor, which performs the
// conversion of the ladder result from projective to affine coordinates,
// including the field inversion.
//
// One instruction per start pulse, operands read from data memory:
//   MUL: rot^ra(A) * B + C    (word-level GNB multiplier, 3 cycles)
//   ADD: rot^ra(A) + C        (1 cycle)
// rot^ra is a cyclic rotation by 0..162 positions, i.e. raising A to the power
// 2^ra, which in normal basis costs only wiring (a barrel rotator). This makes
// each Itoh-Tsujii step a single MUL instruction. done pulses for one cycle
// with the result on y. The role of AU-2 follows the design; its instruction
// format and barrel rotator are this implementation's choices. Active-low
// synchronous reset.
// Lint note: the multiplier's busy output is not needed (its done is used).
module au2_163
  import ecc163_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       mul,
  input  ne_t        a, b, c,
  input  logic [7:0] ra,
  output logic       busy,
  output logic       done,
  output ne_t        y
);
  // Left rotation by r: bit i of the result is bit (i - r) mod 163 of v.
  function automatic ne_t rotn(ne_t v, logic [7:0] r);
    ne_t t = v;
    for (int s = 0; s < 8; s++)
      if (r[s]) t = ne_t'({t, t} >> (N163 - ((1 << s) % N163)));
    return t;
  endfunction

  ne_t  ma, cc, mp;
  logic m_start, m_busy, m_done, pend;

  assign ma      = rotn(a, ra);
  assign m_start = start && mul && !busy;

  gnb_mul_163 u_mul (.clk, .rst_n, .start(m_start), .a(ma), .b(b),
                     .busy(m_busy), .done(m_done), .c(mp));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cc <= '0; y <= '0; done <= 1'b0; pend <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        cc <= c;
        if (mul) pend <= 1'b1;
        else begin y <= ma ^ c; done <= 1'b1; end
      end else if (pend && m_done) begin
        y    <= mp ^ cc;
        done <= 1'b1;
        pend <= 1'b0;
      end
    end
  end

  assign busy = pend;

  a_rot_range: assert property (@(posedge clk) disable iff (!rst_n) start |-> ra < 8'd163);
endmodule
