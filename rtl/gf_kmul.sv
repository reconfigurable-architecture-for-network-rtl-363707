// gf_kmul: recursive Karatsuba-Ofman multiplier of two W-bit binary
// polynomials, giving the unreduced (2W-1)-bit product in one cycle.
//
// Each operand is split into a high part of H = W - W/2 bits and a low part of
// L = W/2 bits. Three half-size products are formed, Ah*Bh, Al*Bl and
// (Ah+Al)*(Bh+Bl), and the middle term is their sum, so three half-size
// multipliers replace four. The recursion stops at TH bits or fewer, where a
// plain AND/XOR (schoolbook) array is used. Helper of gf_mul; the threshold is
// this implementation's choice.
//
// Lint note: when this module is linted as a top level on its own, Verilator
// does not elaborate the self-instantiations and reports the half-size
// products (p_hh, p_ll, p_mm) as undriven and as/bs as unused. Instantiated
// under gf_mul, as in the design, the recursion elaborates fully and those
// warnings do not appear.
module gf_kmul #(
  parameter int unsigned W  = 193,
  parameter int unsigned TH = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  if (W <= TH) begin : g_base
    always_comb begin
      p = '0;
      for (int i = 0; i < int'(W); i++)
        if (b[i]) p[i +: W] = p[i +: W] ^ a;
    end
  end else begin : g_split
    localparam int unsigned L = W / 2;
    localparam int unsigned H = W - L;

    logic [H-1:0]     ah, bh, as, bs;
    logic [L-1:0]     al, bl;
    logic [2*H-2:0]   p_hh, p_mm;
    logic [2*L-2:0]   p_ll;
    logic [2*H-2:0]   mid;

    assign ah = a[W-1:L];
    assign bh = b[W-1:L];
    assign al = a[L-1:0];
    assign bl = b[L-1:0];
    assign as = ah ^ H'(al);
    assign bs = bh ^ H'(bl);

    gf_kmul #(.W(H), .TH(TH)) u_hh (.a(ah), .b(bh), .p(p_hh));
    gf_kmul #(.W(L), .TH(TH)) u_ll (.a(al), .b(bl), .p(p_ll));
    gf_kmul #(.W(H), .TH(TH)) u_mm (.a(as), .b(bs), .p(p_mm));

    assign mid = p_mm ^ p_hh ^ (2*H-1)'(p_ll);

    always_comb begin
      p = (2*W-1)'(p_ll);
      p = p ^ ((2*W-1)'(mid)  << L);
      p = p ^ ((2*W-1)'(p_hh) << (2*L));
    end
  end
endmodule
