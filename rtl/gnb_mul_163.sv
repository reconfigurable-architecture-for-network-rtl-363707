// gnb_mul_163: word-level (digit-serial) multiplier for GF(2^163) in Gaussian
// normal basis, the field multiplier of the GF(2^163) processor's arithmetic
// unit.
//
// An element is a = sum a_i * beta^(2^i), i = 0..M-1, so squaring is a cyclic
// shift ((a^2)_i = a_(i-1)) and 1 is the all-ones vector. For a Gaussian
// normal basis of type T, with p = T*M + 1 prime and u of order T modulo p,
// let F(2^i * u^j mod p) = i. Product bit i is
//   c_i = XOR over k = 1 .. p-2 of a_(F(k+1)+i) & b_(F(p-k)+i)   (indices mod M),
// i.e. bit 0's formula applied to operands rotated by i. The multiplier
// evaluates W bits per cycle with one fixed AND/XOR array for bits 0..W-1 and
// rotates both operand registers by W positions between cycles, so a product
// takes L = ceil(M/W) cycles. The table F is computed at elaboration by
// a constant function.
//
// Interface: pulse start with a and b valid; busy is high for L cycles, then
// done pulses for one cycle with the product on c, which holds until the next
// start. Active-low synchronous reset.
//
// The field, the normal-basis representation, the word-level structure and the
// digit size W = 55 giving L = 3 cycles follow the design; the basis type T = 4
// (the standard Gaussian normal basis for m = 163), the operand rotation
// scheme and the handshake are this implementation's choices.
module gnb_mul_163 #(
  parameter int unsigned M = 163,
  parameter int unsigned T = 4,
  parameter int unsigned W = 55
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  localparam int unsigned P = T * M + 1;
  localparam int unsigned L = (M + W - 1) / W;

  // Element of order T modulo P.
  function automatic int unsigned gnb_u();
    for (int unsigned u = 2; u < P; u++) begin
      int unsigned x = 1;
      bit          ok = 1'b1;
      for (int unsigned e = 1; e <= T; e++) begin
        x = (x * u) % P;
        if (e < T && x == 1) ok = 1'b0;
      end
      if (ok && x == 1) return u;
    end
    return 0;
  endfunction

  // Table F: F(2^i * u^j mod P) = i, built in one pass.
  typedef logic [P-1:0][7:0] ftab_t;
  function automatic ftab_t gnb_table();
    ftab_t       f = '0;
    int unsigned u = gnb_u();
    int unsigned w = 1;
    for (int unsigned i = 0; i < M; i++) begin
      int unsigned v = w;
      for (int unsigned j = 0; j < T; j++) begin
        f[v] = 8'(i);
        v = (v * u) % P;
      end
      w = (w * 2) % P;
    end
    return f;
  endfunction

  localparam ftab_t FT = gnb_table();

  logic [M-1:0]            ra, rb;
  logic [$clog2(L+1)-1:0]  cnt;
  logic [P-3:0][W-1:0]     terms;
  logic [W-1:0]            word;
  logic [M+W-2:0]          ra2, rb2;   // operands extended cyclically by W-1 bits

  assign ra2 = {ra[W-2:0], ra};
  assign rb2 = {rb[W-2:0], rb};

  // One AND term per k for all W output bits of the current word: bit j of
  // term k is ra[(F(k+1)+j) mod M] & rb[(F(p-k)+j) mod M].
  for (genvar k = 1; k <= int'(P) - 2; k++) begin : g_term
    localparam int unsigned FA = int'(FT[k + 1]);
    localparam int unsigned FB = int'(FT[P - k]);
    assign terms[k-1] = ra2[FA +: W] & rb2[FB +: W];
  end

  always_comb begin
    word = '0;
    for (int k = 0; k < int'(P) - 2; k++) word ^= terms[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ra   <= '0;
      rb   <= '0;
      c    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        ra   <= a;
        rb   <= b;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        for (int j = 0; j < int'(W); j++)
          if (int'(cnt) * int'(W) + j < int'(M)) c[int'(cnt) * int'(W) + j] <= word[j];
        ra <= {ra[W-1:0], ra[M-1:W]};       // ra_new[i] = ra[(i+W) mod M]
        rb <= {rb[W-1:0], rb[M-1:W]};
        cnt <= cnt + 1'b1;
        if (int'(cnt) == int'(L) - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
