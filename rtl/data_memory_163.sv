// data_memory_163: data memory of the GF(2^163) processor, 16 words of 163
// bits. It receives the affine input point from the host interface and the
// ladder result (X1, Z1, X2, Z2) from the register file, and holds AU-2's
// operands, temporaries and the affine result (xk, yk).
//
// One synchronous write port, three combinational read ports (A, B, C) for
// AU-2, and dedicated outputs for xk and yk. Address D_ZERO always reads 0
// and is never written. The memory's role follows the design; its size, map
// and ports are this implementation's choices. Active-low synchronous reset.
module data_memory_163
  import ecc163_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  daddr_t wa,
  input  ne_t    wd,
  input  daddr_t ra, rb, rc,
  output ne_t    da, db, dc,
  output ne_t    xk, yk
);
  ne_t mem [16];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) mem[i] <= '0;
    end else if (we && wa != D_ZERO) begin
      mem[wa] <= wd;
    end
  end

  assign da = (ra == D_ZERO) ? '0 : mem[ra];
  assign db = (rb == D_ZERO) ? '0 : mem[rb];
  assign dc = (rc == D_ZERO) ? '0 : mem[rc];
  assign xk = mem[D_XK];
  assign yk = mem[D_YK];
endmodule
