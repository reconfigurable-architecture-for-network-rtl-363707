// regfile_163: the 7 x 163-bit register file of the GF(2^163) processor.
//
// Entries 0..3 hold the ladder coordinates X1, Z1, X2, Z2, entries 4..6 are
// temporaries of point doubling and addition. Three combinational read ports
// (A, B, C) feed arithmetic unit AU-1, one synchronous write port takes its
// results, and the four coordinates are also read out in parallel for the
// transfer to data memory. The size (7 x 163 bits) follows the design; the
// port structure is this implementation's choice. Active-low synchronous reset.
module regfile_163
  import ecc163_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ra, rb, rc,
  output ne_t        da, db, dc,
  input  logic       we,
  input  logic [2:0] wa,
  input  ne_t        wd,
  output ne_t        x1, z1, x2, z2
);
  ne_t rf [7];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 7; i++) rf[i] <= '0;
    end else if (we && wa < 3'd7) begin
      rf[wa] <= wd;
    end
  end

  assign da = (ra < 3'd7) ? rf[ra] : '0;
  assign db = (rb < 3'd7) ? rf[rb] : '0;
  assign dc = (rc < 3'd7) ? rf[rc] : '0;
  assign x1 = rf[0];
  assign z1 = rf[1];
  assign x2 = rf[2];
  assign z2 = rf[3];

  a_wa_range: assert property (@(posedge clk) disable iff (!rst_n) we |-> wa < 3'd7);
endmodule
