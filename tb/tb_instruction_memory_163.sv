// tb_instruction_memory_163: executes the stored program with a software model
// of control-2 and AU-2 built on the normal-basis reference arithmetic
// (MUL: dst = a^(2^ra)*b + c, ADD: dst = a^(2^ra) + c, address D_ZERO reads
// 0). The data memory starts with x, y and a projective pair (X1, Z1),
// (X2, Z2) for kP and (k+1)P with random Z; at the END word the words xk and
// yk must equal the affine kP. Also checks the program length and that every
// address past the end reads END.
module tb_instruction_memory_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [4:0] addr;
  instr_t instr;
  nfe_t mem [16];

  instruction_memory_163 dut (.addr, .instr);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic nfe_t rd(daddr_t a);
    return (a == D_ZERO) ? '0 : mem[a];
  endfunction

  initial begin
    gnb_init();
    for (int n = 0; n < 12; n++) begin
      automatic nfe_t ca = nrand(), bb, z1 = nrand(), z2 = nrand(), kk = nrand();
      automatic npt_t p, q0, q1;
      automatic int len = 0;
      p.inf = 1'b0; p.x = nrand(); p.y = nrand();
      bb = nsqr(p.y) ^ nmul(p.x, p.y) ^ nmul(nsqr(p.x), p.x) ^ nmul(ca, nsqr(p.x));
      if (n >= 6) kk = kk >> (20 * n);
      if (kk == '0) kk = 1;
      q0 = nsmul(kk, p, ca);
      q1 = nsmul(kk + 1, p, ca);
      for (int i = 0; i < 16; i++) mem[i] = nrand();
      mem[D_X] = p.x; mem[D_Y] = p.y;
      mem[D_X1] = nmul(q0.x, z1); mem[D_Z1] = z1;
      mem[D_X2] = nmul(q1.x, z2); mem[D_Z2] = z2;
      for (int pc = 0; pc < 32; pc++) begin
        nfe_t v;
        addr = 5'(pc); #1;
        if (instr.op == I_END) break;
        v = nsqrn(rd(instr.a), int'(instr.ra));
        v = (instr.op == I_MUL) ? nmul(v, rd(instr.b)) ^ rd(instr.c) : v ^ rd(instr.c);
        if (instr.dst != D_ZERO) mem[instr.dst] = v;
        len++;
      end
      checks += 3;
      if (len != 23) begin failures++; $display("FAIL length %0d", len); end
      if (mem[D_XK] !== q0.x) begin failures++; $display("FAIL xk %h exp %h", mem[D_XK], q0.x); end
      if (mem[D_YK] !== q0.y) begin failures++; $display("FAIL yk %h exp %h", mem[D_YK], q0.y); end
    end
    for (int a = 23; a < 32; a++) begin
      addr = 5'(a); #1; checks++;
      if (instr.op != I_END) begin failures++; $display("FAIL addr %0d not END", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
