// tb_control2_163: control-2 running the stored program on a real instruction
// memory, data memory and AU-2. The testbench loads x, y and a projective
// pair for kP and (k+1)P (random Z) through the data-memory write port, pulses
// start, and checks the affine kP in the xk/yk words, one data-memory write
// per instruction, the number of AU-2 operations and the single done pulse.
module tb_control2_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] pc;
  instr_t instr;
  logic au_start, au_mul, au_done, au_busy, c2_we, busy, done;
  logic tb_we = 0;
  daddr_t tb_wa = D_ZERO;
  ne_t tb_wd, da, db, dc, y, xk, yk;
  int nwr, nops;

  control2_163 dut (.clk, .rst_n, .start, .pc, .instr, .au_start, .au_mul, .au_done,
                    .dm_we(c2_we), .busy, .done);
  instruction_memory_163 u_im (.addr(pc), .instr);
  data_memory_163 u_dm (.clk, .rst_n, .we(tb_we | c2_we), .wa(tb_we ? tb_wa : instr.dst),
                        .wd(tb_we ? tb_wd : y), .ra(instr.a), .rb(instr.b), .rc(instr.c),
                        .da, .db, .dc, .xk, .yk);
  au2_163 u_au2 (.clk, .rst_n, .start(au_start), .mul(au_mul), .a(da), .b(db), .c(dc),
                 .ra(instr.ra), .busy(au_busy), .done(au_done), .y);

  always_ff @(posedge clk) begin
    if (c2_we) nwr <= nwr + 1;
    if (au_start) nops <= nops + 1;
  end

  task automatic wr(daddr_t a, ne_t v);
    tb_we = 1; tb_wa = a; tb_wd = v; @(posedge clk); #1; tb_we = 0;
  endtask

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gnb_init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      automatic nfe_t ca = nrand(), bb, z1 = nrand(), z2 = nrand(), kk = nrand() >> (20 * n);
      automatic npt_t p, q0, q1;
      p.inf = 1'b0; p.x = nrand(); p.y = nrand();
      bb = nsqr(p.y) ^ nmul(p.x, p.y) ^ nmul(nsqr(p.x), p.x) ^ nmul(ca, nsqr(p.x));
      if (kk == '0) kk = 1;
      q0 = nsmul(kk, p, ca);
      q1 = nsmul(kk + 1, p, ca);
      @(posedge clk); #1;
      wr(D_X, p.x); wr(D_Y, p.y);
      wr(D_X1, nmul(q0.x, z1)); wr(D_Z1, z1);
      wr(D_X2, nmul(q1.x, z2)); wr(D_Z2, z2);
      nwr = 0; nops = 0;
      start = 1; @(posedge clk); #1; start = 0;
      while (!done) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      checks += 4;
      if (done || busy) begin failures++; $display("FAIL done/busy after end"); end
      if (nwr != 23 || nops != 23) begin failures++; $display("FAIL %0d writes %0d ops", nwr, nops); end
      if (xk !== q0.x) begin failures++; $display("FAIL xk %h exp %h", xk, q0.x); end
      if (yk !== q0.y) begin failures++; $display("FAIL yk %h exp %h", yk, q0.y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
