// tb_ecc163_top: end-to-end test of the GF(2^163) processor at its default
// size. On random curves (random a and base point, b chosen to put the point
// on the curve) it computes kP for random 163-bit keys, short keys and
// k = 1, 2, 3, and compares (xk, yk) with affine double-and-add in the
// normal-basis reference package. It checks that a second start is not
// accepted while busy, and counts the ladder steps on 1 bits and on 0 bits
// and the AU-2 instructions executed (each must occur).
module tb_ecc163_top;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, busy, end_o;
  ne_t  k, x, y, b, xk, yk;

  ecc163_top dut (.clk, .rst_n, .start, .k, .x, .y, .b, .busy, .end_o, .xk, .yk);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_bit1 = 0, n_bit0 = 0, n_au2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.au1_start && !dut.u_c1.init && dut.u_c1.upc == 3'd0) begin
      if (dut.u_c1.kb) n_bit1++; else n_bit0++;
    end
    if (dut.au2_start) n_au2++;
  end

  task automatic run(nfe_t kk, npt_t p, nfe_t ca, string what);
    int   cyc = 0;
    npt_t e;
    k = kk; x = p.x; y = p.y;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    do begin
      @(posedge clk); #1; cyc++;
      if (cyc == 5) begin               // a start while busy must be ignored
        start <= 1'b1; k = '0;
        @(posedge clk); #1; cyc++; start <= 1'b0;
      end
    end while (!end_o);
    e = nsmul(kk, p, ca);
    checks++;
    if (xk !== e.x || yk !== e.y) begin
      failures++;
      $display("FAIL %s k=%h: (%h,%h) exp (%h,%h)", what, kk, xk, yk, e.x, e.y);
    end
    $display("%s: %0d cycles", what, cyc);
  endtask

  initial begin
    npt_t p;
    nfe_t ca;
    gnb_init();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      ca = nrand(); p.inf = 1'b0; p.x = nrand(); p.y = nrand();
      b = nsqr(p.y) ^ nmul(p.x, p.y) ^ nmul(nsqr(p.x), p.x) ^ nmul(ca, nsqr(p.x));
      run(nrand(), p, ca, "random k");
      run(nrand() >> 120, p, ca, "short k");
      if (c == 0) begin
        run(ne_t'(1), p, ca, "k=1");
        run(ne_t'(2), p, ca, "k=2");
        run(ne_t'(3), p, ca, "k=3");
      end
    end
    $display("mechanisms: bit1=%0d bit0=%0d au2_instr=%0d", n_bit1, n_bit0, n_au2);
    checks++; if (n_bit1 == 0) begin failures++; $display("FAIL no 1-bit ladder step"); end
    checks++; if (n_bit0 == 0) begin failures++; $display("FAIL no 0-bit ladder step"); end
    checks++; if (n_au2 == 0)  begin failures++; $display("FAIL no AU-2 instruction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
