// tb_ecc_datapath: drives the data path with hand-written control words and
// checks the written registers (through the rx/ry/ox/oy read ports) against
// the bit-serial reference arithmetic: multiply-accumulate, add-then-square
// with each squarer power, the constants 0 and 1, the zero flag, both write
// ports in one cycle, and the one-cycle load of the operand registers.
module tb_ecc_datapath;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic   clk = 0, rst_n = 0, load = 0, sq_zero;
  felem_t px, py, ux, uy, mx, my, ca, cb, rx, ry, ox, oy;
  ctl_t   ctl = CTL_NOP;

  ecc_datapath dut (
    .clk, .rst_n, .load,
    .ld_px(px), .ld_py(py), .ld_ux(ux), .ld_uy(uy), .ld_mx(mx), .ld_my(my),
    .ld_a(ca), .ld_b(cb), .ctl, .sq_zero, .rx, .ry, .ox, .oy
  );

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, felem_t got, felem_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic step(ctl_t c);
    ctl <= c;
    @(posedge clk);
    ctl <= CTL_NOP;
    #1;
  endtask

  function automatic ctl_t mulw(reg_t d, reg_t a, reg_t b, reg_t x);
    ctl_t c = CTL_NOP;
    c.mul_en = 1'b1; c.mul_dst = d; c.mul_a = a; c.mul_b = b; c.mul_x = x;
    return c;
  endfunction

  function automatic ctl_t sqw(reg_t d, reg_t a, reg_t b, sqn_t n);
    ctl_t c = CTL_NOP;
    c.sq_en = 1'b1; c.sq_dst = d; c.sq_a = a; c.sq_b = b; c.sq_n = n;
    return c;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20; n++) begin
      ctl_t c;
      px = frand(); py = frand(); ux = frand(); uy = frand();
      mx = frand(); my = frand(); ca = frand(); cb = frand();
      load <= 1'b1; @(posedge clk); load <= 1'b0; #1;
      // copies through both paths
      c = mulw(R_RX, R_PX, R_ONE, R_ZERO); c.sq_en = 1'b1; c.sq_dst = R_RY; c.sq_a = R_PY; c.sq_b = R_ZERO; c.sq_n = SQ_0;
      step(c);
      chk("copy px", rx, px); chk("copy py", ry, py);
      // multiply-accumulate
      step(mulw(R_RX, R_PX, R_PY, R_A));
      chk("mac", rx, fmul(px, py) ^ ca);
      step(mulw(R_OX, R_UX, R_B, R_ZERO));
      chk("mul", ox, fmul(ux, cb));
      // add-then-square, each power
      step(sqw(R_RY, R_MX, R_MY, SQ_0));  chk("add", ry, mx ^ my);
      step(sqw(R_RY, R_MX, R_MY, SQ_1));  chk("sq1", ry, fsqrn(mx ^ my, 1));
      step(sqw(R_OY, R_UY, R_A, SQ_6));   chk("sq6", oy, fsqrn(uy ^ ca, 6));
      step(sqw(R_OY, R_UY, R_ZERO, SQ_15)); chk("sq15", oy, fsqrn(uy, 15));
      checks++; if (sq_zero !== (fsqrn(uy, 15) == '0)) begin failures++; $display("FAIL zero flag"); end
      // zero flag on a zero result
      step(sqw(R_T1, R_PX, R_PX, SQ_0));
      checks++; if (sq_zero !== 1'b1) begin failures++; $display("FAIL zero flag set"); end
      // chained use of a temporary: T1 = px*ux, then RX = T1^2
      step(mulw(R_T1, R_PX, R_UX, R_ZERO));
      step(sqw(R_RX, R_T1, R_ZERO, SQ_1));
      chk("chain", rx, fsqr(fmul(px, ux)));
      // both paths in the same cycle read the old value of a register
      c = mulw(R_RX, R_RX, R_ONE, R_B); c.sq_en = 1'b1; c.sq_dst = R_RY; c.sq_a = R_RX; c.sq_b = R_ZERO; c.sq_n = SQ_0;
      step(c);
      chk("dual rx", rx, fsqr(fmul(px, ux)) ^ cb);
      chk("dual ry", ry, fsqr(fmul(px, ux)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
