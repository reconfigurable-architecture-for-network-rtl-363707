// tb_ecc_ctrl: runs the FSM controller on the data path for Q = kP and checks
// every result against affine double-and-add in the reference package, and
// the cycle count against the controller's schedule:
//   cycles(start -> done) = (193 - t) + 2 + 6t + 3 + 5 + 36 + 5 + 3,
// t being the position of the top set bit of k. Curves are random: a, x, y
// are drawn and b is chosen so that (x, y) lies on the curve. Besides random
// keys it covers k = 0 (result at infinity), k = 1, a full 193-bit key, and the
// order-2 point (0, sqrt(b)), whose multiples hit the Z1 = 0 and Z2 = 0 exits
// of the coordinate conversion.
module tb_ecc_ctrl;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic   clk = 0, rst_n = 0, start = 0;
  logic   load, sq_zero, busy, done, r_inf, o_inf;
  op_t    op = OP_KP;
  felem_t k, px, py, ca, cb, rx, ry, ox, oy;
  ctl_t   ctl;

  ecc_ctrl u_ctrl (.clk, .rst_n, .start, .op, .k, .sq_zero,
                   .load, .ctl, .busy, .done, .r_inf, .o_inf);
  ecc_datapath u_dp (.clk, .rst_n, .load,
                     .ld_px(px), .ld_py(py), .ld_ux('0), .ld_uy('0), .ld_mx('0), .ld_my('0),
                     .ld_a(ca), .ld_b(cb), .ctl, .sq_zero, .rx, .ry, .ox, .oy);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int top_bit(felem_t v);
    for (int i = M-1; i >= 0; i--) if (v[i]) return i;
    return 0;
  endfunction

  task automatic run_kp(felem_t kk, rpt_t p, string what);
    int   cyc = 0, exp_cyc;
    rpt_t exp;
    k = kk; px = p.x; py = p.y;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    #1;
    exp = smul(kk, p, ca);
    checks++;
    if (r_inf !== exp.inf || o_inf !== exp.inf ||
        (!exp.inf && (rx !== exp.x || ry !== exp.y || ox !== exp.x || oy !== exp.y))) begin
      failures++;
      $display("FAIL %s k=%h: got inf=%0d (%h,%h) exp inf=%0d (%h,%h)",
               what, kk, r_inf, rx, ry, exp.inf, exp.x, exp.y);
    end
    exp_cyc = (M - top_bit(kk)) + 2 + 6*top_bit(kk) + 3 + 5 + 36 + 5 + 3;
    if (kk != '0 && !(p.x == '0)) begin
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL %s cycles %0d exp %0d", what, cyc, exp_cyc); end
    end
    $display("%s: t=%0d cycles=%0d inf=%0d", what, top_bit(kk), cyc, r_inf);
  endtask

  initial begin
    rpt_t p, t2;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < 3; c++) begin
      ca = frand(); p.inf = 1'b0; p.x = frand(); p.y = frand();
      cb = fsqr(p.y) ^ fmul(p.x, p.y) ^ fmul(fsqr(p.x), p.x) ^ fmul(ca, fsqr(p.x));
      checks++;
      if (!on_curve(p, ca, cb)) begin failures++; $display("FAIL curve setup"); end
      run_kp(frand(), p, "random k");
      run_kp(frand() >> 100, p, "short k");
      if (c == 0) begin
        run_kp('0, p, "k=0");
        run_kp(felem_t'(1), p, "k=1");
        run_kp(felem_t'(2), p, "k=2");
        run_kp('1, p, "k=all ones");
        // key printed in the design's result figure
        run_kp(193'h1376F29DD55FCA07557F281D55FCA07557F281D55FCA67551, p, "figure key");
        // order-2 point (0, sqrt(b))
        t2.inf = 1'b0; t2.x = '0; t2.y = fsqrn(cb, M-1);
        run_kp(felem_t'(1), t2, "order-2 k=1");
        run_kp(felem_t'(2), t2, "order-2 k=2");
        run_kp(felem_t'(7), t2, "order-2 k=7");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
