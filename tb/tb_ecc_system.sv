// tb_ecc_system: end-to-end test of the complete design at its default size
// (no parameter overrides): both processors in one top.
//
// GF(2^193) side, on a random curve: key generation, encryption of a message
// point, decryption and the round trip, checked against the affine
// polynomial-basis reference; then the sequencing corner cases (C2 from a
// doubling, C2 at infinity, zero key, the order-2 point) and the latencies
// KP 247 + 5t, ENC 541 + 10t (+1 for a doubling), DEC 296 + 5t.
// GF(2^163) side: kP for random, short and small keys on random curves,
// checked against the normal-basis reference; one of these runs is started
// while the GF(2^193) side is busy, so both work at the same time.
// Each mechanism is counted (ladder steps on 1 and 0 bits and inversions of
// the GF(2^193) controller, general addition, doubling, each infinity exit,
// Z2 = 0 exit; GF(2^163) ladder steps on 1 and 0 bits, AU-2 instructions,
// the inversion chain's longest rotation); one that never happens counts as a
// failure.
module tb_ecc_system;
  import ecc_pkg::*;
  import ecc163_pkg::*;
  import gf_ref_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic   clk = 0, rst_n = 0, start = 0, busy, done, q0_inf, q1_inf;
  op_t    op;
  felem_t k, ca, cb;
  point_t p_in, u_in, m_in, q0, q1;

  logic   n_start = 0, n_busy, n_end;
  ne_t    n_k, n_x, n_y, n_b, n_xk, n_yk;
  ecc_system dut (.clk, .rst_n, .start, .op, .k, .a(ca), .b(cb),
                  .p_in, .u_in, .m_in, .busy, .done, .q0, .q0_inf, .q1, .q1_inf,
                  .n_start, .n_k, .n_x, .n_y, .n_b, .n_busy, .n_end, .n_xk, .n_yk);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the control word the controller issues.
  int n_bit1 = 0, n_bit0 = 0, n_inv = 0, n_add = 0, n_dbl = 0, n_z2 = 0;
  int n_inf_ladder = 0, n_inf_add = 0, n_inf_skip = 0;
  ctl_t c;
  assign c = dut.u_p193.ctl;
  always @(posedge clk) if (rst_n) begin
    if (c.mul_en && c.mul_dst == R_T1 && c.mul_a == R_X1 && c.mul_b == R_Z2) n_bit1++;
    if (c.mul_en && c.mul_dst == R_T1 && c.mul_a == R_X2 && c.mul_b == R_Z1) n_bit0++;
    if (c.sq_en && c.sq_dst == R_IB) n_inv++;
    if (c.mul_en && c.mul_dst == R_T3 && c.mul_b == R_IB && c.mul_x == R_ZERO && c.mul_a == R_T2) n_add++;
    if (c.mul_en && c.mul_dst == R_T3 && c.mul_b == R_IB && c.mul_x == R_RX) n_dbl++;
    if (c.mul_en && c.mul_dst == R_RX && c.mul_a == R_PX && c.mul_b == R_ONE) n_z2++;
  end

  // GF(2^163) mechanism counters
  int m_bit1 = 0, m_bit0 = 0, m_au2 = 0, m_rot81 = 0, m_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_p163.au1_start && !dut.u_p163.u_c1.init && dut.u_p163.u_c1.upc == 3'd0) begin
      if (dut.u_p163.u_c1.kb) m_bit1++; else m_bit0++;
    end
    if (dut.u_p163.au2_start) m_au2++;
    if (dut.u_p163.au2_start && dut.u_p163.instr.ra == 8'd81) m_rot81++;
    if (busy && n_busy) m_overlap++;
  end
  task automatic run163(nfe_t kk, npt_t p, nfe_t ca163, string what);
    npt_t e;
    int   cyc = 0;
    n_k = kk; n_x = p.x; n_y = p.y;
    n_start <= 1'b1; @(posedge clk); n_start <= 1'b0;
    do begin @(posedge clk); #1; cyc++; end while (!n_end);
    e = nsmul(kk, p, ca163);
    checks++;
    if (n_xk !== e.x || n_yk !== e.y) begin
      failures++;
      $display("FAIL 163 %s k=%h: (%h,%h) exp (%h,%h)", what, kk, n_xk, n_yk, e.x, e.y);
    end
    $display("163 %s: %0d cycles", what, cyc);
  endtask
  function automatic int top_bit(felem_t v);
    for (int i = M-1; i >= 0; i--) if (v[i]) return i;
    return 0;
  endfunction

  function automatic point_t pt(rpt_t r);
    point_t p;
    p.x = r.x; p.y = r.y;
    return p;
  endfunction

  task automatic chk_pt(string what, point_t got, logic ginf, rpt_t exp);
    checks++;
    if (ginf !== exp.inf || (!exp.inf && (got.x !== exp.x || got.y !== exp.y))) begin
      failures++;
      $display("FAIL %s: inf=%0d (%h,%h) exp inf=%0d (%h,%h)", what, ginf, got.x, got.y,
               exp.inf, exp.x, exp.y);
    end
  endtask

  task automatic run(op_t o, felem_t kk, point_t p, point_t u, point_t m, output int cyc);
    op = o; k = kk; p_in = p; u_in = u; m_in = m;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  task automatic chk_cyc(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s cycles %0d exp %0d", what, got, exp); end
    else $display("%s: %0d cycles", what, got);
  endtask

  initial begin
    rpt_t g, pb, pm, c1, c2, e, t2, inf_pt;
    felem_t nb, s, mk;
    int cyc;
    npt_t np;
    nfe_t na;
    gnb_init();
    na = nrand(); np.inf = 1'b0; np.x = nrand(); np.y = nrand();
    n_b = nsqr(np.y) ^ nmul(np.x, np.y) ^ nmul(nsqr(np.x), np.x) ^ nmul(na, nsqr(np.x));
    inf_pt.inf = 1'b1; inf_pt.x = '0; inf_pt.y = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    ca = frand(); g.inf = 1'b0; g.x = frand(); g.y = frand();
    cb = fsqr(g.y) ^ fmul(g.x, g.y) ^ fmul(fsqr(g.x), g.x) ^ fmul(ca, fsqr(g.x));

    // Key generation: PB = nB * G
    nb = frand();
    run(OP_KP, nb, pt(g), '0, '0, cyc);
    pb = smul(nb, g, ca);
    chk_pt("keygen q1", q1, q1_inf, pb);
    chk_pt("keygen q0", q0, q0_inf, pb);
    chk_cyc("keygen", cyc, 247 + 5*top_bit(nb));

    // Encryption of Pm = mk * G with sender key s
    mk = frand() >> 40; s = frand();
    pm = smul(mk, g, ca);
    checks++; if (!on_curve(pm, ca, cb)) begin failures++; $display("FAIL message not on curve"); end
    fork
      run(OP_ENC, s, pt(g), pt(pb), pt(pm), cyc);
      run163(nrand(), np, na, "random k (concurrent)");
    join
    c1 = smul(s, g, ca);
    c2 = padd(pm, smul(s, pb, ca), ca);
    chk_pt("enc C1", q0, q0_inf, c1);
    chk_pt("enc C2", q1, q1_inf, c2);
    chk_cyc("encrypt", cyc, 541 + 10*top_bit(s));

    // Decryption by the receiver: Pm = C2 - nB * C1
    run(OP_DEC, nb, pt(c1), '0, pt(c2), cyc);
    chk_pt("dec nB*C1", q0, q0_inf, smul(nb, c1, ca));
    chk_pt("dec Pm", q1, q1_inf, pm);
    chk_cyc("decrypt", cyc, 296 + 5*top_bit(nb));

    // Message equal to s*PB: C2 = 2 s PB, made by the doubling branch
    e = smul(s, pb, ca);
    run(OP_ENC, s, pt(g), pt(pb), pt(e), cyc);
    chk_pt("enc dbl C2", q1, q1_inf, padd(e, e, ca));
    chk_cyc("encrypt (doubling)", cyc, 542 + 10*top_bit(s));

    // Message equal to -s*PB: C2 at infinity
    run(OP_ENC, s, pt(g), pt(pb), pt(pneg(e)), cyc);
    chk_pt("enc inf C2", q1, q1_inf, inf_pt);
    if (q1_inf) n_inf_add++;

    // Zero key: k*C1 at infinity, Pm = C2
    run(OP_DEC, '0, pt(c1), '0, pt(c2), cyc);
    chk_pt("dec k=0 q0", q0, q0_inf, inf_pt);
    chk_pt("dec k=0 q1", q1, q1_inf, c2);
    if (q0_inf) n_inf_skip++;

    // Order-2 point: k = 1 leaves Z2 = 0, k = 2 leaves Z1 = 0
    t2.inf = 1'b0; t2.x = '0; t2.y = fsqrn(cb, M-1);
    run(OP_KP, felem_t'(1), pt(t2), '0, '0, cyc);
    chk_pt("order2 k=1", q1, q1_inf, t2);
    run(OP_KP, felem_t'(2), pt(t2), '0, '0, cyc);
    chk_pt("order2 k=2", q1, q1_inf, inf_pt);
    if (q1_inf) n_inf_ladder++;

    run163(nrand() >> 100, np, na, "short k");
    run163(nfe_t'(1), np, na, "k=1");
    run163(nfe_t'(2), np, na, "k=2");
    $display("163 mechanisms: bit1=%0d bit0=%0d au2_instr=%0d rot81=%0d overlap_cycles=%0d",
             m_bit1, m_bit0, m_au2, m_rot81, m_overlap);
    checks++; if (m_bit1 == 0) begin failures++; $display("FAIL no GF(2^163) ladder step on a 1 bit"); end
    checks++; if (m_bit0 == 0) begin failures++; $display("FAIL no GF(2^163) ladder step on a 0 bit"); end
    checks++; if (m_au2 == 0)  begin failures++; $display("FAIL no AU-2 instruction"); end
    checks++; if (m_rot81 == 0) begin failures++; $display("FAIL no GF(2^163) inversion chain"); end
    checks++; if (m_overlap == 0) begin failures++; $display("FAIL the two processors never ran together"); end
    $display("mechanisms: bit1=%0d bit0=%0d inversions=%0d add=%0d double=%0d z2exit=%0d inf_ladder=%0d inf_add=%0d inf_skip=%0d",
             n_bit1, n_bit0, n_inv, n_add, n_dbl, n_z2, n_inf_ladder, n_inf_add, n_inf_skip);
    checks++; if (n_bit1 == 0) begin failures++; $display("FAIL no ladder step on a 1 bit"); end
    checks++; if (n_bit0 == 0) begin failures++; $display("FAIL no ladder step on a 0 bit"); end
    checks++; if (n_inv == 0)  begin failures++; $display("FAIL no inversion"); end
    checks++; if (n_add == 0)  begin failures++; $display("FAIL no general addition"); end
    checks++; if (n_dbl == 0)  begin failures++; $display("FAIL no doubling"); end
    checks++; if (n_z2 == 0)   begin failures++; $display("FAIL no Z2 = 0 exit"); end
    checks++; if (n_inf_ladder == 0) begin failures++; $display("FAIL no infinity from the ladder"); end
    checks++; if (n_inf_add == 0)    begin failures++; $display("FAIL no infinity from the addition"); end
    checks++; if (n_inf_skip == 0)   begin failures++; $display("FAIL no addition with an operand at infinity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
