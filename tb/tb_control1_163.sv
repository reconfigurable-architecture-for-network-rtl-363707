// tb_control1_163: control-1 driving a real register file and AU-1, with the
// operand multiplexer (x, b, 1, 0 or a register) built in the testbench. For
// random curves and keys it captures the four words control-1 hands to data
// memory and checks that they form projective x-coordinates of kP and
// (k+1)P: X1 = x(kP)*Z1 and X2 = x((k+1)P)*Z2 with Z1, Z2 non-zero. Also
// checks the transfer order, the one-cycle done pulse and the number of
// AU-1 operations (4 set-up + 8 per key bit below the top set bit).
module tb_control1_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  ne_t k, x, b;
  au1_op_t op;
  logic au_start, au_done, au_busy, rf_we, dm_we, busy, done;
  logic [2:0] rf_wa;
  daddr_t dm_wa;
  logic [1:0] dm_sel;
  ne_t rfa, rfb, rfc, x1, z1, x2, z2, y, va, vb, vc;
  ne_t cap [4];
  int nxfer, nops;

  control1_163 dut (.clk, .rst_n, .start, .k, .op, .au_start, .au_done, .rf_we, .rf_wa,
                    .dm_we, .dm_wa, .dm_sel, .busy, .done);
  regfile_163 u_rf (.clk, .rst_n, .ra(op.a[2:0]), .rb(op.b[2:0]), .rc(op.c[2:0]),
                    .da(rfa), .db(rfb), .dc(rfc), .we(rf_we), .wa(rf_wa), .wd(y),
                    .x1, .z1, .x2, .z2);

  function automatic ne_t pick(a1src_t s, ne_t rfv);
    case (s)
      A1_X:    return x;
      A1_B:    return b;
      A1_ONE:  return '1;
      A1_ZERO: return '0;
      default: return rfv;
    endcase
  endfunction
  assign va = pick(op.a, rfa);
  assign vb = pick(op.b, rfb);
  assign vc = pick(op.c, rfc);
  au1_163 u_au1 (.clk, .rst_n, .start(au_start), .mul(op.mul), .a(va), .b(vb), .c(vc),
                 .ra(op.ra), .rb(op.rb), .rc(op.rc), .busy(au_busy), .done(au_done), .y);

  always_ff @(posedge clk) begin
    if (au_start) nops <= nops + 1;
    if (dm_we) begin
      nxfer <= nxfer + 1;
      cap[dm_sel] <= (dm_sel == 2'd0) ? x1 : (dm_sel == 2'd1) ? z1 : (dm_sel == 2'd2) ? x2 : z2;
      checks++;
      if (dm_wa != daddr_t'(int'(D_X1) + int'(dm_sel)) || int'(dm_sel) != nxfer) begin
        failures++; $display("FAIL transfer order");
      end
    end
  end

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
    for (int n = 0; n < 6; n++) begin
      automatic nfe_t ca = nrand(), kk = nrand();
      automatic npt_t p, q0, q1;
      automatic int t = 0;
      p.inf = 1'b0; p.x = nrand(); p.y = nrand();
      b = nsqr(p.y) ^ nmul(p.x, p.y) ^ nmul(nsqr(p.x), p.x) ^ nmul(ca, nsqr(p.x));
      x = p.x;
      if (n >= 3) kk = kk >> (40 * n);
      if (n == 5) kk = 1;
      for (int i = 0; i < 163; i++) if (kk[i]) t = i;
      q0 = nsmul(kk, p, ca);
      q1 = nsmul(kk + 1, p, ca);
      @(posedge clk); #1; nxfer = 0; nops = 0;
      k = kk; start = 1; @(posedge clk); #1; start = 0; k = '0;
      while (!done) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      checks += 5;
      if (done) begin failures++; $display("FAIL done longer than one cycle"); end
      if (nxfer != 4) begin failures++; $display("FAIL %0d transfers", nxfer); end
      if (nops != 4 + 8 * t) begin failures++; $display("FAIL %0d ops, t=%0d", nops, t); end
      if (cap[1] == '0 || cap[3] == '0) begin failures++; $display("FAIL zero Z"); end
      if (cap[0] !== nmul(q0.x, cap[1]) || cap[2] !== nmul(q1.x, cap[3])) begin
        failures++; $display("FAIL ladder result (k=%h)", kk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
