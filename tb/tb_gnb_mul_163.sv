// tb_gnb_mul_163: checks the GF(2^163) normal-basis multiplier through field
// identities whose expected values do not come from the multiplier:
//   a * 1 = a             (1 is the all-ones vector in a normal basis)
//   a * a = a rotated by one position   (squaring is a cyclic shift)
//   a * 0 = 0
// and through consistency: commutativity, associativity, distributivity, and
// a * a^-1 = 1 with a^-1 = a^(2^163 - 2) built from 162 products whose
// squarings are rotations. It also checks the latency of L = 3 cycles.
module tb_gnb_mul_163;
  localparam int M = 163;
  typedef logic [M-1:0] ne_t;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  ne_t  a, b, c;

  gnb_mul_163 dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ne_t nrand();
    ne_t r = '0;
    for (int i = 0; i < 6; i++) r = (r << 32) | ne_t'($urandom);
    return r;
  endfunction

  function automatic ne_t rot1(ne_t x);     // x^2: bit i takes bit i-1
    return {x[M-2:0], x[M-1]};
  endfunction

  task automatic mul(ne_t x, ne_t y, output ne_t r);
    int cyc = 0;
    a = x; b = y;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    r = c;
    checks++;
    if (cyc != 3) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  task automatic chk(string what, ne_t got, ne_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    ne_t x, y, z, r1, r2, r3, s, acc;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 15; n++) begin
      x = nrand(); y = nrand(); z = nrand();
      mul(x, '1, r1);  chk("a*1", r1, x);
      mul(x, x, r1);   chk("a*a", r1, rot1(x));
      mul(x, '0, r1);  chk("a*0", r1, '0);
      mul(x, y, r1); mul(y, x, r2); chk("commute", r1, r2);
      mul(r1, z, r2); mul(y, z, r3); mul(x, r3, r3); chk("assoc", r2, r3);
      mul(y ^ z, x, r2); mul(z, x, r3); chk("distrib", r2, r1 ^ r3);
    end
    // a^(2^M - 2) = product of a^(2^i), i = 1..M-1; then a * a^-1 = 1
    x = nrand();
    s = x; acc = '1;
    for (int i = 1; i < M; i++) begin
      s = rot1(s);
      mul(acc, s, acc);
    end
    mul(x, acc, r1);
    chk("a*a^-1", r1, '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
