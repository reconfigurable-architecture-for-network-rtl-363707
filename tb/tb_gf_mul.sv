// tb_gf_mul: checks the Karatsuba multiplier's unreduced 385-bit product
// against a shift-and-XOR carry-less product, on corner operands (zero, one,
// all ones, single bits at the split boundaries) and random operands.
module tb_gf_mul;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  fe_t  a, b;
  fe2_t p;
  logic clk = 0;

  gf_mul #(.M(193)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(fe_t x, fe_t y);
    fe2_t exp;
    a = x; b = y; #1;
    exp = clmul(x, y);
    checks++;
    if (p !== exp) begin failures++; $display("FAIL mul %h * %h", x, y); end
  endtask

  initial begin
    check('0, '0);
    check(fe_t'(1), '1);
    check('1, '1);
    for (int i = 0; i < RM; i += 8) check(fe_t'(1) << i, '1);
    check(fe_t'(1) << 192, fe_t'(1) << 192);
    check(fe_t'(1) << 96,  fe_t'(1) << 97);
    for (int n = 0; n < 300; n++) check(frand(), frand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
