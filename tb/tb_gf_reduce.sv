// tb_gf_reduce: checks the modulo x^193 + x^15 + 1 array. The expected value
// of c = hi * x^193 + lo is lo + hi * (x^15 + 1), computed with the bit-serial
// field multiplier; inputs cover single top bits (which fold twice), all ones
// and random 385-bit values.
module tb_gf_reduce;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  fe2_t c;
  fe_t  r;
  logic clk = 0;

  gf_reduce #(.M(193), .K(15)) dut (.c(c), .r(r));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(fe2_t x);
    fe_t exp;
    c = x; #1;
    exp = freduce(x);
    checks++;
    if (r !== exp) begin failures++; $display("FAIL reduce %h -> %h exp %h", x, r, exp); end
  endtask

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < 2*RM-1; i += 7) check(fe2_t'(1) << i);
    check(fe2_t'(1) << (2*RM-2));
    for (int n = 0; n < 300; n++) check(fe2_t'({frand(), frand()}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
