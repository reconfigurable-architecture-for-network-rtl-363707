// tb_gf_sqr_n: checks the single-cycle squarers for the powers 2^1, 2^6 and
// 2^15 against repeated bit-serial field multiplication a*a, on random
// operands and on single bits near the top of the field.
module tb_gf_sqr_n;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  fe_t a, r1, r6, r15;
  logic clk = 0;

  gf_sqr_n #(.M(193), .K(15), .N(1))  dut1  (.a(a), .r(r1));
  gf_sqr_n #(.M(193), .K(15), .N(6))  dut6  (.a(a), .r(r6));
  gf_sqr_n #(.M(193), .K(15), .N(15)) dut15 (.a(a), .r(r15));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(fe_t x);
    a = x; #1;
    checks += 3;
    if (r1  !== fsqrn(x, 1))  begin failures++; $display("FAIL sq1 %h", x); end
    if (r6  !== fsqrn(x, 6))  begin failures++; $display("FAIL sq6 %h", x); end
    if (r15 !== fsqrn(x, 15)) begin failures++; $display("FAIL sq15 %h", x); end
  endtask

  initial begin
    check('0);
    check(fe_t'(1));
    check('1);
    for (int i = 90; i < RM; i += 11) check(fe_t'(1) << i);
    for (int n = 0; n < 100; n++) check(frand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
