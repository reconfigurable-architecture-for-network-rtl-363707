// tb_gf_add: checks the field adder bit by bit against GF(2) addition
// (a bit of the sum is 1 exactly when one of the two input bits is 1), and
// checks a + a = 0 and a + 0 = a, on random and corner operands.
module tb_gf_add;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  fe_t a, b, s;
  logic clk = 0;

  gf_add #(.M(193)) dut (.a(a), .b(b), .s(s));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(fe_t x, fe_t y);
    fe_t exp;
    a = x; b = y; #1;
    for (int i = 0; i < RM; i++) exp[i] = (x[i] != y[i]);
    checks++;
    if (s !== exp) begin failures++; $display("FAIL add %h %h -> %h", x, y, s); end
  endtask

  initial begin
    check('0, '0);
    check('1, '0);
    check('1, '1);
    for (int n = 0; n < 200; n++) begin
      automatic fe_t x = frand(), y = frand();
      check(x, y);
      check(x, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
