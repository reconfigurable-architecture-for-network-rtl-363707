// tb_au1_163: random AU-1 operations, MUL and ADD with every operand rotation
// 0..2, checked against the normal-basis reference (a rotation by r is r
// squarings); MUL results must arrive in 5 cycles after start, ADD in 1.
module tb_au1_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, mul = 0, busy, done;
  ne_t a, b, c, y;
  logic [1:0] ra, rb, rc;

  au1_163 dut (.clk, .rst_n, .start, .mul, .a, .b, .c, .ra, .rb, .rc, .busy, .done, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gnb_init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int cyc = 0;
      automatic ne_t e;
      a = nrand(); b = nrand(); c = nrand();
      ra = 2'($urandom_range(0, 2)); rb = 2'($urandom_range(0, 2)); rc = 2'($urandom_range(0, 2));
      mul = (n % 3 != 0);
      e = mul ? nmul(nsqrn(a, ra), nsqrn(b, rb)) ^ nsqrn(c, rc) : nsqrn(a, ra) ^ nsqrn(c, rc);
      start = 1; @(posedge clk); #1; start = 0;
      a = '0; b = '0; c = '0; cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks += 2;
      if (y !== e) begin failures++; $display("FAIL %s %h exp %h", mul ? "mul" : "add", y, e); end
      if (cyc != (mul ? 5 : 1)) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
