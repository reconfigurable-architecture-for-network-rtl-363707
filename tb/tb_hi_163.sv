// tb_hi_163: drives the host side and a stand-in for the processor side. It
// checks that x and then y are written to data memory in the two cycles after
// start, that control-1 is started with the second write and sees k, x and b,
// that a start while busy is ignored, and that on control-2's done the result
// words are copied and end_o pulses once, two cycles later.
module tb_hi_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, end_o, dm_we, c1_start, c2_done = 0;
  ne_t k_in, x_in, y_in, b_in, xk, yk, k, x, b, dm_wd, dm_xk, dm_yk;
  daddr_t dm_wa;

  hi_163 dut (.clk, .rst_n, .start, .k_in, .x_in, .y_in, .b_in, .busy, .end_o, .xk, .yk,
              .k, .x, .b, .dm_we, .dm_wa, .dm_wd, .c1_start, .c2_done, .dm_xk, .dm_yk);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      automatic ne_t kk = nrand(), xx = nrand(), yy = nrand(), bb = nrand();
      automatic ne_t rx = nrand(), ry = nrand();
      k_in = kk; x_in = xx; y_in = yy; b_in = bb;
      @(posedge clk); #1; start = 1; @(posedge clk); #1; start = 0;
      chk("write x", dm_we && dm_wa == D_X && dm_wd == xx && !c1_start);
      k_in = '0;
      @(posedge clk); #1;
      chk("write y + start control-1", dm_we && dm_wa == D_Y && dm_wd == yy && c1_start);
      chk("k x b held", k == kk && x == xx && b == bb);
      @(posedge clk); #1;
      chk("idle bus", !dm_we && !c1_start && busy);
      start = 1; @(posedge clk); #1; start = 0;
      chk("start ignored while busy", k == kk && !dm_we);
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1; dm_xk = rx; dm_yk = ry; c2_done = 1; @(posedge clk); #1; c2_done = 0;
      chk("no early end", !end_o);
      @(posedge clk); #1;
      chk("end pulse and result", end_o && xk == rx && yk == ry);
      @(posedge clk); #1;
      chk("end is one cycle", !end_o && !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
