// tb_data_memory_163: fills the 15 writable words with random values and
// checks them on the three read ports and the xk/yk outputs; checks that the
// D_ZERO address reads zero even after a write to it.
module tb_data_memory_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  daddr_t wa = D_X, ra = D_X, rb = D_X, rc = D_X;
  ne_t wd, da, db, dc, xk, yk;
  ne_t model [16];

  data_memory_163 dut (.clk, .rst_n, .we, .wa, .wd, .ra, .rb, .rc, .da, .db, .dc, .xk, .yk);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, ne_t g, ne_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) model[i] = '0;
    for (int n = 0; n < 200; n++) begin
      automatic int w = $urandom_range(0, 15);
      automatic ne_t v = nrand();
      we = 1; wa = daddr_t'(w); wd = v;
      @(posedge clk); #1; we = 0;
      if (w != 15) model[w] = v;
      ra = daddr_t'($urandom_range(0, 15)); rb = daddr_t'($urandom_range(0, 15)); rc = daddr_t'(w);
      #1;
      chk("a", da, model[ra]); chk("b", db, model[rb]); chk("c", dc, model[rc]);
      chk("xk", xk, model[D_XK]); chk("yk", yk, model[D_YK]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
