// tb_regfile_163: writes random values into the seven registers and checks
// them on the three read ports and on the parallel X1/Z1/X2/Z2 outputs,
// including a write and a read of the same entry in one cycle (the read sees
// the old value) and reset to zero.
module tb_regfile_163;
  import ecc163_pkg::*;
  import gnb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] ra = 0, rb = 0, rc = 0, wa = 0;
  ne_t da, db, dc, wd, x1, z1, x2, z2;
  ne_t model [7];

  regfile_163 dut (.clk, .rst_n, .ra, .rb, .rc, .da, .db, .dc, .we, .wa, .wd, .x1, .z1, .x2, .z2);

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
    #1; chk("reset", da, '0);
    rst_n = 1;
    for (int i = 0; i < 7; i++) model[i] = '0;
    for (int n = 0; n < 300; n++) begin
      automatic int w = $urandom_range(0, 6);
      automatic ne_t v = nrand();
      we = 1; wa = 3'(w); wd = v;
      ra = 3'(w); rb = 3'($urandom_range(0, 6)); rc = 3'($urandom_range(0, 6));
      #1;
      chk("read before write", da, model[w]);
      @(posedge clk); #1;
      model[w] = v; we = 0;
      chk("port a", da, model[ra]);
      chk("port b", db, model[rb]);
      chk("port c", dc, model[rc]);
      chk("x1", x1, model[0]); chk("z1", z1, model[1]);
      chk("x2", x2, model[2]); chk("z2", z2, model[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
