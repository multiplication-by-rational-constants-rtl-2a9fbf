// tb_rational_const_pkg -- checks the periodic representation and the
// datapath sizing functions against hand-worked values: the periods and
// patterns of 1/3, 5/9, 7/5, 1/9, 1/5, 10/3 and 3/8, and for the
// correctly rounded multipliers by 1/3, 1/9 and 7/5 at 24, 53 and 113 bits
// the number of constant bits built (header plus fraction) and the adder
// count: 32/4, 64/5, 128/6 for 1/3; 30/5, 60/6, 120/7 for 1/9; 33/5, 65/6,
// 129/7 for 7/5.  It also checks one KCM table word.
module tb_rational_const_pkg;
  import rational_const_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 1000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic rep(longint a, longint b, longint e, longint h, longint p, longint s);
    periodic_rep_t r;
    r = periodic_rep(a, b);
    chk($sformatf("%0d/%0d e", a, b), r.e, e);
    chk($sformatf("%0d/%0d h", a, b), r.h, h);
    chk($sformatf("%0d/%0d p", a, b), r.p, p);
    chk($sformatf("%0d/%0d s", a, b), r.s, s);
  endtask

  task automatic plan(longint a, longint b, int n, int pc, int adders);
    sa_plan_t pl;
    pl = sa_plan(a, b, n, n);
    chk($sformatf("%0d/%0d n=%0d constant bits", a, b, n), pl.f + pl.wh, pc);
    chk($sformatf("%0d/%0d n=%0d adders", a, b, n), pl.adders, adders);
  endtask

  initial begin
    @(posedge clk);
    rep(1, 3, 0, 0, 1, 2);        // 0.(01)
    rep(5, 9, 0, 0, 35, 6);       // 0.(100011)
    rep(7, 5, 0, 1, 6, 4);        // 1.(0110)
    rep(1, 9, 0, 0, 7, 6);        // 0.(000111)
    rep(1, 5, 0, 0, 3, 4);        // 0.(0011)
    rep(10, 3, 1, 1, 2, 2);       // 2 * 1.(10)
    rep(3, 8, -3, 3, 0, 1);       // 3 / 8, finite
    rep(6, 14, 0, 0, 3, 3);       // 3/7 = 0.(011)
    plan(1, 3, 24, 32, 4);
    plan(1, 3, 53, 64, 5);
    plan(1, 3, 113, 128, 6);
    plan(1, 9, 24, 30, 5);
    plan(1, 9, 53, 60, 6);
    plan(1, 9, 113, 120, 7);
    plan(7, 5, 24, 33, 5);
    plan(7, 5, 53, 65, 6);
    plan(7, 5, 113, 129, 7);
    // floor(13 * 7 * 2^40 / 5)
    chk("kcm entry", longint'(kcm_entry(13, 7, 5, 40)), longint'((64'd91 << 40) / 64'd5));
    chk("floor log2 7/5", floor_log2_frac(7, 5), 0);
    chk("floor log2 1/9", floor_log2_frac(1, 9), -4);
    chk("ceil log2 2/5", ceil_log2_frac(2, 5), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
