// tb_cr_round -- correct rounding of truncated products by 7/5, 1/3, 1/9
// and 3 (24-bit operands, 24-bit results) and of 1/3 and 7/5 to 12 and 8
// bits, against exact round-to-nearest-even.  Each mechanism of the stage
// must occur: products in both binades, round-ups, exact ties (7/5 and 3)
// and rounding carries (only reachable with results shorter than the input).
module tb_cr_round;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  localparam int NC = 6;
  int   c_checks [NC], c_fail [NC], c_hi [NC], c_up [NC], c_tie [NC], c_carry [NC];
  logic c_done [NC];

  tb_crr_case #(.A(7), .B(5), .F(32), .L(0),  .WR(57), .HAS_CORR(1), .CORR_POS(23)) u0 (
    .clk(clk), .checks(c_checks[0]), .failures(c_fail[0]), .n_hi(c_hi[0]), .n_up(c_up[0]),
    .n_tie(c_tie[0]), .n_carry(c_carry[0]), .done(c_done[0]));
  tb_crr_case #(.A(1), .B(3), .F(32), .L(-2), .WR(56), .HAS_CORR(1), .CORR_POS(23)) u1 (
    .clk(clk), .checks(c_checks[1]), .failures(c_fail[1]), .n_hi(c_hi[1]), .n_up(c_up[1]),
    .n_tie(c_tie[1]), .n_carry(c_carry[1]), .done(c_done[1]));
  tb_crr_case #(.A(1), .B(9), .F(30), .L(-4), .WR(54), .HAS_CORR(1), .CORR_POS(21)) u2 (
    .clk(clk), .checks(c_checks[2]), .failures(c_fail[2]), .n_hi(c_hi[2]), .n_up(c_up[2]),
    .n_tie(c_tie[2]), .n_carry(c_carry[2]), .done(c_done[2]));
  tb_crr_case #(.A(3), .B(1), .F(0),  .L(1),  .WR(26), .HAS_CORR(0), .CORR_POS(0)) u3 (
    .clk(clk), .checks(c_checks[3]), .failures(c_fail[3]), .n_hi(c_hi[3]), .n_up(c_up[3]),
    .n_tie(c_tie[3]), .n_carry(c_carry[3]), .done(c_done[3]));

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end else $display("mechanism %s: %0d", what, count);
  endtask

  // shorter results (Q < N): rounding carries into the next binade occur
  tb_crr_case #(.A(1), .B(3), .Q(12), .F(32), .L(-2), .WR(56), .HAS_CORR(1), .CORR_POS(23)) u4 (
    .clk(clk), .checks(c_checks[4]), .failures(c_fail[4]), .n_hi(c_hi[4]), .n_up(c_up[4]),
    .n_tie(c_tie[4]), .n_carry(c_carry[4]), .done(c_done[4]));
  tb_crr_case #(.A(7), .B(5), .Q(8), .F(32), .L(0), .WR(57), .HAS_CORR(1), .CORR_POS(23)) u5 (
    .clk(clk), .checks(c_checks[5]), .failures(c_fail[5]), .n_hi(c_hi[5]), .n_up(c_up[5]),
    .n_tie(c_tie[5]), .n_carry(c_carry[5]), .done(c_done[5]));

  initial begin
    @(posedge clk);  // the cases clear their done flags at time zero
    for (int k = 0; k < NC; k++) wait (c_done[k]);
    for (int k = 0; k < NC; k++) begin
      checks += c_checks[k];
      failures += c_fail[k];
    end
    need("7/5 upper binade", c_hi[0]);
    need("7/5 lower binade", c_checks[0] / 3 - c_hi[0]);
    need("7/5 round up", c_up[0]);
    need("7/5 tie", c_tie[0]);
    need("3 tie", c_tie[3]);
    need("1/9 round up", c_up[2]);
    need("1/3 to 12 bits carry", c_carry[4]);
    need("7/5 to 8 bits carry", c_carry[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
