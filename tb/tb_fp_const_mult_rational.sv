// tb_fp_const_mult_rational -- floating-point multiplication by rational
// constants against an exact reference: 7/5 in single precision with both
// significand multipliers, 1/3 and 1/9 in double precision, 10/3 and 1/10
// (constants with a power-of-two factor) and 3/8 (finite constant) in
// single precision.
module tb_fp_const_mult_rational;
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

  localparam int NC = 8;
  int   c_checks [NC], c_fail [NC];
  logic c_done [NC];

  tb_fp_case #(.WE(8),  .WF(23), .A(7),  .B(5),  .METHOD(0)) u0 (.clk(clk), .checks(c_checks[0]), .failures(c_fail[0]), .done(c_done[0]));
  tb_fp_case #(.WE(8),  .WF(23), .A(7),  .B(5),  .METHOD(1)) u1 (.clk(clk), .checks(c_checks[1]), .failures(c_fail[1]), .done(c_done[1]));
  tb_fp_case #(.WE(11), .WF(52), .A(1),  .B(3),  .METHOD(0)) u2 (.clk(clk), .checks(c_checks[2]), .failures(c_fail[2]), .done(c_done[2]));
  tb_fp_case #(.WE(11), .WF(52), .A(1),  .B(9),  .METHOD(1)) u3 (.clk(clk), .checks(c_checks[3]), .failures(c_fail[3]), .done(c_done[3]));
  tb_fp_case #(.WE(8),  .WF(23), .A(10), .B(3),  .METHOD(0)) u4 (.clk(clk), .checks(c_checks[4]), .failures(c_fail[4]), .done(c_done[4]));
  tb_fp_case #(.WE(8),  .WF(23), .A(1),  .B(10), .METHOD(1)) u5 (.clk(clk), .checks(c_checks[5]), .failures(c_fail[5]), .done(c_done[5]));
  tb_fp_case #(.WE(8),  .WF(23), .A(3),  .B(8),  .METHOD(0)) u6 (.clk(clk), .checks(c_checks[6]), .failures(c_fail[6]), .done(c_done[6]));
  tb_fp_case #(.WE(8),  .WF(23), .A(1),  .B(9),  .METHOD(0)) u7 (.clk(clk), .checks(c_checks[7]), .failures(c_fail[7]), .done(c_done[7]));

  initial begin
    @(posedge clk);  // the cases clear their done flags at time zero
    for (int k = 0; k < NC; k++) wait (c_done[k]);
    for (int k = 0; k < NC; k++) begin
      checks += c_checks[k];
      failures += c_fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
