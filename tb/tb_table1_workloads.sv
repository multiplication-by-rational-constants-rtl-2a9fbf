// tb_table1_workloads -- the nine correctly rounded operators of the
// published comparison: multiplication by 1/3, 1/9 and 7/5 in IEEE single,
// double and quadruple precision (24, 53 and 113-bit significands), each
// through both significand multipliers.  Each case checks the results
// against the exact reference and the shift-and-add tree's constant size
// and adder count: 32/4, 64/5, 128/6 for 1/3; 30/5, 60/6, 120/7 for 1/9;
// 33/5, 65/6, 129/7 for 7/5.
module tb_table1_workloads;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  localparam int NC = 9;
  int   c_checks [NC], c_fail [NC], c_ties [NC];
  logic c_done [NC];

  tb_top_case #(.WE(8),  .WF(23),  .A(1), .B(3), .PC(32),  .ADDERS(4)) u0 (.clk(clk), .checks(c_checks[0]), .failures(c_fail[0]), .ties(c_ties[0]), .done(c_done[0]));
  tb_top_case #(.WE(11), .WF(52),  .A(1), .B(3), .PC(64),  .ADDERS(5)) u1 (.clk(clk), .checks(c_checks[1]), .failures(c_fail[1]), .ties(c_ties[1]), .done(c_done[1]));
  tb_top_case #(.WE(15), .WF(112), .A(1), .B(3), .PC(128), .ADDERS(6)) u2 (.clk(clk), .checks(c_checks[2]), .failures(c_fail[2]), .ties(c_ties[2]), .done(c_done[2]));
  tb_top_case #(.WE(8),  .WF(23),  .A(1), .B(9), .PC(30),  .ADDERS(5)) u3 (.clk(clk), .checks(c_checks[3]), .failures(c_fail[3]), .ties(c_ties[3]), .done(c_done[3]));
  tb_top_case #(.WE(11), .WF(52),  .A(1), .B(9), .PC(60),  .ADDERS(6)) u4 (.clk(clk), .checks(c_checks[4]), .failures(c_fail[4]), .ties(c_ties[4]), .done(c_done[4]));
  tb_top_case #(.WE(15), .WF(112), .A(1), .B(9), .PC(120), .ADDERS(7)) u5 (.clk(clk), .checks(c_checks[5]), .failures(c_fail[5]), .ties(c_ties[5]), .done(c_done[5]));
  tb_top_case #(.WE(8),  .WF(23),  .A(7), .B(5), .PC(33),  .ADDERS(5)) u6 (.clk(clk), .checks(c_checks[6]), .failures(c_fail[6]), .ties(c_ties[6]), .done(c_done[6]));
  tb_top_case #(.WE(11), .WF(52),  .A(7), .B(5), .PC(65),  .ADDERS(6)) u7 (.clk(clk), .checks(c_checks[7]), .failures(c_fail[7]), .ties(c_ties[7]), .done(c_done[7]));
  tb_top_case #(.WE(15), .WF(112), .A(7), .B(5), .PC(129), .ADDERS(7)) u8 (.clk(clk), .checks(c_checks[8]), .failures(c_fail[8]), .ties(c_ties[8]), .done(c_done[8]));

  initial begin
    @(posedge clk);  // the cases clear their done flags at time zero
    for (int k = 0; k < NC; k++) wait (c_done[k]);
    for (int k = 0; k < NC; k++) begin
      checks += c_checks[k];
      failures += c_fail[k];
      $display("case %0d: %0d checks, %0d failures, %0d exact ties", k, c_checks[k], c_fail[k], c_ties[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
