// tb_kcm_rational_mult -- checks the table-based multiplier for 7/5 at 24
// bits (default), 1/3 at 24 bits, 1/9 at 53 bits and 7/5 at 53 bits with
// 5-bit tables, the adder-tree variant for 7/5 at 24 bits and 1/3 at 113
// bits, and the chunk count of the default (six tables for a 24-bit
// input with 4-bit chunks).
module tb_kcm_rational_mult;
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

  localparam int NC = 6;
  int   c_checks [NC], c_fail [NC];
  logic c_done [NC];

  tb_kcm_case #(.N(24), .A(7), .B(5), .ALPHA(4)) u0 (.clk(clk), .checks(c_checks[0]), .failures(c_fail[0]), .done(c_done[0]));
  tb_kcm_case #(.N(24), .A(1), .B(3), .ALPHA(4)) u1 (.clk(clk), .checks(c_checks[1]), .failures(c_fail[1]), .done(c_done[1]));
  tb_kcm_case #(.N(53), .A(1), .B(9), .ALPHA(4)) u2 (.clk(clk), .checks(c_checks[2]), .failures(c_fail[2]), .done(c_done[2]));
  tb_kcm_case #(.N(53), .A(7), .B(5), .ALPHA(5)) u3 (.clk(clk), .checks(c_checks[3]), .failures(c_fail[3]), .done(c_done[3]));

  // balanced adder tree instead of the chain
  tb_kcm_case #(.N(24), .A(7), .B(5), .ALPHA(4), .TREE(1)) u4 (.clk(clk), .checks(c_checks[4]), .failures(c_fail[4]), .done(c_done[4]));
  tb_kcm_case #(.N(113), .A(1), .B(3), .ALPHA(4), .TREE(1)) u5 (.clk(clk), .checks(c_checks[5]), .failures(c_fail[5]), .done(c_done[5]));

  initial begin
    checks++;
    if (u0.NCH != 6) begin
      failures++;
      $display("FAIL chunk count %0d", u0.NCH);
    end
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
