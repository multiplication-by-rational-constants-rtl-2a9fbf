// tb_periodic_shift_add_mult -- checks the periodic shift-and-add tree.
//  * Default configuration (7/5, 24-bit input): the product equals x times
//    the 32-bit constant 1011 0011 0011 ... 0011 shifted left by one (the
//    trimmed trailing zero), the intermediate stages have the constants
//    110011, 11001100110011 and 1100...110011 (30 bits), and the tree uses
//    five adders.
//  * 1/3, 1/9 and 7/5 at 24, 53 and 113 bits: the product equals x times
//    the constant truncated to the published number of bits.
module tb_periodic_shift_add_mult;
  import tb_ref_pkg::*;

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

  // ---- default configuration, against the worked 7/5 example ----
  logic [23:0] x;
  logic [56:0] r;
  periodic_shift_add_mult dut (.x(x), .r(r));

  localparam logic [31:0] K75  = 32'b10110011001100110011001100110011;
  localparam logic [5:0]  K1   = 6'b110011;
  localparam logic [13:0] K2   = 14'b11001100110011;
  localparam logic [29:0] K3   = 30'b110011001100110011001100110011;

  task automatic chk(string what, wide_t got, wide_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h: got %h expected %h", what, x, got, exp);
    end
  endtask

  // ---- published configurations ----
  localparam int NC = 9;
  int   c_checks [NC];
  int   c_fail   [NC];
  logic c_done   [NC];

  tb_psam_case #(.N(24),  .A(1), .B(3), .F_EXP(32),  .WH(0)) u0 (.clk(clk), .checks(c_checks[0]), .failures(c_fail[0]), .done(c_done[0]));
  tb_psam_case #(.N(53),  .A(1), .B(3), .F_EXP(64),  .WH(0)) u1 (.clk(clk), .checks(c_checks[1]), .failures(c_fail[1]), .done(c_done[1]));
  tb_psam_case #(.N(113), .A(1), .B(3), .F_EXP(128), .WH(0)) u2 (.clk(clk), .checks(c_checks[2]), .failures(c_fail[2]), .done(c_done[2]));
  tb_psam_case #(.N(24),  .A(1), .B(9), .F_EXP(30),  .WH(0)) u3 (.clk(clk), .checks(c_checks[3]), .failures(c_fail[3]), .done(c_done[3]));
  tb_psam_case #(.N(53),  .A(1), .B(9), .F_EXP(60),  .WH(0)) u4 (.clk(clk), .checks(c_checks[4]), .failures(c_fail[4]), .done(c_done[4]));
  tb_psam_case #(.N(113), .A(1), .B(9), .F_EXP(120), .WH(0)) u5 (.clk(clk), .checks(c_checks[5]), .failures(c_fail[5]), .done(c_done[5]));
  tb_psam_case #(.N(24),  .A(7), .B(5), .F_EXP(32),  .WH(1)) u6 (.clk(clk), .checks(c_checks[6]), .failures(c_fail[6]), .done(c_done[6]));
  tb_psam_case #(.N(53),  .A(7), .B(5), .F_EXP(64),  .WH(1)) u7 (.clk(clk), .checks(c_checks[7]), .failures(c_fail[7]), .done(c_done[7]));
  tb_psam_case #(.N(113), .A(7), .B(5), .F_EXP(128), .WH(1)) u8 (.clk(clk), .checks(c_checks[8]), .failures(c_fail[8]), .done(c_done[8]));

  initial begin
    x = '0;
    checks++;
    if (dut.NUM_ADDERS != 5) begin
      failures++;
      $display("FAIL adder count %0d", dut.NUM_ADDERS);
    end
    for (int n = 0; n < 2000; n++) begin
      x = (n == 0) ? 24'hFFFFFF : (n == 1) ? 24'h800000 : 24'($urandom);
      @(posedge clk);
      chk("r", wide_t'(r), (wide_t'(x) * wide_t'(K75)) << 1);
      chk("pi_1", wide_t'(dut.g_periodic.pi[1]), wide_t'(x) * wide_t'(K1));
      chk("pi_2", wide_t'(dut.g_periodic.pi[2]), wide_t'(x) * wide_t'(K2));
      chk("pi_3", wide_t'(dut.g_periodic.fsum), wide_t'(x) * wide_t'(K3));
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
