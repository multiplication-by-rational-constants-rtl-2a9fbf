// tb_const_int_mult -- random check of the shift-and-add integer constant
// multiplier for the constants 3, 7, 11, 1 and 45 against x * C.
module tb_const_int_mult;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  logic [23:0] x;
  logic [25:0] y3;
  logic [26:0] y7;
  logic [27:0] y11;
  logic [24:0] y1;
  logic [29:0] y45;

  const_int_mult #(.N(24), .C(3))  u3  (.x(x), .y(y3));
  const_int_mult #(.N(24), .C(7))  u7  (.x(x), .y(y7));
  const_int_mult #(.N(24), .C(11)) u11 (.x(x), .y(y11));
  const_int_mult #(.N(24), .C(1))  u1  (.x(x), .y(y1));
  const_int_mult #(.N(24), .C(45)) u45 (.x(x), .y(y45));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d: got %0d expected %0d", what, x, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      x = (n == 0) ? 24'hFFFFFF : (n == 1) ? 24'd0 : 24'($urandom);
      @(posedge clk);
      chk("x*3", longint'(y3), longint'(x) * 3);
      chk("x*7", longint'(y7), longint'(x) * 7);
      chk("x*11", longint'(y11), longint'(x) * 11);
      chk("x*1", longint'(y1), longint'(x));
      chk("x*45", longint'(y45), longint'(x) * 45);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
