// tb_fp_case -- one floating-point multiplier configuration under random
// test against the exact reference tb_ref_pkg::fp_ref.  Inputs are random
// bit patterns with the exponent field drawn so that zeros, subnormals,
// infinities, NaNs, overflow and underflow all occur; every other input is
// a multiple of b in its significand so that exact ties appear.
module tb_fp_case
  import tb_ref_pkg::*;
  import rational_const_pkg::*;
#(
  parameter int unsigned     WE     = 8,
  parameter int unsigned     WF     = 23,
  parameter longint unsigned A      = 7,
  parameter longint unsigned B      = 5,
  parameter int unsigned     METHOD = 0,
  parameter int              NTEST  = 2000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int W1 = int'(WE + WF) + 1;
  logic [W1-1:0]  x, y;
  logic [127:0]   yref;
  logic [WF:0]    sig;
  logic [WE-1:0]  ex;
  round_info_t    info;
  int             sel;

  fp_const_mult_rational #(.WE(WE), .WF(WF), .A(A), .B(B), .METHOD(METHOD)) dut (
    .x(x), .y(y), .info(info));

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int n = 0; n < NTEST; n++) begin
      x   = W1'({$urandom, $urandom, $urandom, $urandom});
      sig = (WF + 1)'({$urandom, $urandom});
      if (n % 2 == 1) begin
        sig = sig / (WF + 1)'(B) * (WF + 1)'(B);
        x[WF-1:0] = sig[WF-1:0];
      end
      sel = int'($urandom % 16);
      case (sel)
        0: ex = '0;                          // zero or subnormal
        1: ex = '1;                          // infinity or NaN
        2: ex = '1 - WE'($urandom % 4);      // near overflow
        3: ex = WE'(1 + $urandom % 5);       // near underflow
        default: ex = WE'($urandom);
      endcase
      x[WF +: WE] = ex;
      if (n == 1) x[WF-1:0] = '0;            // exact infinity / power of two
      @(posedge clk);
      yref = fp_ref(128'(x), int'(WE), int'(WF), longint'(A), longint'(B));
      checks++;
      if (128'(y) != yref) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d WF=%0d method %0d x=%h y=%h exp=%h",
                                   A, B, WF, METHOD, x, y, W1'(yref));
      end
    end
    done = 1'b1;
  end
endmodule
