// tb_top_case -- one configuration of the top (constant and format) under
// random test: both results against the exact reference, and the tree's
// constant size and adder count against the expected ones.
module tb_top_case
  import tb_ref_pkg::*;
  import rational_const_pkg::*;
#(
  parameter int unsigned     WE      = 8,
  parameter int unsigned     WF      = 23,
  parameter longint unsigned A       = 7,
  parameter longint unsigned B       = 5,
  parameter int              PC      = 33,  // constant bits (header + fraction)
  parameter int              ADDERS  = 5,
  parameter int              NTEST   = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   ties,
  output logic done
);
  localparam int W1 = int'(WE + WF) + 1;
  localparam sa_plan_t PL = sa_plan(longint'(A), longint'(B), int'(WF) + 1, int'(WF) + 1);

  logic [W1-1:0] x, y_sa, y_kcm;
  logic [127:0]  yref;
  logic [WF:0]   sig;
  round_info_t   info_sa, info_kcm;

  rational_const_mult_top #(.WE(WE), .WF(WF), .A(A), .B(B)) dut (
    .x(x), .y_sa(y_sa), .y_kcm(y_kcm), .info_sa(info_sa), .info_kcm(info_kcm));

  initial begin
    checks = 0; failures = 0; ties = 0; done = 1'b0;
    checks += 2;
    if (PL.f + PL.wh != PC || PL.adders != ADDERS) begin
      failures++;
      $display("FAIL %0d/%0d WF=%0d: %0d constant bits, %0d adders", A, B, WF,
               PL.f + PL.wh, PL.adders);
    end
    for (int n = 0; n < NTEST; n++) begin
      x   = W1'({$urandom, $urandom, $urandom, $urandom});
      sig = (WF + 1)'({$urandom, $urandom, $urandom, $urandom});
      if (n % 2 == 1) sig = sig / (WF + 1)'(2 * B) * (WF + 1)'(2 * B) + (WF + 1)'(B);
      x[WF-1:0] = sig[WF-1:0];
      // keep the exponent away from the ends of the range
      x[WF +: WE] = {2'b01, (WE - 2)'($urandom)};
      @(posedge clk);
      yref = fp_ref(128'(x), int'(WE), int'(WF), longint'(A), longint'(B));
      checks += 2;
      if (128'(y_sa) != yref) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d WF=%0d x=%h y_sa=%h", A, B, WF, x, y_sa);
      end
      if (128'(y_kcm) != yref) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d WF=%0d x=%h y_kcm=%h", A, B, WF, x, y_kcm);
      end
      ties += int'(info_sa.tie);
    end
    done = 1'b1;
  end
endmodule
