// tb_psam_case -- one configuration of the periodic shift-and-add
// multiplier under random test.  The expected product is
// x * floor(a * 2^F / b), the constant truncated to F fraction bits, worked
// out in wide integer arithmetic; F is given by the instantiating testbench
// from the published table of constant sizes.  Only constants with odd a
// and b are used (no power-of-two factor).
module tb_psam_case
  import tb_ref_pkg::*;
#(
  parameter int unsigned     N     = 24,
  parameter longint unsigned A     = 7,
  parameter longint unsigned B     = 5,
  parameter int              F_EXP = 32,
  parameter int              WH    = 1,
  parameter int              NTEST = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int WR = int'(N) + WH + F_EXP;

  logic [N-1:0]  x;
  logic [WR-1:0] r;
  wide_t         kt, expv;

  periodic_shift_add_mult #(.N(N), .Q(N), .A(A), .B(B)) dut (.x(x), .r(r));

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    x = '0;
    kt = (wide_t'(A) << F_EXP) / wide_t'(B);
    for (int n = 0; n < NTEST; n++) begin
      x = N'({$urandom, $urandom, $urandom, $urandom});
      if (n == 0) x = '1;
      if (n == 1) x = {1'b1, {(N-1){1'b0}}};
      @(posedge clk);
      expv = wide_t'(x) * kt;
      checks++;
      if (wide_t'(r) != expv) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d N=%0d x=%h r=%h exp=%h", A, B, N, x, r, expv);
      end
    end
    done = 1'b1;
  end
endmodule
