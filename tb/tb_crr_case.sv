// tb_crr_case -- one configuration of the rounding stage under test.  The
// truncated product fed to it is x * floor(a * 2^F / b), worked out here in
// wide arithmetic; the expected result is x * a/b rounded to Q bits, nearest even,
// computed exactly from a and b (odd a and b).  Half of the inputs are
// multiples of b so that exact midpoints occur.  The case also counts how
// often the stage reported an upper-binade product, a round-up, a tie and a
// rounding carry, and checks the tie report against the exact reference.
module tb_crr_case
  import tb_ref_pkg::*;
  import rational_const_pkg::*;
#(
  parameter int     N        = 24,
  parameter int     Q        = 24,
  parameter longint A        = 7,
  parameter longint B        = 5,
  parameter int     F        = 32,
  parameter int     L        = 0,
  parameter int     WR       = 57,
  parameter bit     HAS_CORR = 1'b1,
  parameter int     CORR_POS = 23,
  parameter int     NTEST    = 3000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_hi,
  output int   n_up,
  output int   n_tie,
  output int   n_carry,
  output logic done
);
  logic [N-1:0]  x;
  logic [WR-1:0] r;
  logic [Q-1:0]  mant;
  logic [1:0]    eo;
  round_info_t   info;
  wide_t         kt, mref;
  int            t;
  bit            tie, up;

  cr_round #(.N(N), .Q(Q), .F(F), .L(L), .WR(WR), .HAS_CORR(HAS_CORR),
             .CORR_POS(CORR_POS)) dut (.r(r), .mant(mant), .eo(eo), .info(info));

  initial begin
    checks = 0; failures = 0; n_hi = 0; n_up = 0; n_tie = 0; n_carry = 0;
    done = 1'b0;
    kt = (wide_t'(A) << F) / wide_t'(B);
    for (int n = 0; n < NTEST; n++) begin
      x = N'({$urandom, $urandom});
      if (n % 2 == 1) x = N'(x / N'(B) * N'(B));
      x[N-1] = 1'b1;
      if (n == 0) x = '1;
      // largest x whose product stays below the binade boundary 2^(N+L)
      if (n == 2) x = N'(((wide_t'(1) << (N + L)) * wide_t'(B) - 1) / wide_t'(A));
      r = WR'(wide_t'(x) * kt);
      @(posedge clk);
      rne(wide_t'(x) * wide_t'(A), wide_t'(B), Q, mref, t, tie, up);
      checks += 3;
      if (wide_t'(mant) != mref || (N - 1 + L + int'(eo) - (Q - 1)) != -t) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d x=%h mant=%h eo=%0d exp mant=%h t=%0d",
                                   A, B, x, mant, eo, mref, t);
      end
      if (info.tie != tie) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d x=%h tie report %b exact %b", A, B, x, info.tie, tie);
      end
      if (info.up != up) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d x=%h up report %b exact %b", A, B, x, info.up, up);
      end
      n_hi    += int'(info.hi);
      n_up    += int'(info.up);
      n_tie   += int'(info.tie);
      n_carry += int'(info.carry);
    end
    done = 1'b1;
  end
endmodule
