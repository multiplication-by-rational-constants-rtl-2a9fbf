// tb_kcm_case -- one configuration of the KCM multiplier under random test
// (odd a and b).  Two checks per input: the sum equals the sum over the
// chunks X_i of floor(X_i * a * 2^(ALPHA*(NCH-1-i) + F) / b), worked out
// here in wide arithmetic; and it lies below the exact x * a/b * 2^F by less
// than NCH units of its LSB.
module tb_kcm_case
  import tb_ref_pkg::*;
  import rational_const_pkg::*;
#(
  parameter int unsigned     N     = 24,
  parameter longint unsigned A     = 7,
  parameter longint unsigned B     = 5,
  parameter int unsigned     ALPHA = 4,
  parameter bit              TREE  = 1'b0,
  parameter int              NTEST = 500
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NCH = (int'(N) + int'(ALPHA) - 1) / int'(ALPHA);
  localparam int F   = kcm_frac_bits(longint'(A), longint'(B), int'(N), int'(N), NCH);
  localparam int WR  = int'(N) + floor_log2_frac(longint'(A), longint'(B)) + 1 + F;

  logic [N-1:0]  x;
  logic [WR-1:0] r;
  wide_t         expv, chunk, diff;

  kcm_rational_mult #(.N(N), .Q(N), .A(A), .B(B), .ALPHA(ALPHA), .TREE(TREE)) dut (.x(x), .r(r));

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int n = 0; n < NTEST; n++) begin
      x = N'({$urandom, $urandom, $urandom, $urandom});
      if (n == 0) x = '1;
      @(posedge clk);
      expv = '0;
      for (int i = 0; i < NCH; i++) begin
        chunk = (wide_t'(x) >> (int'(ALPHA) * (NCH - 1 - i))) & ((wide_t'(1) << ALPHA) - 1);
        expv += ((chunk * wide_t'(A)) << (int'(ALPHA) * (NCH - 1 - i) + F)) / wide_t'(B);
      end
      checks += 2;
      if (wide_t'(r) != expv) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d N=%0d x=%h r=%h exp=%h", A, B, N, x, r, expv);
      end
      diff = ((wide_t'(x) * wide_t'(A)) << F) - wide_t'(r) * wide_t'(B);
      if (diff[W-1] || diff >= wide_t'(NCH) * wide_t'(B)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d/%0d N=%0d x=%h error bound", A, B, N, x);
      end
    end
    done = 1'b1;
  end
endmodule
