// rational_const_mult_top -- floating-point multiplier by a rational
// constant, built twice: once on the periodic shift-and-add tree and once
// on the periodic-table KCM multiplier.
//
// Both operators take the same input and, being correctly rounded, must
// return bit-identical results; the two are kept side by side so that their
// cost can be compared after synthesis and so that each checks the other in
// simulation.  The default configuration is the worked example of the
// design: multiplication by 7/5 in IEEE single precision (24-bit
// significand), where the shift-and-add tree uses five adders and 32
// fraction bits of the constant.
//
// Interface: x (WE+WF+1 bits, IEEE layout) -> y_sa (shift-and-add result),
// y_kcm (KCM result), with the rounding reports info_sa, info_kcm.
// For 7/5 with a 24-bit result the rounding can never carry into the next
// binade (no 24-bit significand times 7/5 comes within half an LSB of a
// power of two), so info_*.carry is constant 0 in the default build.
// Timing: purely combinational.
module rational_const_mult_top
  import rational_const_pkg::*;
#(
  parameter int unsigned     WE    = 8,
  parameter int unsigned     WF    = 23,
  parameter longint unsigned A     = 7,
  parameter longint unsigned B     = 5,
  parameter int unsigned     ALPHA = 4
) (
  input  logic [WE+WF:0] x,
  output logic [WE+WF:0] y_sa,
  output logic [WE+WF:0] y_kcm,
  output round_info_t    info_sa,
  output round_info_t    info_kcm
);

  fp_const_mult_rational #(
    .WE(WE), .WF(WF), .A(A), .B(B), .METHOD(0), .ALPHA(ALPHA)
  ) u_sa (.x(x), .y(y_sa), .info(info_sa));

  fp_const_mult_rational #(
    .WE(WE), .WF(WF), .A(A), .B(B), .METHOD(1), .ALPHA(ALPHA)
  ) u_kcm (.x(x), .y(y_kcm), .info(info_kcm));

endmodule
