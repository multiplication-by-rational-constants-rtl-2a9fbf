// fp_const_mult_rational -- floating-point multiplication by a rational
// constant a/b, correctly rounded (round to nearest, ties to even).
//
// The constant is split into 2^E * K with K = c/d, c and d odd.  The
// significand 1.f of the input, taken as the N-bit integer x = {1, f}, is
// multiplied by K with one of two significand multipliers:
//   METHOD = 0  periodic shift-and-add tree (periodic_shift_add_mult)
//   METHOD = 1  table-based KCM multiplier   (kcm_rational_mult)
// cr_round then rounds the product to Q = N bits and tells in which of the
// possible binades it landed; the result exponent is the input exponent
// plus E, floor(log2 K) and that binade offset.
//
// Format: IEEE 754 binary interchange layout with WE exponent and WF
// fraction bits (defaults: binary32).  The constant is positive, so the sign
// passes through.  Infinities give infinities, NaNs give the canonical quiet
// NaN with the input sign, zeros give zeros.  Subnormal inputs are treated
// as zero and results below the normal range are flushed to zero; results
// above it become infinity.  The floating-point format and the handling of
// special values are this implementation's choices; the significand path is
// the one of the rational constant multiplier.
//
// Interface: x, y are WE+WF+1 bits; info reports what the rounding did.
// info.carry stays 0 for constants whose products never round up to a
// power of two, as 7/5 in binary32 (the default).
// Timing: purely combinational.
module fp_const_mult_rational
  import rational_const_pkg::*;
#(
  parameter int unsigned     WE     = 8,
  parameter int unsigned     WF     = 23,
  parameter longint unsigned A      = 7,
  parameter longint unsigned B      = 5,
  parameter int unsigned     METHOD = 0,   // 0: shift-and-add, 1: KCM
  parameter int unsigned     ALPHA  = 4    // KCM table address bits
) (
  input  logic [WE+WF:0] x,
  output logic [WE+WF:0] y,
  output round_info_t    info
);

  localparam int unsigned   N   = WF + 1;
  localparam periodic_rep_t REP = periodic_rep(longint'(A), longint'(B));
  localparam int            L_K = floor_log2_frac(REP.c, REP.d);
  localparam int            E_K = int'(REP.e);
  localparam int            WEI = int'(WE) + 4;           // signed exponent arithmetic
  localparam logic [WE-1:0] EMAX = '1;

  logic          sgn;
  logic [WE-1:0] ex;
  logic [WF-1:0] fr;
  logic [N-1:0]  sig;
  logic [WF:0]   mant;
  logic [1:0]    eo;

  assign sgn = x[WE+WF];
  assign ex  = x[WF +: WE];
  assign fr  = x[WF-1:0];
  assign sig = {1'b1, fr};

  if (METHOD == 0) begin : g_sa
    localparam sa_plan_t PL = sa_plan(longint'(A), longint'(B), int'(N), int'(N));
    localparam int       WR = int'(N) + PL.wh + PL.f;
    logic [WR-1:0] r;
    periodic_shift_add_mult #(.N(N), .Q(N), .A(A), .B(B)) u_mult (.x(sig), .r(r));
    cr_round #(
      .N(int'(N)), .Q(int'(N)), .F(PL.f), .L(L_K), .WR(WR),
      .HAS_CORR(REP.d != 1), .CORR_POS(int'(N) + PL.g)
    ) u_round (.r(r), .mant(mant), .eo(eo), .info(info));
  end else begin : g_kcm
    localparam int NCH = (int'(N) + int'(ALPHA) - 1) / int'(ALPHA);
    localparam int F   = kcm_frac_bits(longint'(A), longint'(B), int'(N), int'(N), NCH);
    localparam int WR  = int'(N) + L_K + 1 + F;
    logic [WR-1:0] r;
    kcm_rational_mult #(.N(N), .Q(N), .A(A), .B(B), .ALPHA(ALPHA)) u_mult (.x(sig), .r(r));
    cr_round #(
      .N(int'(N)), .Q(int'(N)), .F(F), .L(L_K), .WR(WR),
      .HAS_CORR(REP.d != 1), .CORR_POS(clog2l(longint'(NCH)) + 1)
    ) u_round (.r(r), .mant(mant), .eo(eo), .info(info));
  end

  logic signed [WEI-1:0] eres;

  always_comb begin
    eres = WEI'(signed'({1'b0, ex})) + WEI'(E_K + L_K) + WEI'(signed'({1'b0, eo}));
    if (ex == EMAX) begin
      // infinity stays infinity, NaN becomes the quiet NaN
      y = (fr == '0) ? {sgn, EMAX, {WF{1'b0}}} : {sgn, EMAX, 1'b1, {(WF-1){1'b0}}};
    end else if (ex == '0) begin
      y = {sgn, {(WE+WF){1'b0}}};
    end else if (eres >= WEI'(signed'({1'b0, EMAX}))) begin
      y = {sgn, EMAX, {WF{1'b0}}};
    end else if (eres <= 0) begin
      y = {sgn, {(WE+WF){1'b0}}};
    end else begin
      y = {sgn, eres[WE-1:0], mant[WF-1:0]};
    end
  end

endmodule
