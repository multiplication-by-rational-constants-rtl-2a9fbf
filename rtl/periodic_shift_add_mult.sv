// periodic_shift_add_mult -- multiplication of an unsigned integer x by a
// rational constant a/b, using the periodicity of the binary expansion of
// the constant.
//
// The constant is written 2^E * (h + c/d) (see rational_const_pkg).  The
// power of two E is left to the caller (it is only an exponent shift).  The
// fractional part c/d = 0.(p)(p)(p)... repeats an s-bit pattern p, so a
// truncation of c/d to 2^k periods is obtained by doubling:
//
//   pi_0     = x * p
//   pi_(k+1) = (pi_k << 2^k s) + pi_k         (2^(k+1) periods, one adder)
//
// and 2^k repetitions cost only k additions.  The tree stops at the stage i
// with 2^i s < w <= 2^(i+1) s, w being the number of fraction bits the
// rounding needs.  The last adder joins pi_i and the smallest earlier stage
// pi_j that still reaches w bits: f = (pi_i << 2^j s) + pi_j, which holds
// F = (2^i + 2^j) s fraction bits.  The integer part h*x comes from a small
// constant multiplier and is added with a weight of 2^F; when j < i it is
// added to pi_j before the last adder (shallower tree), otherwise it is added
// last.  Leading and trailing zeros of p are not carried in the datapath:
// pi_0 is x times p with its trailing zeros removed, and those zeros are
// appended to the result as constant low bits.
//
// Result: r = x * (h * 2^F + floor(2^F * c/d)), i.e. x times the constant
// h + c/d truncated to F fraction bits, as an integer with F fraction bits.
// It lies below the exact x*(h + c/d) by less than 2^(N+g) units of its LSB,
// g = ceil(log2(cf/d)) <= 0.
//
// The doubling recurrence, the choice of i and j, the parenthesing rule and
// the zero trimming follow the periodic shift-and-add method; the constant
// multiplier used for p and h (plain binary) and the exact widths are this
// implementation's choices.  Defaults: 7/5 with a 24-bit input and a 24-bit
// rounded result (IEEE single precision), which gives F = 32 and five adders.
//
// Interface: x (N bits, unsigned) -> r (WR bits, unsigned, F fraction bits).
// Timing: purely combinational.
module periodic_shift_add_mult
  import rational_const_pkg::*;
#(
  parameter int unsigned     N = 24,   // input bits
  parameter int unsigned     Q = 24,   // bits of the rounded result downstream
  parameter longint unsigned A = 7,    // numerator of the constant
  parameter longint unsigned B = 5,    // denominator of the constant
  localparam periodic_rep_t  REP = periodic_rep(longint'(A), longint'(B)),
  localparam sa_plan_t       PL  = sa_plan(longint'(A), longint'(B), int'(N), int'(Q)),
  localparam int             F   = PL.f,            // fraction bits of r
  localparam int             WR  = int'(N) + PL.wh + F
) (
  input  logic [N-1:0]  x,
  output logic [WR-1:0] r
);

  localparam int      S       = int'(REP.s);
  localparam longint  H       = REP.h;
  localparam int      WH      = PL.wh;
  localparam int      PTZ     = PL.ptz;
  localparam int      LP      = PL.lp;
  localparam longint  PODD    = REP.p >>> PTZ;
  localparam int      I       = PL.i;
  localparam int      J       = PL.j;
  localparam bit      DIRECT  = PL.direct != 0;
  localparam bit      HAS_P   = REP.d != 1;
  // adder count of the tree, read by testbenches and reports
  localparam int      NUM_ADDERS = PL.adders;

  // width of the trimmed result before the trailing zeros are appended
  localparam int WT = WR - PTZ;

  logic [WT-1:0] rt;

  if (HAS_P) begin : g_periodic
    // pi_k needs N + LP + (2^k - 1) s bits; all stages use the widest width
    // and leave their unused top bits at zero.
    localparam int WPI = int'(N) + LP + ((1 << I) - 1) * S;
    localparam int WFS = int'(N) + LP + F - S;   // width of f

    logic [N+LP-1:0] px;
    logic [WPI-1:0]  pi [I+1];
    logic [WFS-1:0]  fsum;

    const_int_mult #(.N(N), .C(PODD)) u_px (.x(x), .y(px));

    assign pi[0] = WPI'(px);
    for (genvar k = 1; k <= I; k++) begin : g_stage
      assign pi[k] = (pi[k-1] << ((1 << (k - 1)) * S)) + pi[k-1];
    end

    if (H == 0) begin : g_noheader
      if (DIRECT) begin : g_direct
        assign fsum = WFS'(pi[0]);
      end else begin : g_last
        assign fsum = (WFS'(pi[I]) << ((1 << J) * S)) + WFS'(pi[J]);
      end
      assign rt = WT'(fsum);
    end else begin : g_header
      logic [N+WH-1:0] hx;
      const_int_mult #(.N(N), .C(H)) u_hx (.x(x), .y(hx));
      if (DIRECT) begin : g_direct
        assign fsum = WFS'(pi[0]);
        assign rt   = (WT'(hx) << (F - PTZ)) + WT'(fsum);
      end else if (J < I) begin : g_early
        // (h x + pi_j) + pi_i * 2^-(2^i s): the header joins the short operand
        logic [WT-1:0] hj;
        assign hj   = (WT'(hx) << (F - PTZ)) + WT'(pi[J]);
        assign fsum = (WFS'(pi[I]) << ((1 << J) * S));
        assign rt   = hj + WT'(fsum);
      end else begin : g_late
        // h x + (pi_i + pi_i * 2^-(2^i s)): the header is added last
        assign fsum = (WFS'(pi[I]) << ((1 << J) * S)) + WFS'(pi[J]);
        assign rt   = (WT'(hx) << (F - PTZ)) + WT'(fsum);
      end
    end
  end else begin : g_finite
    // a/b is a power of two times the integer h: no periodic part, F = 0
    logic [N+WH-1:0] hx;
    const_int_mult #(.N(N), .C(H)) u_hx (.x(x), .y(hx));
    assign rt = WT'(hx);
  end

  if (PTZ > 0) begin : g_tz
    assign r = {rt, {PTZ{1'b0}}};
  end else begin : g_notz
    assign r = rt;
  end

endmodule
