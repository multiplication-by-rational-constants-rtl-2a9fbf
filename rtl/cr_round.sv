// cr_round -- correct rounding of a truncated product x*K to Q bits,
// round to nearest, ties to even.
//
// Input r approximates the exact product P = x*K from below, where x is an
// N-bit integer with its top bit set and K = c/d is the odd part of the
// rational constant (d odd).  r carries F fraction bits and its error is
// below 2^CORR_POS units of its LSB.  Because d is odd, the exact product is
// never closer than a fixed distance to a rounding midpoint unless it lies
// exactly on one: the parity of x*c*2^k and of (2J+1)*d differ.  F is chosen
// by the multipliers so that the error bound 2^CORR_POS is no larger than
// that distance.  The stage then:
//   1. adds the bound: r' = r + 2^CORR_POS, so that P <= r' < P + 2^CORR_POS;
//   2. finds the leading one among the two possible positions (K*x lies in
//      [2^(N-1) K, 2^N K), two binades) and keeps Q bits;
//   3. rounds: below the midpoint round down; at or above it round up,
//      except when r' lies less than 2^CORR_POS above the midpoint, which can
//      only happen when P is the midpoint itself: that tie goes to the even
//      neighbour.
// A rounding carry renormalises to 1.00..0 in the next binade.  For d == 1
// (HAS_CORR = 0) r is exact and the stage is a plain round-to-nearest-even.
//
// Rounding the truncated product to nearest follows the correct-rounding
// argument for rational constants; the explicit correction and the tie
// detection are this implementation's additions: without them an exact
// midpoint (x a multiple of d, product in the upper binade) would always be
// rounded down.
//
// Interface: r (WR bits) -> mant (Q bits, leading one included) and eo, the
// number of binades above 2^(N-1+L) the result lies in (0, 1 or 2), so that
// the rounded value is mant * 2^(N-1+L+eo-(Q-1)).  info reports what
// happened.  Timing: purely combinational.
module cr_round
  import rational_const_pkg::*;
#(
  parameter int N        = 24,  // input bits of the multiplier
  parameter int Q        = 24,  // result bits
  parameter int F        = 32,  // fraction bits of r
  parameter int L        = 0,   // floor(log2 K)
  parameter int WR       = 57,  // width of r
  parameter bit HAS_CORR = 1'b1,
  parameter int CORR_POS = 23   // log2 of the error bound, in LSBs of r
) (
  input  logic [WR-1:0] r,
  output logic [Q-1:0]  mant,
  output logic [1:0]    eo,
  output round_info_t   info
);

  // zero bits appended below r when the product has fewer than Q+1 bits
  localparam int PAD0   = Q - (N - 1 + L + F);
  localparam int PAD    = (PAD0 > 0) ? PAD0 : 0;
  localparam int WX     = WR + PAD + 1;
  localparam int T0     = N - 1 + L + F + PAD;   // leading one, lower binade
  localparam int RB0    = T0 - Q;                // round bit, lower binade
  localparam int TIE_LO = HAS_CORR ? CORR_POS + PAD : 0;

  localparam logic [WX-1:0] CORR  = HAS_CORR ? (WX'(1) << (CORR_POS + PAD)) : '0;
  localparam logic [WX-1:0] LOW   = (WX'(1) << TIE_LO) - WX'(1);
  localparam logic [WX-1:0] MASK0 = ((WX'(1) << RB0) - WX'(1)) & ~LOW;
  localparam logic [WX-1:0] MASK1 = ((WX'(1) << (RB0 + 1)) - WX'(1)) & ~LOW;

  if (TIE_LO > RB0 || T0 + 2 > WX - 1) begin : g_check
    $error("cr_round: fraction bits too few for correct rounding");
  end

  logic [WX-1:0] rx;
  logic [WX-1:0] sh;
  logic          hi, rb, tie, up;
  logic [Q:0]    sum;

  assign rx = (WX'(r) << PAD) + CORR;

  always_comb begin
    hi   = rx[T0+1];
    sh   = rx >> (RB0 + int'(hi));
    rb   = sh[0];
    tie  = rb && ((rx & (hi ? MASK1 : MASK0)) == '0);
    up   = rb && (!tie || sh[1]);
    sum  = {1'b0, sh[Q:1]} + (Q+1)'(up);
    info = '{hi: hi, up: up, tie: tie, carry: sum[Q]};
    if (rx[T0+2]) begin
      // only reachable when P is within the error bound of 2^(T0+2)
      mant = {1'b1, {(Q-1){1'b0}}};
      eo   = 2'd2;
      info = '{hi: 1'b1, up: 1'b1, tie: 1'b0, carry: 1'b1};
    end else if (sum[Q]) begin
      mant = {1'b1, {(Q-1){1'b0}}};
      eo   = 2'(hi) + 2'd1;
    end else begin
      mant = sum[Q-1:0];
      eo   = 2'(hi);
    end
  end

endmodule
