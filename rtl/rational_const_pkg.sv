// rational_const_pkg -- elaboration-time arithmetic shared by the rational
// constant multipliers.
//
// A rational constant a/b is rewritten as 2^e * (h + c/d) with c and d odd
// and c < d.  The binary expansion of c/d is purely periodic: its period is
// s bits long, s being the multiplicative order of 2 modulo d, and the
// repeated s-bit pattern is p = floor(2^s * c / d).  periodic_rep() follows
// that procedure step by step (strip the powers of two, split off the
// integer header h, search the order of 2 modulo d).
//
// The remaining functions size the datapaths:
//  * sa_plan() chooses how many fraction bits F of the constant the
//    shift-and-add tree builds.  F is a multiple of s made of 2^i + 2^j
//    periods, large enough both for the published correct-rounding bound
//    (q + 1 + ceil(log2 b) bits of the constant) and for the rounding stage
//    of this implementation, which also resolves exact ties (see cr_round).
//  * kcm_frac_bits() chooses the fraction bits kept by the table-based
//    multiplier so that the accumulated table truncation error stays inside
//    the same exclusion zone around rounding midpoints.
//  * kcm_entry() computes one table word floor(v * c * 2^sh / d) in wide
//    arithmetic, so that no table has to be stored as a data file.
//
// All functions are constant functions: nothing in this package is hardware
// by itself.  The integer fields are 64 bits wide, which bounds the usable
// constants to periods s <= 60 (for example every odd d below 61).
package rational_const_pkg;

  // Wide scratch width for table entries (bits).
  localparam int unsigned KCM_MAXW = 512;

  typedef struct packed {
    longint e;   // exponent of the power-of-two scale factor
    longint h;   // integer header
    longint p;   // periodic pattern (s bits)
    longint s;   // period size in bits (1 when d == 1)
    longint c;   // odd numerator of the whole constant: 2^-e * a/b = c/d
    longint cf;  // numerator of the periodic part: c mod d
    longint d;   // odd denominator
    longint br;  // denominator b after reduction of a/b (used by the bound)
  } periodic_rep_t;

  // What the rounding stage did with one product (for monitoring and tests).
  typedef struct packed {
    logic hi;     // product in the upper of its two possible binades
    logic up;     // rounded up (incremented)
    logic tie;    // exact midpoint, resolved to even
    logic carry;  // rounding carried into the next binade
  } round_info_t;

  // Sizing of the periodic shift-and-add tree.
  typedef struct packed {
    int wh;      // bits of the header h (0 when h == 0)
    int ptz;     // trailing zeros of p, trimmed from the datapath
    int lp;      // bits of p with trailing zeros trimmed (p_odd)
    int w;       // fraction bits of the constant that are needed
    int direct;  // 1 when one period already suffices (no doubling stages)
    int i;       // index of the last doubling stage pi_i
    int j;       // stage added in the last addition pi_i * 2^(2^j s) + pi_j
    int f;       // fraction bits actually built: (2^i + 2^j) * s, or s
    int l;       // floor(log2(h + c/d))
    int g;       // ceil(log2(cf/d)), <= 0
    int adders;  // number of two-input adders of the tree
  } sa_plan_t;

  function automatic longint gcd(longint x, longint y);
    longint t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int bitlen(longint v);
    int n;
    n = 0;
    while (v > 0) begin
      v = v >> 1;
      n++;
    end
    return n;
  endfunction

  function automatic int ctz(longint v);
    int n;
    n = 0;
    if (v == 0) return 0;
    while ((v & 1) == 0) begin
      v = v >> 1;
      n++;
    end
    return n;
  endfunction

  function automatic int popcount(longint v);
    int n;
    n = 0;
    while (v > 0) begin
      n += int'(v & 1);
      v = v >> 1;
    end
    return n;
  endfunction

  // ceil(log2(v)) for v >= 1
  function automatic int clog2l(longint v);
    int n;
    n = 0;
    while ((longint'(1) << n) < v) n++;
    return n;
  endfunction

  // Periodic representation of a/b (a > 0, b > 0).
  function automatic periodic_rep_t periodic_rep(longint a, longint b);
    periodic_rep_t r;
    longint g, c, d, t;
    g = gcd(a, b);
    c = a / g;
    d = b / g;
    r = '0;
    r.br = d;
    while (c % 2 == 0) begin
      c = c / 2;
      r.e++;
    end
    while (d % 2 == 0) begin
      d = d / 2;
      r.e--;
    end
    r.c = c;
    r.d = d;
    r.h = c / d;
    r.cf = c % d;
    r.s = 1;
    if (d == 1) begin
      r.p = 0;
    end else begin
      t = 2;
      while (t % d != 1) begin
        r.s++;
        t = 2 * t;
      end
      r.p = r.cf * t / d;
    end
    return r;
  endfunction

  // floor(log2(c/d)) for the odd fraction c/d
  function automatic int floor_log2_frac(longint c, longint d);
    int l;
    l = bitlen(c) - bitlen(d);
    // adjust so that 2^l <= c/d < 2^(l+1)
    while (l >= 0 ? (c < (d << l)) : ((c << -l) < d)) l--;
    while (l + 1 >= 0 ? (c >= (d << (l + 1))) : ((c << -(l + 1)) >= d)) l++;
    return l;
  endfunction

  // ceil(log2(cf/d)) for 0 < cf < d
  function automatic int ceil_log2_frac(longint cf, longint d);
    int g;
    g = 0;
    while ((cf << (1 - g)) <= d) g--;
    return g;
  endfunction

  // Smallest F such that the truncation error of the constant, bounded by
  // 2^(err_pos) units of the product LSB, stays within the exclusion zone
  // around rounding midpoints.  n: input bits, q: output bits, l: floor(log2 K).
  function automatic int cr_frac_bits(int n, int q, int l, int err_pos, longint d);
    int k, km;
    k  = n - 1 + l - q;
    km = (k < 0) ? k : 0;
    return err_pos - km + clog2l(d);
  endfunction

  function automatic sa_plan_t sa_plan(longint a, longint b, int n, int q);
    periodic_rep_t r;
    sa_plan_t pl;
    longint podd;
    int wpaper, wcr, ii, jj;
    r = periodic_rep(a, b);
    pl = '0;
    pl.wh = bitlen(r.h);
    pl.l = floor_log2_frac(r.c, r.d);
    if (r.d == 1) begin
      // finite constant: no periodic part at all
      pl.direct = 1;
      pl.f = 0;
      pl.adders = (r.h != 0) ? popcount(r.h) - 1 : 0;
      return pl;
    end
    pl.ptz = ctz(r.p);
    podd = r.p >> pl.ptz;
    pl.lp = bitlen(podd);
    pl.g = ceil_log2_frac(r.cf, r.d);
    // published bound: the constant to q + 1 + ceil(log2 b) bits, of which
    // wh belong to the header
    wpaper = q + 1 + clog2l(r.br) - pl.wh;
    // bound used by the tie-resolving rounding stage: error < 2^(n+g-F)
    wcr = cr_frac_bits(n, q, pl.l, n + pl.g, r.d);
    pl.w = (wpaper > wcr) ? wpaper : wcr;
    if (pl.w <= int'(r.s)) begin
      pl.direct = 1;
      pl.i = 0;
      pl.j = 0;
      pl.f = int'(r.s);
    end else begin
      ii = 0;
      while (!(((1 << ii) * int'(r.s) < pl.w) && (pl.w <= (1 << (ii + 1)) * int'(r.s)))) ii++;
      jj = 0;
      while (((1 << ii) + (1 << jj)) * int'(r.s) < pl.w) jj++;
      pl.direct = 0;
      pl.i = ii;
      pl.j = jj;
      pl.f = ((1 << ii) + (1 << jj)) * int'(r.s);
    end
    pl.adders = (popcount(podd) - 1) + pl.i + (pl.direct != 0 ? 0 : 1) +
                ((r.h != 0) ? popcount(r.h) : 0);
    return pl;
  endfunction

  // Fraction bits of the table-based multiplier with nch tables.
  function automatic int kcm_frac_bits(longint a, longint b, int n, int q, int nch);
    periodic_rep_t r;
    int l;
    r = periodic_rep(a, b);
    if (r.d == 1) return 0;
    l = floor_log2_frac(r.c, r.d);
    // table errors may add up to zero, so the correction must exceed the
    // error bound strictly: one more bit than the shift-and-add case
    return cr_frac_bits(n, q, l, clog2l(longint'(nch)) + 1, r.d);
  endfunction

  // Table word floor(v * c * 2^sh / d).
  function automatic logic [KCM_MAXW-1:0] kcm_entry(longint v, longint c, longint d, int sh);
    logic [KCM_MAXW-1:0] num;
    num = KCM_MAXW'(v) * KCM_MAXW'(c);
    num = num << sh;
    return num / KCM_MAXW'(d);
  endfunction

endpackage
