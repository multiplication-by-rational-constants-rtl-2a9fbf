// tb_ref_pkg -- reference arithmetic for the testbenches, written
// independently of the design: exact products by a/b as wide integer
// fractions, round to nearest even, and a reference floating-point
// multiplication by a/b with the same special-value rules as the design
// (subnormals flushed to zero, overflow to infinity, canonical quiet NaN).
package tb_ref_pkg;

  localparam int W = 512;
  typedef logic [W-1:0] wide_t;

  function automatic int wbitlen(wide_t v);
    for (int i = W - 1; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  // Round num/den to q significant bits, nearest even.
  // Result: mant * 2^(-t) with 2^(q-1) <= mant <= 2^q - 1.
  // tie is set when num/den lies exactly on a midpoint.
  function automatic void rne(input wide_t num, input wide_t den, input int q,
                              output wide_t mant, output int t, output bit tie,
                              output bit up);
    wide_t nn, dd, qt, rm;
    t = q + wbitlen(den) - wbitlen(num);
    forever begin
      if (t >= 0) begin nn = num << t; dd = den; end
      else begin nn = num; dd = den << (-t); end
      qt = nn / dd;
      if (qt >= (wide_t'(1) << q)) t--;
      else if (qt < (wide_t'(1) << (q - 1))) t++;
      else break;
    end
    rm   = nn - qt * dd;
    tie  = (rm << 1) == dd;
    up   = ((rm << 1) > dd) || (tie && qt[0]);
    mant = qt + wide_t'(up);
    if (mant == (wide_t'(1) << q)) begin
      mant = wide_t'(1) << (q - 1);
      t--;
    end
  endfunction

  // Reference floating-point product x * a/b, IEEE layout, we/wf bits.
  function automatic logic [127:0] fp_ref(input logic [127:0] x, input int we,
                                          input int wf, input longint a,
                                          input longint b);
    logic        sgn;
    longint      ex, emax, eout;
    wide_t       sig, mant;
    int          t;
    bit          tie, up;
    logic [127:0] y;
    sgn  = x[we + wf];
    ex   = longint'((x >> wf) & ((128'(1) << we) - 1));
    emax = (longint'(1) << we) - 1;
    sig  = wide_t'(128'(x & ((128'(1) << wf) - 128'(1)))) | (wide_t'(1) << wf);
    y    = 128'(sgn) << (we + wf);
    if (ex == emax) begin
      y |= 128'(emax) << wf;
      if ((x & ((128'(1) << wf) - 1)) != 0) y |= 128'(1) << (wf - 1);
      return y;
    end
    if (ex == 0) return y;
    rne(sig * wide_t'(a), wide_t'(b), wf + 1, mant, t, tie, up);
    eout = ex - longint'(t);
    if (eout >= emax) return y | (128'(emax) << wf);
    if (eout <= 0) return y;
    return y | (128'(eout) << wf) | 128'(mant & ((wide_t'(1) << wf) - 1));
  endfunction

endpackage
