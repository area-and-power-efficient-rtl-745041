// roba_ref_pkg: reference arithmetic for the testbenches, written without the
// structure of the RTL. Rounding searches for the nearer of the two powers of
// two around a value by comparing distances; products use ordinary integer
// multiplication; the LMS model is the textbook recursion on integers.
package roba_ref_pkg;

  // Nearest power of two of a non-negative value; ties go to the larger one.
  function automatic longint ref_round(input longint mag);
    longint lo;
    if (mag <= 0) return 0;
    lo = 1;
    while (lo * 2 <= mag) lo = lo * 2;
    if ((mag - lo) < (2 * lo - mag)) return lo;
    else return 2 * lo;
  endfunction

  // Approximate product A_r*B + B_r*A - A_r*B_r of two N-bit words, as a
  // signed integer (signed operands when sgn = 1).
  function automatic longint ref_roba(input longint a_bits, input longint b_bits,
                                      input int n, input bit sgn);
    longint a, b, ma, mb, ra, rb, m;
    longint mask;
    mask = (longint'(1) << n) - 1;
    a = a_bits & mask;
    b = b_bits & mask;
    if (sgn && a >= (longint'(1) << (n - 1))) a = a - (longint'(1) << n);
    if (sgn && b >= (longint'(1) << (n - 1))) b = b - (longint'(1) << n);
    ma = (a < 0) ? -a : a;
    mb = (b < 0) ? -b : b;
    ra = ref_round(ma);
    rb = ref_round(mb);
    m  = ra * mb + rb * ma - ra * rb;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // Clamp to a w-bit signed range.
  function automatic longint ref_sat(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Sign-extend the low w bits.
  function automatic longint sx(input longint v, input int w);
    longint m;
    m = v & ((longint'(1) << w) - 1);
    return (m >= (longint'(1) << (w - 1))) ? m - (longint'(1) << w) : m;
  endfunction

  // Floor division by 2^f (arithmetic right shift of a signed value).
  function automatic longint asr(input longint v, input int f);
    return v >>> f;
  endfunction


  // Bit-level model of the LMS adaptive filter with ROBA multipliers:
  // Q-format words of w bits with f fractional bits, t taps.
  class lms_model;
    int     w, f, t;
    longint xd[$];     // x(n-1) .. x(n-t+1)
    longint wt[$];     // tap weights
    longint y, e;      // outputs for the sample presented last
    int     sat_count; // saturation events seen so far

    function new(int w_, int f_, int t_);
      w = w_; f = f_; t = t_;
      reset();
    endfunction

    function void reset();
      xd.delete(); wt.delete();
      for (int k = 0; k < t; k++) wt.push_back(0);
      for (int k = 1; k < t; k++) xd.push_back(0);
    endfunction

    function longint satc(longint v);
      longint s;
      s = ref_sat(v, w);
      if (s != v) sat_count++;
      return s;
    endfunction

    // Outputs for sample x and desired d (no state change).
    function void eval(longint x, longint d);
      longint acc;
      acc = ref_roba(x, wt[0], w, 1);
      for (int k = 1; k < t; k++) acc += ref_roba(xd[k-1], wt[k], w, 1);
      y = satc(asr(acc, f));
      e = satc(sx(d, w) - y);
    endfunction

    // Clock edge with enable high: adapt weights, shift delay line.
    function void step(longint x, longint mu);
      longint mue, xk;
      mue = satc(asr(ref_roba(mu, e, w, 1), f));
      for (int k = 0; k < t; k++) begin
        xk = (k == 0) ? sx(x, w) : xd[k-1];
        wt[k] = satc(wt[k] + asr(ref_roba(mue, xk, w, 1), f));
      end
      xd.push_front(sx(x, w));
      void'(xd.pop_back());
    endfunction
  endclass

endpackage
