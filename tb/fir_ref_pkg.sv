// fir_ref_pkg: bit-accurate reference model of one LMS step of the adaptive
// FIR filter, written with plain integer arithmetic for the testbenches.
//   y  = sat(floor(sum w*x / 2^15)), e = sat(d - y),
//   em = floor(e * mu / 2^16), w += floor(em * x / 2^15) (saturated).
package fir_ref_pkg;

  class fir_model;
    int unsigned n;
    longint      w[];
    longint      xd[];
    longint      y, e;

    function new(int unsigned taps);
      n  = taps;
      w  = new[taps];
      xd = new[taps];
      foreach (w[i]) begin w[i] = 0; xd[i] = 0; end
    endfunction

    static function longint sat16(longint v);
      if (v > 32767)  return 32767;
      if (v < -32768) return -32768;
      return v;
    endfunction

    // floor division by 2^k for signed values
    static function longint fdiv(longint v, int k);
      longint q;
      q = v / (longint'(1) << k);
      if (v < 0 && q * (longint'(1) << k) != v) q = q - 1;
      return q;
    endfunction

    function void step(longint x, longint d, longint mu);
      longint acc, em;
      for (int i = int'(n) - 1; i > 0; i--) xd[i] = xd[i-1];
      xd[0] = x;
      acc = 0;
      for (int i = 0; i < int'(n); i++) acc += w[i] * xd[i];
      y  = sat16(fdiv(acc, 15));
      e  = sat16(d - y);
      em = fdiv(e * mu, 16);
      for (int i = 0; i < int'(n); i++) w[i] = sat16(w[i] + fdiv(em * xd[i], 15));
    endfunction
  endclass

endpackage
