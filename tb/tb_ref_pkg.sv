// tb_ref_pkg: reference arithmetic for the testbenches, written from the
// formulas (floating-point sinc and sine, then rounding) rather than from the
// RTL's integer constants.
//   hs_ref(n)  = round(sinc(n - 2^-5) * 2^9)                (JCF taps)
//   hr_ref(n)  = round(5 sin(4 n pi / 5) / (n pi) * 2^17)    (SRF taps)
//   div_ref    = trunc((x * 2^25) / du), saturated to +-(2^22 - 1)
//   lpf_ref    = T + round((x - T) / 2^a)
//   acc_ref    = sat23(tau + round(eps * b / 2^16))
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int hs_ref(int n);
    real x;
    x = real'(n) - 1.0 / 32.0;
    return rnd($sin(PI * x) / (PI * x) * 512.0);
  endfunction

  function automatic int hr_ref(int n);
    return rnd(5.0 * $sin(4.0 * real'(n) * PI / 5.0) / (real'(n) * PI) * 131072.0);
  endfunction

  // D_u from the 2M neighbours, d[j] = D_i[k - (j - M)], j = 0..2M.
  function automatic longint du_ref(int m, longint d[]);
    longint s;
    s = 0;
    for (int j = 0; j <= 2 * m; j++)
      if (j != m) s += (d[j] >>> 8) * hs_ref(j - m);
    return s;
  endfunction

  function automatic longint div_ref(longint x, longint du);
    longint ax, ad, q;
    ax = (x < 0) ? -x : x;
    ad = (du < 0) ? -du : du;
    q = (ax <<< 25) / ad;
    if (q > 4194303) q = 4194303;
    return (((x < 0) != (du < 0)) ? -q : q);
  endfunction

  function automatic longint lpf_ref(longint t, longint x, int a);
    return t + ((x - t + (longint'(1) <<< (a - 1))) >>> a);
  endfunction

  function automatic longint sat(longint v, int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint acc_ref(longint eps, longint tau, longint bq);
    return sat(tau + ((eps * bq + 32768) >>> 16), 23);
  endfunction

  // D_c = sat16(D_i + round(D_u * eps / 2^25))
  function automatic longint dc_ref(longint di, longint du, longint eps);
    return sat(di + ((du * eps + (longint'(1) <<< 24)) >>> 25), 16);
  endfunction

endpackage
