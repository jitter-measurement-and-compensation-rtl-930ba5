// jc_pkg: number formats and coefficient formulas shared by the jitter
// measurement and compensation datapath.
//
// Fixed-point conventions (all two's complement):
//   * ADC word D_i   : DI_W = 16 bits, value = code * 2^-15 (input range +-1).
//   * JCF tap data   : D_i reduced to DU_DI_W = 8 bits (D_i >>> 8) before the
//                      tap multipliers, value = code * 2^-7.
//   * h_s[n]         : HS_W = 6 bits, value = code * 2^-HS_FRAC.
//   * D_u            : DU_W bits, value = code * 2^-(7+HS_FRAC) = code * 2^-16.
//   * jitter values  : EPS_W = 23 bits (the width of one mapping-table entry),
//                      normalised to T_s, value = code * 2^-EPS_FRAC. With
//                      EPS_FRAC = 29 one LSB is 1.86e-9 T_s and the range is
//                      +-2^-7 T_s (+-78 ps at T_s = 10 ns).
//   * h_r[n]         : HR_W = 18 bits, value = code * 2^-HR_FRAC.
//   * eps_u          : 2^-EU_SHIFT, so the division by eps_u is a shift.
//
// The 8/6/18/23-bit widths, M = 7, N = 2^10, L = 127, a = 2^-13 and b = 0.9
// follow the document. The binary points, eps_u = 2^-5 and the rounding
// rules are this design's own choices.
package jc_pkg;

  localparam int DI_W     = 16;
  localparam int DI_FRAC  = 15;
  localparam int DU_DI_W  = 8;
  localparam int HS_W     = 6;
  localparam int HS_FRAC  = 9;
  localparam int EU_SHIFT = 5;
  localparam int EPS_W    = 23;
  localparam int EPS_FRAC = 29;
  localparam int HR_W     = 18;
  localparam int HR_FRAC  = 17;

  // D_u carries 2^-(DU_DI_W-1+HS_FRAC) per LSB.
  localparam int DU_FRAC  = DU_DI_W - 1 + HS_FRAC;

  // Right shift that turns D_u * eps_code into D_i LSBs, including the
  // division by eps_u:  (D_u*2^-DU_FRAC)*(eps*2^-EPS_FRAC)*2^EU_SHIFT / 2^-DI_FRAC
  localparam int CORR_SHIFT = DU_FRAC + EPS_FRAC - EU_SHIFT - DI_FRAC;  // 25

  // Left shift of (D_r - D_i) in eq. (34): eps_c = (D_r-D_i)/D_u * eps_u.
  localparam int DIV_SHIFT = EPS_FRAC - EU_SHIFT + DU_FRAC - DI_FRAC;   // 25

  // Width of D_u for a filter of 2M taps (excluding the centre tap).
  function automatic int du_width(int m);
    return DU_DI_W + HS_W + $clog2(2 * m);
  endfunction

  // h_s[n] = sinc(n - eps_u), eq. (18). Because sin(pi(n-eps_u)) =
  // -(-1)^n sin(pi eps_u), h_s[n] = (-1)^(n+1) sin(pi eps_u) / (pi (n - eps_u)),
  // so with eps_u = 2^-5 the scaled coefficient is
  //   round( (-1)^(n+1) * HS_NUM / ((32 n - 1) * 2^16) ),
  //   HS_NUM = round(2^HS_FRAC * 2^EU_SHIFT * sin(pi/32) / pi * 2^16).
  localparam longint HS_NUM = 64'sd33500557;

  function automatic int hs_code(int n);
    longint num, den, q;
    num = (n % 2 == 0) ? -HS_NUM : HS_NUM;
    den = longint'((32 * n) - 1) * 65536;
    if (den < 0) begin
      num = -num;
      den = -den;
    end
    if (num >= 0) q = (num + den / 2) / den;
    else          q = -((-num + den / 2) / den);
    return int'(q);
  endfunction

  // h_r[n] = 5 sin(4 n pi / 5) / (n pi), eq. (28) (Omega_B = 4 pi / 5).
  // sin(4 n pi / 5) repeats with period 5 in n, so h_r[n] = HR_K[n mod 5] / n
  // with HR_K[r] = round(5 sin(4 r pi / 5) / pi * 2^30); the result is rounded
  // to HR_FRAC fractional bits.
  function automatic int hr_code(int n);
    longint k, den, q;
    case (n % 5)
      0: k = 64'sd0;
      1: k = 64'sd1004473970;
      2: k = -64'sd1625273024;
      3: k = 64'sd1625273024;
      default: k = -64'sd1004473970;
    endcase
    den = longint'(n) <<< (30 - HR_FRAC);
    if (k >= 0) q = (k + den / 2) / den;
    else        q = -((-k + den / 2) / den);
    return int'(q);
  endfunction

  // b of eq. (38) as an unsigned fraction with B_FRAC bits.
  localparam int B_FRAC = 16;

endpackage
