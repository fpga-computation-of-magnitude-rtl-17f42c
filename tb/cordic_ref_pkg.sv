// cordic_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: plain integer arithmetic for the CORDIC
// iterations (floor division by powers of two), the correction table computed
// from its formula with real arithmetic, and the exact magnitude from $sqrt.
package cordic_ref_pkg;

  // floor(v / 2^k) for any sign of v
  function automatic int floor_div2(int v, int k);
    int d;
    d = 1 << k;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  // Correction table word for x index xi (bins of 2048) and y index yi
  // (bins of 64), evaluated at the bin centres: yc * atan(yc / xc) / 2.
  function automatic int ref_corr(int xi, int yi);
    real xc, yc, c;
    xc = (xi + 0.5) * 2048.0;
    yc = (yi + 0.5) * 64.0;
    c  = yc * $atan(yc / xc) / 2.0;
    return int'($floor(c + 0.5));
  endfunction

  typedef struct {
    int x5;
    int y5;
    int xcorr;
    int mag;
    bit sat;
    int neg_count;   // iterations k >= 1 that took the y < 0 branch
    int pos_count;   // iterations k >= 1 that took the y >= 0 branch
  } ref_t;

  // Bit-true model of the whole calculator with five iterations.
  function automatic ref_t ref_mag(int x0, int y0);
    ref_t r;
    int x, y, xn, yn, yabs, xi, yi;
    x = x0 + y0;
    y = y0 - x0;
    r.neg_count = 0;
    r.pos_count = 0;
    for (int k = 1; k < 5; k++) begin
      if (y < 0) begin
        xn = x - floor_div2(y, k);
        yn = y + floor_div2(x, k);
        r.neg_count++;
      end else begin
        xn = x + floor_div2(y, k);
        yn = y - floor_div2(x, k);
        r.pos_count++;
      end
      x = xn;
      y = yn;
    end
    r.x5 = x;
    r.y5 = y;
    yabs = (y < 0) ? -y : y;
    xi = x / 2048;
    yi = yabs / 64;
    r.sat = (yi > 7);
    if (yi > 7) yi = 7;
    r.xcorr = x + ref_corr(xi, yi);
    // round(xcorr * 0.6076) with the constant held as 39820 / 65536
    r.mag = int'((longint'(r.xcorr) * 39820 + 32768) / 65536);
    return r;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real exact_mag(int x0, int y0);
    return $sqrt(real'(x0) * real'(x0) + real'(y0) * real'(y0));
  endfunction

endpackage
