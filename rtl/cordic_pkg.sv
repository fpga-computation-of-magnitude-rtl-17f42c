// cordic_pkg: word lengths and constants shared by the CORDIC magnitude
// calculator, and the formula that fills the correction ROM.
//
// The magnitude |x + jy| of a complex sample with 12-bit unsigned parts is
// computed by five unrolled integer CORDIC vectoring iterations on a 15-bit
// two's complement internal word, a table-driven correction of the residual
// angle, and one multiplication by the inverse CORDIC gain 0.6076. The 12-bit
// input, the 15-bit internal word, the five iterations, the 6-bit ROM address
// and the constant 0.6076 follow the source design. The output width, the
// fixed-point format of the constant and the exact quantisation behind the
// ROM contents are choices of this implementation and are documented below.
package cordic_pkg;

  // Input word: unsigned real and imaginary parts.
  localparam int IN_W = 12;
  // Internal word: two's complement, wide enough for x after five stages
  // (x5 <= 1.65 * sqrt(2) * 4095 < 2^14).
  localparam int INT_W = 15;
  // Number of unrolled CORDIC iterations (shifts 0 .. N_ITER-1).
  localparam int N_ITER = 5;
  // Output magnitude: sqrt(2) * 4095 < 2^13.
  localparam int OUT_W = 13;

  // Correction ROM addressing: XA_BITS most significant bits of the
  // (non-negative) x after the last stage, and YA_BITS bits of |y| taken from
  // bit YA_LSB upwards (|y| / 64), saturated at the largest index.
  localparam int XA_BITS = 3;
  localparam int YA_BITS = 3;
  localparam int YA_LSB  = 6;
  localparam int CORR_W  = 8;

  // Inverse cumulation factor 0.6076 as an unsigned Q0.16 constant:
  // round(0.6076 * 2^16) = 39820.
  localparam int K_FRAC = 16;
  localparam int K_INV  = 39820;

  // One ROM word. The address bins are represented by their centres
  //   xc = (xi + 0.5) * 2^x_lsb,  yc = (yi + 0.5) * 2^y_lsb
  // and the entry is the half-angle correction of eq. x_corr = x + y*a/2,
  //   round( yc * atan(yc / xc) / 2 ),
  // which approximates sqrt(x^2 + y^2) - x = y^2 / (2x) for small angles.
  function automatic int corr_entry(int xi, int yi, int x_lsb, int y_lsb);
    real xc, yc;
    xc = (real'(xi) + 0.5) * real'(1 << x_lsb);
    yc = (real'(yi) + 0.5) * real'(1 << y_lsb);
    return $rtoi(yc * $atan(yc / xc) / 2.0 + 0.5);
  endfunction

endpackage
