// tf4_pkg: constants shared by the test-filter-4 IIR design.
//
// The filter is a fifth-order elliptic IIR lowpass (cutoff 0.1) whose ten
// coefficients are 10-bit canonic-signed-digit (CSD) fractions. Every
// coefficient is held here as the integer coef * 2^COEF_FRAC, so a product
// w1 * coef is the integer w1 * COEF, read with COEF_FRAC extra fraction bits.
//
//   numerator   B(z) = b0 + b1 z^-1 + ... + b4 z^-4
//   denominator A(z) = 1 + a1 z^-1 + ... + a5 z^-5
//
//   b = ( 331, -89,  75, -89, -155) / 1024
//   a = ( 130, 621, 489, 165,  489) / 1024
//
// CSD digits (bit weight 2^-1 ... 2^-10):
//   b0 = 2^-2 + 2^-4 + 2^-6 - 2^-8 - 2^-10
//   b1 = b3 = -2^-3 + 2^-5 + 2^-7 - 2^-10
//   b2 = 2^-4 + 2^-6 - 2^-8 - 2^-10
//   b4 = -2^-3 - 2^-5 + 2^-8 + 2^-10
//   a1 = 2^-3 + 2^-9
//   a2 = 2^-1 + 2^-3 - 2^-6 - 2^-8 + 2^-10
//   a3 = a5 = 2^-1 - 2^-5 + 2^-7 + 2^-10
//   a4 = 2^-3 + 2^-5 + 2^-8 + 2^-10
//
// The coefficient values and the 10-bit wordlength are the published test
// filter. The sign of the feedback (A(z) with a plus sign, so that the poles lie
// inside the unit circle, largest radius 0.884) and every data width below are
// this design's own choices.
package tf4_pkg;

  // coefficient wordlength: fraction bits of every coefficient
  localparam int COEF_FRAC = 10;
  // numerator taps b0..b4 and feedback taps a1..a5
  localparam int NB = 5;
  localparam int NA = 5;

  // input sample width (signed integer samples)
  localparam int X_W   = 16;
  // extra fraction bits carried in the recursive signal w1
  localparam int GUARD = 4;
  // integer headroom of w1 above the input (l1 norm of 1/A(z) is 3.8 < 2^2)
  localparam int HEAD  = 2;
  // width of w1: signed, GUARD fraction bits
  localparam int W1_W  = X_W + HEAD + GUARD;
  // width of a product and of every partial sum in the delay chains;
  // |sum of |a_k|| = 1894/1024 < 2, so W1_W + COEF_FRAC + 1 bits hold any sum
  localparam int P_W   = W1_W + COEF_FRAC + 1;
  // output width: l1 norm of B(z)/A(z) is 1.6 < 2
  localparam int Y_W   = X_W + 1;

  typedef logic signed [P_W-1:0] prod_t;

  // coefficients as integers (value * 2^COEF_FRAC)
  localparam int B_COEF [NB] = '{331, -89, 75, -89, -155};
  localparam int A_COEF [NA] = '{130, 621, 489, 165, 489};

endpackage
