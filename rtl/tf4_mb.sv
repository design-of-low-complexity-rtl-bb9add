// tf4_mb: shared multiplier block of test filter 4.
//
// In transposed direct form I every coefficient multiplies the same signal
// w1(n), so all ten products b0..b4 and a1..a5 come out of one block of
// shifts and adders. Shifts are wiring; the cost is the adders, and the speed
// is the number of adders in series (adder steps).
//
// A term "w >> s" of a 10-bit coefficient is computed exactly as w << (10 - s),
// so each product is w1 * coef * 2^10: an integer with 10 more fraction bits
// than w1. The subexpressions are:
//   w2 = w1 + w1>>2            horizontal pattern [1 0 1]          (HCS)
//   s1 = w1>>5 - w1>>3         vertical patterns [-1 0 -1],[1 0 1]
//                              shared by b1 and b3 as is, and by a3 and a5
//                              shifted right by 2                   (eq. 5)
//   p  = w2>>1 - w2>>6         used in a2, and negated and shifted right
//                              by 2 as b4                           (eq. 6)
// and from them
//   b0 = (w2>>2 - w2>>8) + w1>>6     b1 = b3 = s1 + (w1>>7 - w1>>10)
//   b2 =  w2>>4 - w2>>8              b4 = -(p>>2)
//   a1 =  w1>>3 + w1>>9              a2 = p + w1>>10
//   a3 = a5 = (w1>>1 + w1>>10) + s1>>2
//   a4 =  w2>>3 + w2>>8
// That is 13 two-input adders/subtractors and one negation (14 operations) and
// at most three adder steps (w1 -> w2 -> p -> a2 and w1 -> w2 -> . -> b0).
// Sharing b1 = b3 and a3 = a5 between taps is the vertical subexpression: in
// the transposed structure a product reused by two taps is computed once.
//
// The decomposition is the published one for this filter; how the terms are
// grouped into a tree of depth three is this design's reading of it.
//
// Interface: w1 in (signed, W bits), pb[0..4] = b0..b4 * w1 and
// pa[0..4] = a1..a5 * w1 out (signed, W + 11 bits, 10 extra fraction bits).
// Timing: purely combinational.
module tf4_mb #(
  parameter int W  = tf4_pkg::W1_W,
  localparam int PW = W + tf4_pkg::COEF_FRAC + 1
) (
  input  logic signed [W-1:0]  w1,
  output logic signed [PW-1:0] pb [tf4_pkg::NB],
  output logic signed [PW-1:0] pa [tf4_pkg::NA]
);

  typedef logic signed [PW-1:0] p_t;

  p_t x;          // w1 sign-extended to product width
  p_t w2;         // 4 * (w1 + w1>>2)         : w2>>s  = w2 <<< (8 - s)
  p_t s1;         // 32 * (w1>>5 - w1>>3)     : s1     = s1 <<< 5, s1>>2 = s1 <<< 3
  p_t p;          // (w2>>1 - w2>>6) / 4      : p      = p <<< 2,  p>>2  = p
  p_t t_b0, t_b1, t_a3;
  p_t b0, b13, b2, b4, a1, a2, a35, a4;

  always_comb begin
    x = p_t'(w1);

    // adder step 1
    w2   = (x <<< 2) + x;
    s1   = x - (x <<< 2);
    t_b1 = (x <<< 3) - x;             // w1>>7 - w1>>10
    t_a3 = (x <<< 9) + x;             // w1>>1 + w1>>10
    a1   = (x <<< 7) + (x <<< 1);     // w1>>3 + w1>>9

    // adder step 2
    p    = (w2 <<< 5) - w2;
    t_b0 = (w2 <<< 6) - w2;           // w2>>2 - w2>>8
    b13  = (s1 <<< 5) + t_b1;
    b2   = (w2 <<< 4) - w2;
    a35  = t_a3 + (s1 <<< 3);
    a4   = (w2 <<< 5) + w2;

    // adder step 3
    b0   = t_b0 + (x <<< 4);          // + w1>>6
    a2   = (p <<< 2) + x;             // p + w1>>10
    b4   = -p;                        // -(p>>2)

    pb[0] = b0;
    pb[1] = b13;
    pb[2] = b2;
    pb[3] = b13;
    pb[4] = b4;
    pa[0] = a1;
    pa[1] = a2;
    pa[2] = a35;
    pa[3] = a4;
    pa[4] = a35;
  end

  // every output equals the plain product with the coefficient table
  always_comb begin
    for (int k = 0; k < tf4_pkg::NB; k++)
      assert (longint'(pb[k]) == longint'(w1) * longint'(tf4_pkg::B_COEF[k]))
        else $error("tf4_mb: b%0d product wrong", k);
    for (int k = 0; k < tf4_pkg::NA; k++)
      assert (longint'(pa[k]) == longint'(w1) * longint'(tf4_pkg::A_COEF[k]))
        else $error("tf4_mb: a%0d product wrong", k + 1);
  end

endmodule
