// iir_tf4: fifth-order elliptic IIR lowpass "test filter 4", one sample per clock.
//
//          B(z)     b0 + b1 z^-1 + ... + b4 z^-4
//   H(z) = ----  =  ------------------------------
//          A(z)     1 + a1 z^-1 + ... + a5 z^-5
//
// Transposed direct form I: the recursive part comes first,
//     w1(n) = x(n) - sum_{k=1..5} a_k w1(n-k)
//     y(n)  = sum_{k=0..4} b_k w1(n-k)
// and both sums are built in transposed delay chains (tdf_chain) fed by one
// shared multiplier block (tf4_mb) that forms all ten products of w1(n) with
// 14 shift-add operations in three adder steps. The longest path is the
// feedback loop: chain register -> input subtractor -> multiplier block ->
// chain adder -> chain register.
//
// Number formats (all two's complement):
//   x   X_W-bit integer samples
//   w1  W1_W bits, GUARD fraction bits, HEAD bits of headroom above x
//   products and chain sums: P_W bits, GUARD + 10 fraction bits, exact
//   y   Y_W-bit integer, floor of the exact sum (drops GUARD + 10 bits)
// The feedback sum is truncated (floor) to the GUARD fraction bits of w1; no
// other rounding happens. The filter gains bound every signal inside its
// width for any input, so no saturation logic is needed.
//
// The structure, the coefficients and the multiplier block follow the
// published design of this filter. The word widths, the feedback sign, the
// truncation points, the input handshake and the output register are this
// design's own choices.
//
// Interface and timing: a sample x is taken on a rising edge where in_valid
// is 1; between samples (in_valid = 0) the state holds. y for that sample is
// registered on the same edge and is valid, with out_valid = 1, for one cycle
// after it: latency one clock. Synchronous active-low reset clears the state.
module iir_tf4 (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic signed [tf4_pkg::X_W-1:0] x,
  output logic                         out_valid,
  output logic signed [tf4_pkg::Y_W-1:0] y
);
  import tf4_pkg::*;

  logic signed [W1_W-1:0] w1;
  prod_t pb [NB];
  prod_t pa [NA];
  prod_t pb_tail [NB-1];
  prod_t s_a, s_b, y_full;

  // input node: w1 = x - (feedback sum truncated to GUARD fraction bits)
  always_comb begin
    w1 = W1_W'(prod_t'(x) <<< GUARD) - W1_W'(s_a >>> COEF_FRAC);
  end

  tf4_mb #(.W(W1_W)) u_mb (
    .w1 (w1),
    .pb (pb),
    .pa (pa)
  );

  // feedback chain: s_a(n) = sum_{k=1..5} a_k w1(n-k)
  tdf_chain #(.TAPS(NA), .W(P_W)) u_chain_a (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .p     (pa),
    .sum   (s_a)
  );

  // numerator chain: s_b(n) = sum_{k=1..4} b_k w1(n-k)
  always_comb begin
    for (int k = 0; k < NB - 1; k++) pb_tail[k] = pb[k+1];
  end

  tdf_chain #(.TAPS(NB-1), .W(P_W)) u_chain_b (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .p     (pb_tail),
    .sum   (s_b)
  );

  assign y_full = pb[0] + s_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= Y_W'(y_full >>> (GUARD + COEF_FRAC));
    end
  end

endmodule
