// tdf_chain: delay line of a transposed-form FIR section.
//
// In the transposed form the products of the current sample are added into a
// chain of registers that carries partial sums toward the output, instead of
// delaying the input and summing afterwards. With products p[0..TAPS-1] for
// the delays 1..TAPS, every accepted sample does
//     s[k]      <= p[k] + s[k+1]     (k < TAPS-1)
//     s[TAPS-1] <= p[TAPS-1]
// so that sum = s[0] = sum_k p[k](n-1-k) for the samples taken so far. The
// filter uses one chain for the numerator taps b1..b4 and one for the
// feedback taps a1..a5; each chain costs TAPS-1 structural adders, which the
// published adder counts leave out.
//
// The structure is the standard transposed direct form; the clock enable and
// the synchronous reset to zero are this design's own choices.
//
// Interface: en advances the chain by one sample; p is sampled on that edge.
// sum is a register output, valid the cycle after the edge.
module tdf_chain #(
  parameter int TAPS = 5,
  parameter int W    = tf4_pkg::P_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] p [TAPS],
  output logic signed [W-1:0] sum
);

  // partial-sum registers, s[0] nearest the output (packed, so they map to flip-flops)
  logic [TAPS-1:0][W-1:0] s;

  for (genvar k = 0; k < TAPS; k++) begin : g_stage
    logic signed [W-1:0] next;
    if (k < TAPS - 1) begin : g_add
      assign next = p[k] + $signed(s[k+1]);
    end else begin : g_last
      assign next = p[k];
    end

    always_ff @(posedge clk) begin
      if (!rst_n)  s[k] <= '0;
      else if (en) s[k] <= next;
    end
  end

  assign sum = $signed(s[0]);

endmodule
