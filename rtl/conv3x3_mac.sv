// conv3x3_mac: multiply-accumulate datapath of the 3x3 convolution core.
//
// Takes one 3x3 window of signed pixels, the matching 3x3 signed kernel and
// a signed bias, and produces the signed sum
//     acc = bias + sum_{r,c} pix[r][c] * ker[r][c]
// in an ACC_W-bit accumulator. The nine multiplications run in parallel, so a
// new window can be accepted on every clock.
//
// Pipeline (two register stages, latency 2 clocks from in_valid to
// acc_valid, throughput one window per clock):
//   stage 1  nine full-precision products (IN_W+COEF_W bits) and the bias
//            are registered;
//   stage 2  the products, sign-extended to ACC_W, and the bias, resized to
//            ACC_W, are summed and registered as acc.
// A bias outside the signed ACC_W-bit range is first clamped to that range;
// the sum itself then wraps modulo 2^ACC_W, as a plain ACC_W-bit
// two's-complement register does. With the default widths nine 8x8 products
// need at most 19 bits, so wrapping needs a bias near the 24-bit limits.
//
// The widths (8-bit pixels and weights, 24-bit accumulator, 32-bit bias) are
// the core's specified ones. The split into two stages, the valid signal,
// how the 32-bit bias is fitted into the 24-bit accumulator (clamping) and the asynchronous active-low reset are this design's choices.
module conv3x3_mac
  import conv3x3_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned ACC_W  = DEF_ACC_W,
  parameter int unsigned BIAS_W = DEF_BIAS_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   pix [K][K],  // pix[row][col]
  input  logic signed [COEF_W-1:0] ker [K][K],  // ker[row][col]
  input  logic signed [BIAS_W-1:0] bias,
  output logic                     acc_valid,
  output logic signed [ACC_W-1:0]  acc
);

  localparam int unsigned PROD_W = IN_W + COEF_W;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  prod_t prod_q [TAPS];
  acc_t  bias_q;
  logic  s1_valid;
  acc_t  sum_d;
  acc_t  bias_sat;

  localparam int unsigned WIDE_W = (BIAS_W > ACC_W) ? BIAS_W : ACC_W;
  typedef logic signed [WIDE_W-1:0] wide_t;
  localparam wide_t ACC_MAX = wide_t'(acc_t'({1'b0, {(ACC_W-1){1'b1}}}));
  localparam wide_t ACC_MIN = wide_t'(acc_t'({1'b1, {(ACC_W-1){1'b0}}}));

  // Clamp the bias into the accumulator's range.
  always_comb begin
    if (wide_t'(bias) > ACC_MAX)      bias_sat = acc_t'(ACC_MAX);
    else if (wide_t'(bias) < ACC_MIN) bias_sat = acc_t'(ACC_MIN);
    else                              bias_sat = acc_t'(bias);
  end

  // Stage 1: the nine multipliers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      bias_q   <= '0;
      for (int t = 0; t < TAPS; t++) prod_q[t] <= '0;
    end else begin
      s1_valid <= in_valid;
      bias_q   <= bias_sat;
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          prod_q[r*K + c] <= prod_t'(pix[r][c]) * prod_t'(ker[r][c]);
    end
  end

  // Stage 2: accumulate the products onto the bias.
  always_comb begin
    sum_d = bias_q;
    for (int t = 0; t < TAPS; t++) sum_d = sum_d + acc_t'(prod_q[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_valid <= 1'b0;
      acc       <= '0;
    end else begin
      acc_valid <= s1_valid;
      acc       <= sum_d;
    end
  end

endmodule
