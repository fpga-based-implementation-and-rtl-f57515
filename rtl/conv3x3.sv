// conv3x3: 3x3 convolution core with ReLU and quantized 8-bit output.
//
// Computes one output pixel of a 3x3 convolution per accepted window:
//     y = sat_int8( relu( (bias + sum_{r,c} pix[r][c]*ker[r][c]) >>> SHIFT ) )
// Pixels and weights are signed IN_W/COEF_W-bit values, the sum is kept in a
// signed ACC_W-bit accumulator and the result is a signed OUT_W-bit value in
// 0 .. 2^(OUT_W-1)-1. The kernel and the bias are ordinary inputs, so they
// can change at run time, on any clock, together with the window.
//
// Interface: present a window on pix (pix[row][col]), its kernel on ker and
// the bias, and raise in_valid for one clock. Three clocks later out_valid is
// high for one clock with the result on y. A new window may be presented on
// every clock; there is no back-pressure. Sliding the window over an image
// (for example the nine windows of a 5x5 image) is left to whatever drives
// the core.
//
// Structure: conv3x3_mac (nine parallel multipliers, then the accumulation,
// two stages) feeds conv3x3_act (shift, ReLU, saturation, one stage).
// The widths, the 1-bit shift, the ReLU and the saturation follow the core's
// specification; the three-stage split, the valid handshake and the
// asynchronous active-low reset are this design's choices.
module conv3x3
  import conv3x3_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned ACC_W  = DEF_ACC_W,
  parameter int unsigned BIAS_W = DEF_BIAS_W,
  parameter int unsigned OUT_W  = DEF_OUT_W,
  parameter int unsigned SHIFT  = DEF_SHIFT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   pix [K][K],
  input  logic signed [COEF_W-1:0] ker [K][K],
  input  logic signed [BIAS_W-1:0] bias,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y
);

  logic                    acc_valid;
  logic signed [ACC_W-1:0] acc;

  conv3x3_mac #(
    .IN_W  (IN_W),
    .COEF_W(COEF_W),
    .ACC_W (ACC_W),
    .BIAS_W(BIAS_W)
  ) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .pix      (pix),
    .ker      (ker),
    .bias     (bias),
    .acc_valid(acc_valid),
    .acc      (acc)
  );

  conv3x3_act #(
    .ACC_W(ACC_W),
    .OUT_W(OUT_W),
    .SHIFT(SHIFT)
  ) u_act (
    .clk      (clk),
    .rst_n    (rst_n),
    .acc_valid(acc_valid),
    .acc      (acc),
    .y_valid  (out_valid),
    .y        (y)
  );

endmodule
