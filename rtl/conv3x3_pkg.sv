// conv3x3_pkg: shared constants of the 3x3 convolution core.
//
// Holds the default widths and the quantization shift used by conv3x3,
// conv3x3_mac and conv3x3_act, so that every module and testbench starts
// from the same numbers. The values are those the core is specified with:
// signed 8-bit pixels and weights, a 24-bit accumulator, a 32-bit bias
// input, signed 8-bit outputs and a 1-bit arithmetic right shift as the
// quantization step. TAPS is the window size, fixed at three by three.
package conv3x3_pkg;

  localparam int unsigned K      = 3;      // window is K x K
  localparam int unsigned TAPS   = K * K;  // products per output pixel

  localparam int unsigned DEF_IN_W   = 8;  // pixel width, signed
  localparam int unsigned DEF_COEF_W = 8;  // kernel weight width, signed
  localparam int unsigned DEF_ACC_W  = 24; // accumulator width, signed
  localparam int unsigned DEF_BIAS_W = 32; // bias input width, signed
  localparam int unsigned DEF_OUT_W  = 8;  // output width, signed
  localparam int unsigned DEF_SHIFT  = 1;  // quantization right shift

endpackage
