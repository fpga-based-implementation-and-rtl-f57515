// conv3x3_act: quantization, ReLU and saturation stage of the 3x3 core.
//
// Turns the signed ACC_W-bit accumulator into one signed OUT_W-bit output
// pixel in three steps:
//   1. quantize: arithmetic right shift by SHIFT bits (rounds towards minus
//      infinity);
//   2. ReLU: a negative result becomes 0;
//   3. saturate: a result above the largest signed OUT_W-bit value
//      (127 for 8 bits) becomes that value.
// Because of the ReLU the output is always in 0 .. 2^(OUT_W-1)-1.
//
// One register stage: y and y_valid follow acc and acc_valid one clock later.
//
// The 1-bit arithmetic shift, the ReLU, the saturation and the 8-bit output
// follow the core's specification. Saturating to the signed (int8) range
// rather than to 255, the output register and the asynchronous active-low
// reset are this design's choices.
module conv3x3_act
  import conv3x3_pkg::*;
#(
  parameter int unsigned ACC_W = DEF_ACC_W,
  parameter int unsigned OUT_W = DEF_OUT_W,
  parameter int unsigned SHIFT = DEF_SHIFT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    acc_valid,
  input  logic signed [ACC_W-1:0] acc,
  output logic                    y_valid,
  output logic signed [OUT_W-1:0] y
);

  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t OUT_MAX = acc_t'((64'(1) << (OUT_W - 1)) - 1);

  acc_t                    shifted;
  logic signed [OUT_W-1:0] y_d;

  always_comb begin
    shifted = acc >>> SHIFT;
    if (shifted < 0)
      y_d = '0;
    else if (shifted > OUT_MAX)
      y_d = OUT_MAX[OUT_W-1:0];
    else
      y_d = shifted[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= acc_valid;
      y       <= y_d;
    end
  end

endmodule
