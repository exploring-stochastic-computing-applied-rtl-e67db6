// bias_add: rescale a product sum, add the bias and saturate.
//
// The sum of products of two Q.5 numbers has 2*FRAC fraction bits. This block
// shifts it right by FRAC (arithmetic shift, rounding toward minus infinity),
// adds the 8-bit Q2.5 bias and clamps the result to the signed OUT_W-bit
// range of the layer's output. Adding the per-kernel bias follows the
// document; the truncating shift and the saturation are this design's
// choices (the document sizes each layer for its worst case, so saturation
// should not occur with its trained parameters).
//
// Timing: one register stage; result is valid with out_valid one clock after
// in_valid.
module bias_add #(
  parameter int unsigned IN_W  = 21,
  parameter int unsigned OUT_W = 13,
  parameter int unsigned FRAC  = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  acc,
  input  logic signed [7:0]       bias,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] result
);
  localparam int unsigned S_W = (IN_W > OUT_W ? IN_W : OUT_W) + 1;
  localparam logic signed [S_W-1:0] MAXV = S_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [S_W-1:0] MINV = -S_W'(64'sd1 <<< (OUT_W - 1));

  logic signed [S_W-1:0] sum;

  assign sum = S_W'(acc >>> FRAC) + S_W'(bias);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (sum > MAXV)      result <= OUT_W'(MAXV);
        else if (sum < MINV) result <= OUT_W'(MINV);
        else                 result <= OUT_W'(sum);
      end
    end
  end
endmodule
