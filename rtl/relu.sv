// relu: rectified linear unit.
//
// Passes a non-negative value and replaces a negative one by 0, as the
// document's activation does. One register stage (this design's choice):
// q is valid with out_valid one clock after in_valid.
module relu #(
  parameter int unsigned W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] d,
  output logic                out_valid,
  output logic signed [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) q <= d[W-1] ? '0 : d;
    end
  end
endmodule
