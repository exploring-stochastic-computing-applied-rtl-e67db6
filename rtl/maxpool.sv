// maxpool: maximum of a 2x2 window.
//
// The four pixels of a window arrive one per valid cycle; mp_cont (0..3)
// tells in which slot to keep each. When the pixel of slot 3 arrives, the
// largest of the four (signed comparison) is output. Storing by slot index
// follows the document.
//
// Timing: q is valid with out_valid one clock after the slot-3 pixel.
module maxpool #(
  parameter int unsigned W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [1:0]          mp_cont,
  input  logic signed [W-1:0] d,
  output logic                out_valid,
  output logic signed [W-1:0] q
);
  logic signed [W-1:0] v [3];
  logic signed [W-1:0] m01, m2d;

  assign m01 = (v[0] > v[1]) ? v[0] : v[1];
  assign m2d = (v[2] > d)    ? v[2] : d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v[0] <= '0;
      v[1] <= '0;
      v[2] <= '0;
      out_valid <= 1'b0;
      q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (mp_cont == 2'd3) begin
          q         <= (m01 > m2d) ? m01 : m2d;
          out_valid <= 1'b1;
        end else begin
          v[mp_cont] <= d;
        end
      end
    end
  end
endmodule
