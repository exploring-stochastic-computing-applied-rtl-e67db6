// mac_block: multiply-accumulate with two alternating accumulators.
//
// Each valid cycle multiplies a signed pixel by a signed weight and adds the
// product to the selected accumulator. The term index k_elm runs 1..N_TERMS:
// the term with k_elm = 1 starts a new sum, the term with k_elm = N_TERMS
// completes it. On completion a demultiplexer switches the following sum to
// the other accumulator and the output multiplexer points at the finished
// one, so mac_out holds a result steady while the next one is being built.
// The two-MAC scheme and the k_elm index follow the document. ACC_W defaults
// to the full width of the sum, so no sum can wrap.
//
// Timing: mac_out is valid in the cycle out_valid is high, one clock after
// the last term entered, and stays valid until the next sum completes.
module mac_block #(
  parameter  int unsigned A_W     = 8,
  parameter  int unsigned B_W     = 8,
  parameter  int unsigned N_TERMS = 25,
  parameter  int unsigned ACC_W   = A_W + B_W + $clog2(N_TERMS),
  localparam int unsigned K_W     = $clog2(N_TERMS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [A_W-1:0]   img_in,
  input  logic signed [B_W-1:0]   wb_in,
  input  logic [K_W-1:0]          k_elm,
  output logic signed [ACC_W-1:0] mac_out,
  output logic                    out_valid
);
  logic signed [ACC_W-1:0] acc [2];
  logic signed [ACC_W-1:0] prod;
  logic                    sel;      // accumulator being built
  logic                    out_sel;  // accumulator holding the last result

  assign prod = ACC_W'(img_in * wb_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc[0]    <= '0;
      acc[1]    <= '0;
      sel       <= 1'b0;
      out_sel   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (k_elm == K_W'(1)) acc[sel] <= prod;
        else                  acc[sel] <= acc[sel] + prod;
        if (k_elm == K_W'(N_TERMS)) begin
          sel       <= ~sel;
          out_sel   <= sel;
          out_valid <= 1'b1;
        end
      end
    end
  end

  assign mac_out = acc[out_sel];

  a_kelm_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (k_elm >= K_W'(1) && k_elm <= K_W'(N_TERMS)));
endmodule
