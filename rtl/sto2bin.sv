// sto2bin: stochastic-to-binary converter.
//
// Two up counters count the ones and the zeros of a bitstream, one bit per
// enabled cycle; ones/(ones+zeros) is the value the stream carries. The two
// counters follow the document; their width is this design's choice.
//
// Timing: clr (or reset) zeroes both counters; each cycle with en high one
// counter increments at the clock edge.
module sto2bin #(
  parameter int unsigned CNT_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic             bit_i,
  output logic [CNT_W-1:0] ones,
  output logic [CNT_W-1:0] zeros
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      ones  <= '0;
      zeros <= '0;
    end else if (en) begin
      if (bit_i) ones  <= ones + 1'b1;
      else       zeros <= zeros + 1'b1;
    end
  end
endmodule
