// sync_rom: read-only memory with a registered output.
//
// Holds the input image or one layer's weights as signed 8-bit Q2.5 words.
// When INIT_FILE names a hex file it is loaded with $readmemh; with the
// default empty name the array is left for the surrounding system (or a
// testbench) to fill before use, since no trained parameters come with this
// design. Contents are ordered as the address generators expect: filter by
// filter, 25 weights each, for C1 and C3, and 64 weights per neuron for D6.
//
// Timing: q holds mem[addr] one clock after a cycle with rden high.
module sync_rom #(
  parameter  int unsigned W         = 8,
  parameter  int unsigned DEPTH     = 784,
  parameter  string       INIT_FILE = "",
  localparam int unsigned A_W       = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rden,
  input  logic [A_W-1:0] addr,
  output logic [W-1:0]   q
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (rden) q <= mem[addr];
  end
endmodule
