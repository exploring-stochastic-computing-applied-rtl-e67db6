// sdp_ram: simple dual-port RAM (one write port, one read port).
//
// Holds a layer's output feature maps, written by the layer's RAM controller
// and read by the next layer. The ports mirror the RAM blocks of the
// document's implementation (data, wraddress, wren, rdaddress, rden, q).
//
// Timing: a write takes effect at the clock edge; q holds mem[rdaddress] one
// clock after a cycle with rden high (old data if the same address is being
// written in that cycle).
module sdp_ram #(
  parameter  int unsigned W     = 13,
  parameter  int unsigned DEPTH = 2304,
  localparam int unsigned A_W   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           wren,
  input  logic [A_W-1:0] wraddress,
  input  logic [W-1:0]   data,
  input  logic           rden,
  input  logic [A_W-1:0] rdaddress,
  output logic [W-1:0]   q
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wren) mem[wraddress] <= data;
    if (rden) q <= mem[rdaddress];
  end
endmodule
