// pool_addr_gen: address generator of a 2x2 max-pool layer (S2 or S4).
//
// For each output pixel it issues the four addresses of the 2x2 window, top
// row then bottom row (for a 24-wide map: 0x00, 0x01, 0x18, 0x19, then 0x02,
// 0x03, 0x1A, 0x1B, ...), moving two rows down at the end of a row pair and
// on to the next map after the last one. mp_cont tells the max-pool block
// which of the four slots the address belongs to. One address per cycle.
// The address pattern follows the document.
//
// Interface: a one-cycle start begins the pass; addr/mp_cont are valid while
// rd_en is high; busy falls after the last address.
module pool_addr_gen #(
  parameter  int unsigned IN_W   = 24,
  parameter  int unsigned N_MAPS = 4,
  localparam int unsigned A_W    = $clog2(N_MAPS * IN_W * IN_W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic [A_W-1:0] addr,
  output logic           rd_en,
  output logic [1:0]     mp_cont,
  output logic           busy
);
  localparam int unsigned HALF = IN_W / 2;
  localparam int unsigned C_W  = $clog2(HALF + 1);

  logic [1:0]     slot;
  logic [C_W-1:0] r, c;
  logic [7:0]     m;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      slot <= '0;
      r <= '0;
      c <= '0;
      m <= '0;
    end else if (start) begin
      busy <= 1'b1;
      slot <= '0;
      r <= '0;
      c <= '0;
      m <= '0;
    end else if (busy) begin
      slot <= slot + 1'b1;
      if (slot == 2'd3) begin
        if (c == C_W'(HALF - 1)) begin
          c <= '0;
          if (r == C_W'(HALF - 1)) begin
            r <= '0;
            if (m == 8'(N_MAPS - 1)) begin
              m    <= '0;
              busy <= 1'b0;
            end else begin
              m <= m + 1'b1;
            end
          end else begin
            r <= r + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  always_comb begin
    addr    = A_W'(m * (IN_W * IN_W) + (2 * 32'(r) + 32'(slot[1])) * IN_W + 2 * 32'(c) + 32'(slot[0]));
    rd_en   = busy;
    mp_cont = slot;
  end
endmodule
