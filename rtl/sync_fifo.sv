// sync_fifo: single-clock first-in first-out buffer.
//
// Holds results between a layer's datapath and the controller that writes
// them to RAM, so that the RAM receives them in order. Circular buffer of
// DEPTH words with read and write pointers and an occupancy count. The
// document gives the FIFO's place and its ports (aclr, data, wrreq, rdreq,
// q); the depth, the synchronous clear and the empty/full flags are this
// design's choices.
//
// Timing: q is registered and holds the word read by rdreq one clock later.
// aclr empties the FIFO at the next clock edge. Writing when full or reading
// when empty is a usage error caught by assertions.
module sync_fifo #(
  parameter  int unsigned W     = 13,
  parameter  int unsigned DEPTH = 8,
  localparam int unsigned P_W   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         aclr,
  input  logic         wrreq,
  input  logic [W-1:0] data,
  input  logic         rdreq,
  output logic [W-1:0] q,
  output logic         empty,
  output logic         full
);
  logic [W-1:0] mem [DEPTH];
  logic [P_W-1:0] wp, rp;
  logic [P_W:0]   cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == (P_W+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst_n || aclr) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      q   <= '0;
    end else begin
      if (wrreq) begin
        mem[wp] <= data;
        wp      <= (wp == P_W'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (rdreq) begin
        q  <= mem[rp];
        rp <= (rp == P_W'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end
      cnt <= cnt + (P_W+1)'(wrreq) - (P_W+1)'(rdreq);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || aclr) wrreq |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || aclr) rdreq |-> !empty);
endmodule
