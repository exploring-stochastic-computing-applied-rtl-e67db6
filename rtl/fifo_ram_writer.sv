// fifo_ram_writer: the RAM controller of a layer.
//
// Reads the layer's FIFO whenever it is not empty and writes each word to the
// next sequential address of the layer's output RAM, starting at 0. After N
// words it raises done, which stays high until the next start. The write
// address doubles as a count of results written. Sequential writing from a
// FIFO follows the document; the empty-driven read is this design's choice.
//
// Timing: a word read in cycle t (rdreq) is written in cycle t+1 (wr_en,
// wr_addr, wr_data), when the FIFO's registered q holds it. done rises one
// clock after the last write.
module fifo_ram_writer #(
  parameter  int unsigned N   = 2304,
  parameter  int unsigned W   = 13,
  localparam int unsigned A_W = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           fifo_empty,
  input  logic [W-1:0]   fifo_q,
  output logic           rdreq,
  output logic           wr_en,
  output logic [A_W-1:0] wr_addr,
  output logic [W-1:0]   wr_data,
  output logic           done
);
  logic rd_d;

  assign rdreq   = !fifo_empty && !done && !start;
  assign wr_en   = rd_d;
  assign wr_data = fifo_q;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      rd_d    <= 1'b0;
      wr_addr <= '0;
      done    <= 1'b0;
    end else begin
      rd_d <= rdreq;
      if (rd_d) begin
        if (wr_addr == A_W'(N - 1)) done <= 1'b1;
        else                        wr_addr <= wr_addr + 1'b1;
      end
    end
  end
endmodule
