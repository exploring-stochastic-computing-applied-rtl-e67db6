// classification: picks the class with the largest dense-layer output.
//
// When enable rises it reads the N neuron values from the result RAM, one per
// cycle at addresses 0..N-1, delays each address by one clock so that it
// lines up with the RAM's registered output, and keeps the largest value
// seen (signed; on a tie the lower index wins). After the last value it
// presents the winner as a one-hot class_o (bit i = class i) and its value on
// data_out, and raises done. The read / one-clock delay / classify split and
// the one-hot class_o follow the document's implementation; the comparison
// details are this design's choice.
//
// Timing: done, class_o and data_out are valid N+2 clocks after enable rises.
// done stays high while enable does and clears when enable falls; class_o and
// data_out hold the last result until the next rise of enable clears them.
module classification #(
  parameter  int unsigned N   = 10,
  parameter  int unsigned W   = 19,
  localparam int unsigned A_W = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  output logic [A_W-1:0]      rd_addr,
  output logic                rden,
  input  logic signed [W-1:0] rd_q,
  output logic [N-1:0]        class_o,
  output logic signed [W-1:0] data_out,
  output logic                done
);
  logic en_q, start, busy;
  logic [A_W-1:0] addr_d;       // address delayed one clock
  logic           v_d;
  logic signed [W-1:0] best;
  logic [A_W-1:0]      best_i;

  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= enable;
  end
  assign start = enable && !en_q;
  assign rden  = busy;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      busy     <= start;
      rd_addr  <= '0;
      addr_d   <= '0;
      v_d      <= 1'b0;
      best     <= '0;
      best_i   <= '0;
      class_o  <= '0;
      data_out <= '0;
      done     <= 1'b0;
    end else if (!enable) begin
      busy <= 1'b0;
      v_d  <= 1'b0;
      done <= 1'b0;
    end else begin
      v_d    <= busy;
      addr_d <= rd_addr;
      if (busy) begin
        if (rd_addr == A_W'(N - 1)) busy <= 1'b0;
        else                        rd_addr <= rd_addr + 1'b1;
      end
      if (v_d) begin
        if (addr_d == '0 || rd_q > best) begin
          best   <= rd_q;
          best_i <= addr_d;
        end
      end
      if (v_d && !busy && addr_d == A_W'(N - 1)) begin
        // last value: decide including it
        if (rd_q > best) begin
          class_o  <= N'(1) << addr_d;
          data_out <= rd_q;
        end else begin
          class_o  <= N'(1) << best_i;
          data_out <= best;
        end
        done <= 1'b1;
      end
    end
  end
endmodule
