// sc_mult: stochastic multiplication test circuit.
//
// x and y (each an 8-bit number standing for x/255 and y/255) are turned into
// bitstreams by two binary-to-stochastic converters whose LFSRs start from
// different seeds (59 and 139) so that the streams are uncorrelated. An AND
// gate multiplies the streams and a stochastic-to-binary converter counts the
// product stream: ones/LEN approximates (x/255)*(y/255). The converters, the
// AND gate, the seeds and the 255-bit stream length follow the document; the
// start/done control is this design's choice.
//
// Timing: a one-cycle start reseeds both LFSRs and clears the counters; the
// next LEN cycles each add one product bit; done rises after the last bit and
// stays high (with ones/zeros held) until the next start.
module sc_mult #(
  parameter int unsigned LEN    = 255,
  parameter logic [7:0]  SEED_A = 8'd59,
  parameter logic [7:0]  SEED_B = 8'd139,
  localparam int unsigned CNT_W = $clog2(LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [7:0]       x,
  input  logic [7:0]       y,
  output logic [CNT_W-1:0] ones,
  output logic [CNT_W-1:0] zeros,
  output logic             done
);
  logic             running;
  logic [CNT_W-1:0] n_bits;
  logic             sx, sy, sz;

  bin2sto #(.SEED(SEED_A)) u_x (
    .clk, .rst_n, .load(start), .en(running), .a(x), .bit_o(sx)
  );
  bin2sto #(.SEED(SEED_B)) u_y (
    .clk, .rst_n, .load(start), .en(running), .a(y), .bit_o(sy)
  );

  assign sz = sx & sy;

  sto2bin #(.CNT_W(CNT_W)) u_z (
    .clk, .rst_n, .clr(start), .en(running), .bit_i(sz), .ones, .zeros
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      n_bits  <= '0;
      done    <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
      n_bits  <= '0;
      done    <= 1'b0;
    end else if (running) begin
      n_bits <= n_bits + 1'b1;
      if (n_bits == CNT_W'(LEN - 1)) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end
endmodule
