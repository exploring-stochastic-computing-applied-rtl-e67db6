// dense_addr_gen: address generator of the dense layer D6.
//
// For each of the N_OUT neurons it walks the N_IN flattened inputs (counter
// j, 0..N_IN-1) and, at the same time, the neuron's N_W weights, wrapping
// back to the neuron's first weight every N_W inputs: the input at j is
// multiplied by weight n*N_W + (j mod N_W). With 256 inputs and 64 weights the
// four channels of 64 values all share one neuron's 64 weights. Neuron n's
// weights start at n*0x40. One term per cycle, no gap between neurons. This
// follows the document's address generator.
//
// Interface: a one-cycle start begins the pass; while rd_en is high the
// addresses are valid, counter numbers the term (1..N_IN) and n_idx selects
// the bias. busy falls after the last term of the last neuron.
module dense_addr_gen #(
  parameter  int unsigned N_IN  = 256,
  parameter  int unsigned N_W   = 64,
  parameter  int unsigned N_OUT = 10,
  localparam int unsigned IA_W  = $clog2(N_IN),
  localparam int unsigned WA_W  = $clog2(N_OUT * N_W),
  localparam int unsigned CT_W  = $clog2(N_IN + 1),
  localparam int unsigned N_W_  = $clog2(N_OUT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [IA_W-1:0] addr_img,
  output logic [WA_W-1:0] addr_w,
  output logic            rd_en,
  output logic [CT_W-1:0] counter,
  output logic [N_W_-1:0] n_idx,
  output logic            busy
);
  logic [IA_W-1:0] j;
  logic [N_W_-1:0] n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      j <= '0;
      n <= '0;
    end else if (start) begin
      busy <= 1'b1;
      j <= '0;
      n <= '0;
    end else if (busy) begin
      if (j == IA_W'(N_IN - 1)) begin
        j <= '0;
        if (n == N_W_'(N_OUT - 1)) begin
          n    <= '0;
          busy <= 1'b0;
        end else begin
          n <= n + 1'b1;
        end
      end else begin
        j <= j + 1'b1;
      end
    end
  end

  always_comb begin
    addr_img = j;
    addr_w   = WA_W'(32'(n) * N_W + (32'(j) % N_W));
    counter  = CT_W'(32'(j) + 1);
    n_idx    = n;
    rd_en    = busy;
  end
endmodule
