// bin2sto: binary-to-stochastic converter.
//
// An 8-bit LFSR produces a new pseudo-random number b every enabled cycle and
// a comparator outputs 1 while the binary input a is at least b. Over the
// LFSR's 255-cycle period the fraction of ones approximates a/255. The
// comparison sense (a >= b) follows the converter drawn in the document.
//
// Timing: bit_o is combinational from a and the current LFSR state; the LFSR
// advances on every clock with en high. load reseeds it.
module bin2sto #(
  parameter logic [7:0] SEED = 8'd59
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       en,
  input  logic [7:0] a,
  output logic       bit_o
);
  logic [7:0] rnd;

  lfsr #(.SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load, .en, .q(rnd)
  );

  assign bit_o = (a >= rnd);
endmodule
