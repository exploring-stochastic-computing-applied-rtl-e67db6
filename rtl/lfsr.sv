// lfsr: 8-bit Fibonacci linear feedback shift register.
//
// Stages X1..X8 shift one place towards X8 every enabled clock; the bit fed
// back into X1 is X4 ^ X5 ^ X6 ^ X8 (polynomial x^8+x^6+x^5+x^4+1, maximal
// length, period 255). The 8-bit output q has X1 as its most significant bit.
// The structure and polynomial follow the document's 8-bit LFSR example; the
// bit order of q and the load input are this design's choices.
//
// Timing: reset or load sets the state to SEED; each cycle with en high the
// next pseudo-random value appears on q after the clock edge.
module lfsr #(
  parameter logic [7:0] SEED = 8'd59
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       en,
  output logic [7:0] q
);
  // q[7] = X1 ... q[0] = X8
  logic fb;
  assign fb = q[4] ^ q[3] ^ q[2] ^ q[0];  // X4 ^ X5 ^ X6 ^ X8

  always_ff @(posedge clk) begin
    if (!rst_n || load) q <= SEED;
    else if (en)        q <= {fb, q[7:1]};
  end

  initial assert (SEED != 8'd0) else $error("lfsr: an all-zero seed locks up");
endmodule
