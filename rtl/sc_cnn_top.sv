// sc_cnn_top: top level holding the two circuits of this design side by side.
//
//  * lenet5_cnn - the fixed-point Modified LeNet-5 classifier, run layer by
//    layer after reset (ports class_o, data_out, c1_count2304, state,
//    cnn_done).
//  * sc_mult - the stochastic-computing multiplier test circuit (two LFSR
//    based binary-to-stochastic converters, an AND gate and ones/zeros
//    counters; ports sc_*).
// The stochastic circuit is the first step towards stochastic layers and is
// not yet connected to the network; the two share only clock and reset.
module sc_cnn_top
  import cnn_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // Modified LeNet-5
  output logic [NCLASS-1:0]      class_o,
  output logic signed [D6_W-1:0] data_out,
  output logic [11:0]            c1_count2304,
  output logic [2:0]             state,
  output logic                   cnn_done,
  // stochastic multiplier
  input  logic                   sc_start,
  input  logic [7:0]             sc_x,
  input  logic [7:0]             sc_y,
  output logic [7:0]             sc_ones,
  output logic [7:0]             sc_zeros,
  output logic                   sc_done
);
  layer_state_e st;

  lenet5_cnn u_cnn (
    .clk, .rst_n, .class_o, .data_out, .c1_count2304, .state(st), .done(cnn_done)
  );
  assign state = st;

  sc_mult u_sc (
    .clk, .rst_n, .start(sc_start), .x(sc_x), .y(sc_y),
    .ones(sc_ones), .zeros(sc_zeros), .done(sc_done)
  );
endmodule
