// layer_controller: runs the network's layers one after another.
//
// A Moore state machine with one state per layer, in order CONV1 (C1),
// MAXP1 (S2), CONV2 (C3), MAXP2 (S4/F5), DNSE1 (D6) and CLASS (reading the
// result). In each state exactly one layer enable is high; when that layer
// raises its done input the machine moves to the next state. CLASS is final:
// the controller classifies one image per reset. The states and their order
// follow the document; the state encoding and the use of each layer's done as
// the transition condition are this design's reading of its block diagram.
//
// Interface: done_i[i] and enable_o[i] belong to layer i in the order above.
// Timing: reset enters CONV1; enable_o changes one clock after done_i rises.
module layer_controller
  import cnn_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NLAYERS-1:0] done_i,
  output logic [NLAYERS-1:0] enable_o,
  output layer_state_e       state_o
);
  layer_state_e state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      CONV1:   if (done_i[0]) state_nx = MAXP1;
      MAXP1:   if (done_i[1]) state_nx = CONV2;
      CONV2:   if (done_i[2]) state_nx = MAXP2;
      MAXP2:   if (done_i[3]) state_nx = DNSE1;
      DNSE1:   if (done_i[4]) state_nx = CLASS;
      CLASS:   state_nx = CLASS;
      default: state_nx = CONV1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= CONV1;
    else        state <= state_nx;
  end

  always_comb begin
    enable_o = '0;
    enable_o[state] = 1'b1;
  end

  assign state_o = state;
endmodule
