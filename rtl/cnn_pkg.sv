// cnn_pkg: widths, sizes and types shared by the Modified LeNet-5 datapath.
//
// Numbers are signed fixed point with 5 fraction bits. Pixels and weights are
// 8-bit Q2.5 (sign, 2 integer bits, 5 fraction bits). A product of two Q.5
// values has 10 fraction bits; each layer shifts its sum back to Q.5 before
// adding the bias. The per-layer output widths (13, 16 and 19 bits) are the
// bus widths of the reference implementation's C1, C3/S4 and D6 outputs.
package cnn_pkg;

  localparam int unsigned FRAC     = 5;   // fraction bits of every Q.5 value
  localparam int unsigned DATA_W   = 8;   // image pixels and all weights/biases
  localparam int unsigned C1_W     = 13;  // C1 and S2 outputs
  localparam int unsigned C3_W     = 16;  // C3 and S4/F5 outputs
  localparam int unsigned D6_W     = 19;  // D6 neuron values

  localparam int unsigned IMG_SIDE = 28;  // input image 28x28
  localparam int unsigned KSIZE    = 5;   // 5x5 kernels
  localparam int unsigned NFILT    = 4;   // filters per layer (C1 and C3)
  localparam int unsigned NCLASS   = 10;  // dense outputs
  localparam int unsigned DENSE_IN = 256; // flattened S4 output
  localparam int unsigned DENSE_WN = 64;  // weights per neuron (reused per channel)

  // Layer sequencing states, in execution order.
  typedef enum logic [2:0] {
    CONV1 = 3'd0,
    MAXP1 = 3'd1,
    CONV2 = 3'd2,
    MAXP2 = 3'd3,
    DNSE1 = 3'd4,
    CLASS = 3'd5
  } layer_state_e;

  localparam int unsigned NLAYERS = 6;

endpackage
