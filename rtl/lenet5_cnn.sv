// lenet5_cnn: the Modified LeNet-5 handwritten-digit classifier.
//
// Network (one 28x28 image, 8-bit Q2.5 pixels):
//   C1  5x5 convolution, 4 filters, ReLU          -> 4 maps 24x24   (RAM_C1)
//   S2  2x2 max pool                              -> 4 maps 12x12   (RAM_S2)
//   C3  5x5 convolution, 4 filters per channel,
//       each of the 4 channels separately, ReLU   -> 16 maps 8x8    (RAM_C3)
//   S4  2x2 max pool (its output order is the
//       flattened F5 vector)                      -> 16 maps 4x4    (RAM_S4_F5)
//   D6  dense, 10 neurons over 256 inputs, each
//       neuron's 64 weights reused per channel    -> 10 values      (RAM_D6)
//   classification: index of the largest value   -> class_o one-hot
// The layers run strictly one after another under layer_controller; each one
// computes a single multiply-accumulate (or comparison) per clock and writes
// its results through a FIFO to its RAM before the next layer starts. The
// structure, sizes, memory map and sequencing follow the document.
//
// Memories: the image ROM (784 words) and the weight ROMs of C1 (100), C3
// (400) and D6 (640) have no built-in contents; load them through INIT_FILE
// of each sync_rom or write their arrays before releasing reset. Weight
// order: filter by filter (C3: channel-major, then filter), 25 weights each
// row by row; D6: neuron by neuron, 64 each. Biases are parameters.
//
// Timing: releasing rst_n starts a classification; done rises after about
// 92,500 clocks (C1 59,9xx, S2 2,3xx, C3 26,6xx, S4 1,0xx, D6 2,5xx and a
// dozen for the final read). class_o and data_out are then valid and held.
module lenet5_cnn
  import cnn_pkg::*;
#(
  parameter logic [8*NFILT-1:0]  C1_BIAS = '0,
  parameter logic [8*NFILT-1:0]  C3_BIAS = '0,
  parameter logic [8*NCLASS-1:0] D6_BIAS = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [NCLASS-1:0]      class_o,
  output logic signed [D6_W-1:0] data_out,
  output logic [11:0]            c1_count2304,
  output layer_state_e           state,
  output logic                   done
);
  logic [NLAYERS-1:0] en, dn;

  layer_controller u_ctrl (
    .clk, .rst_n, .done_i(dn), .enable_o(en), .state_o(state)
  );

  // ---------------- C1 ----------------
  logic [9:0]      img_a;  logic img_re;  logic [7:0] img_q;
  logic [6:0]      c1w_a;  logic c1w_re;  logic [7:0] c1w_q;
  logic            c1_we;  logic [11:0] c1_wa;  logic [C1_W-1:0] c1_wd;

  sync_rom #(.W(DATA_W), .DEPTH(IMG_SIDE * IMG_SIDE)) u_rom_img (
    .clk, .rden(img_re), .addr(img_a), .q(img_q)
  );
  sync_rom #(.W(DATA_W), .DEPTH(NFILT * KSIZE * KSIZE)) u_rom_c1w (
    .clk, .rden(c1w_re), .addr(c1w_a), .q(c1w_q)
  );

  conv_layer #(.IMG_W(IMG_SIDE), .N_CH(1), .N_F(NFILT), .IN_W(DATA_W), .OUT_W(C1_W),
               .BIAS(C1_BIAS)) u_c1 (
    .clk, .rst_n, .enable(en[0]), .done(dn[0]),
    .img_addr(img_a), .img_rden(img_re), .img_q,
    .w_addr(c1w_a), .w_rden(c1w_re), .w_q(c1w_q),
    .ram_wren(c1_we), .ram_wraddr(c1_wa), .ram_data(c1_wd)
  );
  assign c1_count2304 = c1_wa;

  logic [11:0]     c1_ra;  logic c1_re;  logic [C1_W-1:0] c1_q;
  sdp_ram #(.W(C1_W), .DEPTH(2304)) u_ram_c1 (
    .clk, .wren(c1_we), .wraddress(c1_wa), .data(c1_wd),
    .rden(c1_re), .rdaddress(c1_ra), .q(c1_q)
  );

  // ---------------- S2 ----------------
  logic s2_we;  logic [9:0] s2_wa;  logic [C1_W-1:0] s2_wd;

  pool_layer #(.IN_W(24), .N_MAPS(NFILT), .W(C1_W)) u_s2 (
    .clk, .rst_n, .enable(en[1]), .done(dn[1]),
    .rd_addr(c1_ra), .rden(c1_re), .rd_q(c1_q),
    .ram_wren(s2_we), .ram_wraddr(s2_wa), .ram_data(s2_wd)
  );

  logic [9:0] s2_ra;  logic s2_re;  logic [C1_W-1:0] s2_q;
  sdp_ram #(.W(C1_W), .DEPTH(576)) u_ram_s2 (
    .clk, .wren(s2_we), .wraddress(s2_wa), .data(s2_wd),
    .rden(s2_re), .rdaddress(s2_ra), .q(s2_q)
  );

  // ---------------- C3 ----------------
  logic [8:0] c3w_a;  logic c3w_re;  logic [7:0] c3w_q;
  logic c3_we;  logic [9:0] c3_wa;  logic [C3_W-1:0] c3_wd;

  sync_rom #(.W(DATA_W), .DEPTH(NFILT * NFILT * KSIZE * KSIZE)) u_rom_c3w (
    .clk, .rden(c3w_re), .addr(c3w_a), .q(c3w_q)
  );

  conv_layer #(.IMG_W(12), .N_CH(NFILT), .N_F(NFILT), .IN_W(C1_W), .OUT_W(C3_W),
               .BIAS(C3_BIAS)) u_c3 (
    .clk, .rst_n, .enable(en[2]), .done(dn[2]),
    .img_addr(s2_ra), .img_rden(s2_re), .img_q(s2_q),
    .w_addr(c3w_a), .w_rden(c3w_re), .w_q(c3w_q),
    .ram_wren(c3_we), .ram_wraddr(c3_wa), .ram_data(c3_wd)
  );

  logic [9:0] c3_ra;  logic c3_re;  logic [C3_W-1:0] c3_q;
  sdp_ram #(.W(C3_W), .DEPTH(1024)) u_ram_c3 (
    .clk, .wren(c3_we), .wraddress(c3_wa), .data(c3_wd),
    .rden(c3_re), .rdaddress(c3_ra), .q(c3_q)
  );

  // ---------------- S4 / F5 ----------------
  logic s4_we;  logic [7:0] s4_wa;  logic [C3_W-1:0] s4_wd;

  pool_layer #(.IN_W(8), .N_MAPS(NFILT * NFILT), .W(C3_W)) u_s4 (
    .clk, .rst_n, .enable(en[3]), .done(dn[3]),
    .rd_addr(c3_ra), .rden(c3_re), .rd_q(c3_q),
    .ram_wren(s4_we), .ram_wraddr(s4_wa), .ram_data(s4_wd)
  );

  logic [7:0] s4_ra;  logic s4_re;  logic [C3_W-1:0] s4_q;
  sdp_ram #(.W(C3_W), .DEPTH(DENSE_IN)) u_ram_s4 (
    .clk, .wren(s4_we), .wraddress(s4_wa), .data(s4_wd),
    .rden(s4_re), .rdaddress(s4_ra), .q(s4_q)
  );

  // ---------------- D6 ----------------
  logic [9:0] d6w_a;  logic d6w_re;  logic [7:0] d6w_q;
  logic d6_we;  logic [3:0] d6_wa;  logic [D6_W-1:0] d6_wd;

  sync_rom #(.W(DATA_W), .DEPTH(NCLASS * DENSE_WN)) u_rom_d6w (
    .clk, .rden(d6w_re), .addr(d6w_a), .q(d6w_q)
  );

  dense_layer #(.N_IN(DENSE_IN), .N_W(DENSE_WN), .N_OUT(NCLASS), .IN_W(C3_W), .OUT_W(D6_W),
                .BIAS(D6_BIAS)) u_d6 (
    .clk, .rst_n, .enable(en[4]), .done(dn[4]),
    .img_addr(s4_ra), .img_rden(s4_re), .img_q(s4_q),
    .w_addr(d6w_a), .w_rden(d6w_re), .w_q(d6w_q),
    .ram_wren(d6_we), .ram_wraddr(d6_wa), .ram_data(d6_wd)
  );

  logic [3:0] d6_ra;  logic d6_re;  logic [D6_W-1:0] d6_q;
  sdp_ram #(.W(D6_W), .DEPTH(NCLASS)) u_ram_d6 (
    .clk, .wren(d6_we), .wraddress(d6_wa), .data(d6_wd),
    .rden(d6_re), .rdaddress(d6_ra), .q(d6_q)
  );

  // ---------------- classification ----------------
  classification #(.N(NCLASS), .W(D6_W)) u_class (
    .clk, .rst_n, .enable(en[5]), .rd_addr(d6_ra), .rden(d6_re), .rd_q(d6_q),
    .class_o, .data_out, .done(dn[5])
  );

  assign done = dn[5];
endmodule
