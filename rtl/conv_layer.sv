// conv_layer: one convolutional layer (C1 or C3) of the Modified LeNet-5.
//
// Datapath: address generator -> input memory and weight ROM (outside this
// module, one-clock read) -> two-accumulator MAC -> bias adder -> ReLU ->
// FIFO -> RAM controller -> output RAM (outside). Each output pixel is the
// sum of 25 pixel*weight products of one 5x5 window, shifted back to Q.5,
// plus the filter's bias, passed through ReLU. Outputs are written to the
// output RAM in generation order: map (channel*N_F + filter), row, column.
// The chain of blocks, the per-filter biases held in the layer (parameter
// BIAS, 8-bit Q2.5 per filter, filter f in bits [8f+7:8f]) and the sequential
// RAM writes follow the document. Default values of BIAS are zero because
// the trained values are not part of this design.
//
// Timing: the layer starts when enable rises and needs 26 cycles per output
// plus a few cycles of pipeline; done then stays high until enable next rises.
module conv_layer #(
  parameter  int unsigned IMG_W = 28,
  parameter  int unsigned N_CH  = 1,
  parameter  int unsigned N_F   = 4,
  parameter  int unsigned IN_W  = 8,
  parameter  int unsigned OUT_W = 13,
  parameter  logic [8*N_F-1:0] BIAS = '0,
  localparam int unsigned K      = 5,
  localparam int unsigned OSIDE  = IMG_W - K + 1,
  localparam int unsigned N_OUT  = N_CH * N_F * OSIDE * OSIDE,
  localparam int unsigned IA_W   = $clog2(N_CH * IMG_W * IMG_W),
  localparam int unsigned WA_W   = $clog2(N_CH * N_F * K * K),
  localparam int unsigned OA_W   = $clog2(N_OUT),
  localparam int unsigned ACC_W  = IN_W + 8 + $clog2(K * K),
  localparam int unsigned F_W    = (N_F > 1) ? $clog2(N_F) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic             done,
  output logic [IA_W-1:0]  img_addr,
  output logic             img_rden,
  input  logic [IN_W-1:0]  img_q,
  output logic [WA_W-1:0]  w_addr,
  output logic             w_rden,
  input  logic [7:0]       w_q,
  output logic             ram_wren,
  output logic [OA_W-1:0]  ram_wraddr,
  output logic [OUT_W-1:0] ram_data
);
  logic en_q, start;
  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= enable;
  end
  assign start = enable && !en_q;

  // address generation
  logic           rd_en, busy;
  logic [4:0]     k_elm;
  logic [F_W-1:0] f_idx;

  conv_addr_gen #(.IMG_W(IMG_W), .N_CH(N_CH), .N_F(N_F), .K(K)) u_agen (
    .clk, .rst_n, .start, .addr_img(img_addr), .addr_w(w_addr),
    .rd_en, .k_elm, .f_idx, .busy
  );
  assign img_rden = rd_en;
  assign w_rden   = rd_en;

  // align control with the one-clock memory read
  logic           v_d;
  logic [4:0]     k_d;
  logic [F_W-1:0] f_d, bias_f;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d    <= 1'b0;
      k_d    <= '0;
      f_d    <= '0;
      bias_f <= '0;
    end else begin
      v_d <= rd_en;
      k_d <= k_elm;
      f_d <= f_idx;
      if (v_d && k_d == 5'(K * K)) bias_f <= f_d;
    end
  end

  // MAC, bias, ReLU
  logic                    mac_v, b_v, r_v;
  logic signed [ACC_W-1:0] mac_out;
  logic signed [OUT_W-1:0] plus_b, conv_out;

  mac_block #(.A_W(IN_W), .B_W(8), .N_TERMS(K * K), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .in_valid(v_d), .img_in(img_q), .wb_in(w_q), .k_elm(k_d),
    .mac_out, .out_valid(mac_v)
  );

  bias_add #(.IN_W(ACC_W), .OUT_W(OUT_W), .FRAC(cnn_pkg::FRAC)) u_bias (
    .clk, .rst_n, .in_valid(mac_v), .acc(mac_out), .bias(BIAS[8*bias_f +: 8]),
    .out_valid(b_v), .result(plus_b)
  );

  relu #(.W(OUT_W)) u_relu (
    .clk, .rst_n, .in_valid(b_v), .d(plus_b), .out_valid(r_v), .q(conv_out)
  );

  // FIFO and RAM controller
  logic             f_empty, f_full, f_rd;
  logic [OUT_W-1:0] f_q;

  sync_fifo #(.W(OUT_W), .DEPTH(8)) u_fifo (
    .clk, .rst_n, .aclr(start), .wrreq(r_v), .data(conv_out), .rdreq(f_rd),
    .q(f_q), .empty(f_empty), .full(f_full)
  );

  fifo_ram_writer #(.N(N_OUT), .W(OUT_W)) u_wr (
    .clk, .rst_n, .start, .fifo_empty(f_empty), .fifo_q(f_q), .rdreq(f_rd),
    .wr_en(ram_wren), .wr_addr(ram_wraddr), .wr_data(ram_data), .done
  );
endmodule
