// dense_layer: the fully connected layer D6.
//
// Datapath: address generator -> flattened input RAM and weight ROM (outside,
// one-clock read) -> MAC over N_IN terms -> bias adder -> FIFO -> RAM
// controller -> result RAM (outside). Neuron n's value is
//   sum over j of p[j] * w[n*N_W + (j mod N_W)], shifted back to Q.5, + b[n]
// with no activation. The N_IN = 256 inputs are four channels of 64 values
// and every channel uses the neuron's same 64 weights, as the document's
// address generator does. Biases are the parameter BIAS (8-bit Q2.5 per
// neuron, neuron n in bits [8n+7:8n]), zero by default because the trained
// values are not part of this design.
//
// Timing: starts when enable rises; one term per cycle (N_OUT*N_IN cycles)
// plus a few cycles of pipeline; done then stays high until enable next rises.
module dense_layer #(
  parameter  int unsigned N_IN  = 256,
  parameter  int unsigned N_W   = 64,
  parameter  int unsigned N_OUT = 10,
  parameter  int unsigned IN_W  = 16,
  parameter  int unsigned OUT_W = 19,
  parameter  logic [8*N_OUT-1:0] BIAS = '0,
  localparam int unsigned IA_W  = $clog2(N_IN),
  localparam int unsigned WA_W  = $clog2(N_OUT * N_W),
  localparam int unsigned OA_W  = $clog2(N_OUT),
  localparam int unsigned CT_W  = $clog2(N_IN + 1),
  localparam int unsigned ACC_W = IN_W + 8 + $clog2(N_IN)
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

  logic            rd_en, busy;
  logic [CT_W-1:0] counter;
  logic [OA_W-1:0] n_idx;

  dense_addr_gen #(.N_IN(N_IN), .N_W(N_W), .N_OUT(N_OUT)) u_agen (
    .clk, .rst_n, .start, .addr_img(img_addr), .addr_w(w_addr), .rd_en,
    .counter, .n_idx, .busy
  );
  assign img_rden = rd_en;
  assign w_rden   = rd_en;

  logic            v_d;
  logic [CT_W-1:0] c_d;
  logic [OA_W-1:0] n_d, bias_n;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d    <= 1'b0;
      c_d    <= '0;
      n_d    <= '0;
      bias_n <= '0;
    end else begin
      v_d <= rd_en;
      c_d <= counter;
      n_d <= n_idx;
      if (v_d && c_d == CT_W'(N_IN)) bias_n <= n_d;
    end
  end

  logic                    mac_v, b_v;
  logic signed [ACC_W-1:0] mac_out;
  logic signed [OUT_W-1:0] result;

  mac_block #(.A_W(IN_W), .B_W(8), .N_TERMS(N_IN), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .in_valid(v_d), .img_in(img_q), .wb_in(w_q), .k_elm(c_d),
    .mac_out, .out_valid(mac_v)
  );

  bias_add #(.IN_W(ACC_W), .OUT_W(OUT_W), .FRAC(cnn_pkg::FRAC)) u_add (
    .clk, .rst_n, .in_valid(mac_v), .acc(mac_out), .bias(BIAS[8*bias_n +: 8]),
    .out_valid(b_v), .result
  );

  logic             f_empty, f_full, f_rd;
  logic [OUT_W-1:0] f_q;

  sync_fifo #(.W(OUT_W), .DEPTH(8)) u_fifo (
    .clk, .rst_n, .aclr(start), .wrreq(b_v), .data(result), .rdreq(f_rd),
    .q(f_q), .empty(f_empty), .full(f_full)
  );

  fifo_ram_writer #(.N(N_OUT), .W(OUT_W)) u_wr (
    .clk, .rst_n, .start, .fifo_empty(f_empty), .fifo_q(f_q), .rdreq(f_rd),
    .wr_en(ram_wren), .wr_addr(ram_wraddr), .wr_data(ram_data), .done
  );
endmodule
