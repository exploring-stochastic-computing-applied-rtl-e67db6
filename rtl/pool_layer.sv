// pool_layer: one 2x2 max-pool layer (S2, or S4 which also serves as F5).
//
// Datapath: address generator -> input RAM (outside, one-clock read) ->
// max-pool block -> FIFO -> RAM controller -> output RAM (outside). Each
// output is the largest of the four pixels of a 2x2 window; outputs are
// written in order map, row, column, which for S4 is already the flattened
// vector the dense layer reads. This chain follows the document.
//
// Timing: starts when enable rises; one input read per cycle, so 4 cycles per
// output plus a few cycles of pipeline; done then stays high until enable
// next rises.
module pool_layer #(
  parameter  int unsigned IN_W   = 24,
  parameter  int unsigned N_MAPS = 4,
  parameter  int unsigned W      = 13,
  localparam int unsigned N_OUT  = N_MAPS * (IN_W / 2) * (IN_W / 2),
  localparam int unsigned IA_W   = $clog2(N_MAPS * IN_W * IN_W),
  localparam int unsigned OA_W   = $clog2(N_OUT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  output logic            done,
  output logic [IA_W-1:0] rd_addr,
  output logic            rden,
  input  logic [W-1:0]    rd_q,
  output logic            ram_wren,
  output logic [OA_W-1:0] ram_wraddr,
  output logic [W-1:0]    ram_data
);
  logic en_q, start;
  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= enable;
  end
  assign start = enable && !en_q;

  logic       busy;
  logic [1:0] mp_cont;

  pool_addr_gen #(.IN_W(IN_W), .N_MAPS(N_MAPS)) u_agen (
    .clk, .rst_n, .start, .addr(rd_addr), .rd_en(rden), .mp_cont, .busy
  );

  logic       v_d;
  logic [1:0] mp_d;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d  <= 1'b0;
      mp_d <= '0;
    end else begin
      v_d  <= rden;
      mp_d <= mp_cont;
    end
  end

  logic                m_v;
  logic signed [W-1:0] m_q;

  maxpool #(.W(W)) u_max (
    .clk, .rst_n, .in_valid(v_d), .mp_cont(mp_d), .d(rd_q), .out_valid(m_v), .q(m_q)
  );

  logic         f_empty, f_full, f_rd;
  logic [W-1:0] f_q;

  sync_fifo #(.W(W), .DEPTH(8)) u_fifo (
    .clk, .rst_n, .aclr(start), .wrreq(m_v), .data(m_q), .rdreq(f_rd),
    .q(f_q), .empty(f_empty), .full(f_full)
  );

  fifo_ram_writer #(.N(N_OUT), .W(W)) u_wr (
    .clk, .rst_n, .start, .fifo_empty(f_empty), .fifo_q(f_q), .rdreq(f_rd),
    .wr_en(ram_wren), .wr_addr(ram_wraddr), .wr_data(ram_data), .done
  );
endmodule
