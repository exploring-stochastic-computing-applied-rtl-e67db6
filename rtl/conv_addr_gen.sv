// conv_addr_gen: address generator of a convolutional layer (C1 or C3).
//
// For every output pixel it issues the 25 addresses of a 5x5 window of the
// input maps (five consecutive addresses, then a jump to the next row, i.e.
// IMG_W-5 further) together with the matching weight addresses, then spends
// one idle cycle moving to the next window: 26 cycles per output. Loop order,
// outermost first: input channel, filter, output row, output column. Channel
// ch starts at ch*IMG_W*IMG_W in the input memory; the 25 weights of filter f
// of channel ch start at (ch*N_F+f)*25. Each channel is convolved separately
// with its own N_F filters, so C3 makes 4x4 = 16 maps. The address pattern,
// the start addresses and the per-channel filtering follow the document; the
// loop order over filters and the idle cycle are this design's choices, the
// latter matching the document's cycle counts.
//
// Interface: a one-cycle start begins a pass; while rd_en is high, addr_img /
// addr_w are valid, k_elm (1..25) numbers the term and f_idx selects the
// bias. busy falls after the last idle cycle.
module conv_addr_gen #(
  parameter  int unsigned IMG_W = 28,
  parameter  int unsigned N_CH  = 1,
  parameter  int unsigned N_F   = 4,
  parameter  int unsigned K     = 5,
  localparam int unsigned OUT_SIDE = IMG_W - K + 1,
  localparam int unsigned IA_W  = $clog2(N_CH * IMG_W * IMG_W),
  localparam int unsigned WA_W  = $clog2(N_CH * N_F * K * K),
  localparam int unsigned F_W   = (N_F > 1) ? $clog2(N_F) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [IA_W-1:0] addr_img,
  output logic [WA_W-1:0] addr_w,
  output logic            rd_en,
  output logic [4:0]      k_elm,
  output logic [F_W-1:0]  f_idx,
  output logic            busy
);
  localparam int unsigned C_W = $clog2(IMG_W);

  logic           gap;
  logic [C_W-1:0] kx, ky, ox, oy;
  logic [7:0]     ch, f;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      gap  <= 1'b0;
      {kx, ky, ox, oy} <= '0;
      ch <= '0;
      f  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      gap  <= 1'b0;
      {kx, ky, ox, oy} <= '0;
      ch <= '0;
      f  <= '0;
    end else if (busy) begin
      if (!gap) begin
        // walk the 5x5 window
        if (kx == C_W'(K - 1)) begin
          kx <= '0;
          if (ky == C_W'(K - 1)) begin
            ky  <= '0;
            gap <= 1'b1;
          end else begin
            ky <= ky + 1'b1;
          end
        end else begin
          kx <= kx + 1'b1;
        end
      end else begin
        // idle cycle: move to the next window
        gap <= 1'b0;
        if (ox == C_W'(OUT_SIDE - 1)) begin
          ox <= '0;
          if (oy == C_W'(OUT_SIDE - 1)) begin
            oy <= '0;
            if (f == 8'(N_F - 1)) begin
              f <= '0;
              if (ch == 8'(N_CH - 1)) begin
                ch   <= '0;
                busy <= 1'b0;
              end else begin
                ch <= ch + 1'b1;
              end
            end else begin
              f <= f + 1'b1;
            end
          end else begin
            oy <= oy + 1'b1;
          end
        end else begin
          ox <= ox + 1'b1;
        end
      end
    end
  end

  always_comb begin
    addr_img = IA_W'(ch * (IMG_W * IMG_W) + (32'(oy) + 32'(ky)) * IMG_W + 32'(ox) + 32'(kx));
    addr_w   = WA_W'((32'(ch) * N_F + 32'(f)) * (K * K) + 32'(ky) * K + 32'(kx));
    k_elm    = 5'(32'(ky) * K + 32'(kx) + 1);
    f_idx    = F_W'(f);
    rd_en    = busy && !gap;
  end
endmodule
