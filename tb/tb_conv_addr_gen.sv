// tb_conv_addr_gen: runs the generator with 2 channels of 8x8 and 2 filters
// and compares every issued address, k_elm and filter index with a loop
// model (channel, filter, row, column, 5x5 window), then checks the total of
// 26 cycles per output. A second run at C1 size checks the first addresses
// against the document's printed pattern (0x000..0x004, 0x01C..) and the
// weight start addresses 0x00, 0x19, 0x32, 0x4B.
module tb_conv_addr_gen;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int IW = 8, NC = 2, NF = 2, OS = IW - 4;
  logic [$clog2(NC*IW*IW)-1:0] addr_img;
  logic [$clog2(NC*NF*25)-1:0] addr_w;
  logic rd_en, busy;
  logic [4:0] k_elm;
  logic [0:0] f_idx;

  conv_addr_gen #(.IMG_W(IW), .N_CH(NC), .N_F(NF)) dut (.*);

  logic [9:0] a1_img; logic [6:0] a1_w; logic rd1, busy1; logic [4:0] k1; logic [1:0] f1;
  logic start1 = 0;
  conv_addr_gen dut_c1 (.clk, .rst_n, .start(start1), .addr_img(a1_img), .addr_w(a1_w),
                        .rd_en(rd1), .k_elm(k1), .f_idx(f1), .busy(busy1));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_img[$], exp_w[$], exp_k[$], exp_f[$];
    int n = 0, cyc = 0;
    for (int c = 0; c < NC; c++)
      for (int f = 0; f < NF; f++)
        for (int oy = 0; oy < OS; oy++)
          for (int ox = 0; ox < OS; ox++)
            for (int ky = 0; ky < 5; ky++)
              for (int kx = 0; kx < 5; kx++) begin
                exp_img.push_back(c * IW * IW + (oy + ky) * IW + ox + kx);
                exp_w.push_back((c * NF + f) * 25 + ky * 5 + kx);
                exp_k.push_back(ky * 5 + kx + 1);
                exp_f.push_back(f);
              end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) begin
      if (rd_en) begin
        checks++;
        if (n >= exp_img.size() || int'(addr_img) != exp_img[n] || int'(addr_w) != exp_w[n] ||
            int'(k_elm) != exp_k[n] || int'(f_idx) != exp_f[n]) begin
          failures++;
          if (failures < 10) $display("term %0d: img %0d w %0d k %0d f %0d", n, addr_img, addr_w, k_elm, f_idx);
        end
        n++;
      end
      cyc++;
      @(negedge clk);
    end
    checks++; if (n != exp_img.size()) begin failures++; $display("terms %0d", n); end
    checks++; if (cyc != NC * NF * OS * OS * 26) begin failures++; $display("cycles %0d", cyc); end

    // C1 size: printed address pattern
    @(negedge clk); start1 = 1; @(negedge clk); start1 = 0;
    begin
      int first[10] = '{0, 1, 2, 3, 4, 28, 29, 30, 31, 32};
      for (int i = 0; i < 10; i++) begin
        checks++; if (int'(a1_img) != first[i] || !rd1) failures++;
        @(negedge clk);
      end
    end
    begin
      int wstart[4] = '{0, 0, 0, 0};
      int f_seen = 0;
      while (busy1) begin
        if (rd1 && k1 == 5'd1) wstart[f1] = int'(a1_w);
        @(negedge clk);
      end
      checks++; if (wstart[0] != 'h00 || wstart[1] != 'h19 || wstart[2] != 'h32 || wstart[3] != 'h4B) begin
        failures++; $display("weight starts %h %h %h %h", wstart[0], wstart[1], wstart[2], wstart[3]);
      end
      if (f_seen != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
