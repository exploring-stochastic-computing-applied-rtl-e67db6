// tb_conv_layer: a C3-like layer at reduced size (2 channels of 8x8 input,
// 2 filters per channel, 13-bit input, 16-bit output, biases -20 and +37 in
// Q2.5) with random signed inputs and weights held in testbench memories
// with a one-clock read. Every RAM write is compared, in order, with a
// direct computation: for map (ch, f) and output (y, x),
//   relu(clamp16(floor(sum(in*w)/32) + bias[f])).
// Also checks that ReLU clipped some outputs, that done follows the last
// write, and the layer time: 26 cycles per output plus at most 8.
module tb_conv_layer;
  localparam int IW = 8, NC = 2, NF = 2, OS = IW - 4, NOUT = NC * NF * OS * OS;
  logic clk = 0, rst_n = 0, enable = 0, done;
  logic [$clog2(NC*IW*IW)-1:0] img_addr;
  logic img_rden;
  logic [12:0] img_q;
  logic [$clog2(NC*NF*25)-1:0] w_addr;
  logic w_rden;
  logic [7:0] w_q;
  logic ram_wren;
  logic [$clog2(NOUT)-1:0] ram_wraddr;
  logic [15:0] ram_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] BIASES = {8'd37, -8'sd20};  // filter 1, filter 0

  conv_layer #(.IMG_W(IW), .N_CH(NC), .N_F(NF), .IN_W(13), .OUT_W(16), .BIAS(BIASES)) dut (.*);

  logic signed [12:0] img [NC*IW*IW];
  logic signed [7:0]  wts [NC*NF*25];
  always_ff @(posedge clk) begin
    if (img_rden) img_q <= img[img_addr];
    if (w_rden)   w_q   <= wts[w_addr];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [NOUT];
    int n_wr = 0, cyc = 0, n_clip = 0;
    foreach (img[i]) img[i] = 13'(int'($urandom % 1200) - 200);
    foreach (wts[i]) wts[i] = 8'($urandom);
    for (int c = 0; c < NC; c++)
      for (int f = 0; f < NF; f++)
        for (int y = 0; y < OS; y++)
          for (int x = 0; x < OS; x++) begin
            automatic int s = 0, v;
            for (int ky = 0; ky < 5; ky++)
              for (int kx = 0; kx < 5; kx++)
                s += int'(img[c*IW*IW + (y+ky)*IW + x+kx]) * int'(wts[(c*NF+f)*25 + ky*5 + kx]);
            v = (s >= 0) ? s / 32 : -((-s + 31) / 32);
            v += int'(signed'(BIASES[8*f +: 8]));
            if (v > 32767) v = 32767;
            if (v < -32768) v = -32768;
            if (v < 0) begin v = 0; n_clip++; end
            exp[((c*NF+f)*OS + y)*OS + x] = v;
          end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (ram_wren) begin
        checks++;
        if (int'(ram_wraddr) != n_wr || int'(signed'(ram_data)) != exp[n_wr]) begin
          failures++; if (failures < 10) $display("out %0d: addr %0d data %0d exp %0d", n_wr, ram_wraddr, signed'(ram_data), exp[n_wr]);
        end
        n_wr++;
      end
    end
    checks++; if (n_wr != NOUT) begin failures++; $display("writes %0d", n_wr); end
    checks++; if (cyc < NOUT * 26 || cyc > NOUT * 26 + 8) begin failures++; $display("cycles %0d", cyc); end
    checks++; if (n_clip == 0) begin failures++; $display("no ReLU clipping exercised"); end
    $display("layer cycles %0d for %0d outputs, %0d clipped by ReLU", cyc, NOUT, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
