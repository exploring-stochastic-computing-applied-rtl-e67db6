// tb_dense_layer: a reduced dense layer (3 neurons, 32 inputs, 8 weights per
// neuron reused every 8 inputs, 16-bit inputs, 19-bit outputs, per-neuron
// biases) with random data in testbench memories. Each written value must be
//   clamp19(floor(sum_j p[j]*w[n*8 + j%8] / 32) + b[n]),
// in neuron order, and the layer must take one cycle per term plus at most 8.
// Forty runs with fresh data are made by lowering and raising enable; the
// first drives every sum into the positive saturation limit.
module tb_dense_layer;
  localparam int NI = 32, NW = 8, NO = 3, NTRIAL = 40;
  logic clk = 0, rst_n = 0, enable = 0, done;
  logic [4:0] img_addr;
  logic img_rden;
  logic [15:0] img_q;
  logic [4:0] w_addr;
  logic w_rden;
  logic [7:0] w_q;
  logic ram_wren;
  logic [1:0] ram_wraddr;
  logic [18:0] ram_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam logic [23:0] BIASES = {8'd100, -8'sd128, 8'd5};

  dense_layer #(.N_IN(NI), .N_W(NW), .N_OUT(NO), .IN_W(16), .OUT_W(19), .BIAS(BIASES)) dut (.*);

  logic signed [15:0] img [NI];
  logic signed [7:0]  wts [NO*NW];
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
    int exp [NO];
    int n_sat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTRIAL; t++) begin
      automatic int n_wr = 0, cyc = 0;
      // Trial 0 uses the largest inputs to reach the positive saturation
      // limit; later trials mix signs and magnitudes.
      foreach (img[i]) img[i] = (t == 0) ? 16'sd32767 : (t % 3 == 1) ? 16'($urandom % 30000) : 16'($urandom);
      foreach (wts[i]) wts[i] = (t == 0) ? 8'sd127 : 8'($urandom);
      for (int n = 0; n < NO; n++) begin
        automatic longint s = 0;
        automatic int v;
        for (int j = 0; j < NI; j++) s += longint'(img[j]) * longint'(wts[n*NW + j%NW]);
        v = (s >= 0) ? int'(s / 32) : -int'((-s + 31) / 32);
        v += int'(signed'(BIASES[8*n +: 8]));
        if (v > 262143) begin v = 262143; n_sat++; end
        if (v < -262144) begin v = -262144; n_sat++; end
        exp[n] = v;
      end
      @(negedge clk);
      enable = 1;
      @(negedge clk);
      cyc++;
      checks++; if (done) begin failures++; $display("done not cleared by the new start"); end
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (ram_wren) begin
          checks++;
          if (n_wr >= NO || int'(ram_wraddr) != n_wr || int'(signed'(ram_data)) != exp[n_wr]) begin
            failures++; $display("trial %0d neuron %0d: %0d exp %0d", t, n_wr, signed'(ram_data), exp[n_wr % NO]);
          end
          n_wr++;
        end
      end
      checks++; if (n_wr != NO) failures++;
      checks++; if (cyc < NI * NO || cyc > NI * NO + 8) begin failures++; $display("cycles %0d", cyc); end
      if (t == 0) $display("layer cycles %0d", cyc);
      enable = 0;
      @(negedge clk);
    end
    checks++; if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
