// tb_pool_layer: an S4-like layer at reduced size (3 maps of 6x6, 16-bit)
// with random values in a testbench RAM (one-clock read). Every write must be
// the maximum of its 2x2 window, in map/row/column order, and the layer must
// take 4 cycles per output plus at most 8.
module tb_pool_layer;
  localparam int IW = 6, NM = 3, NOUT = NM * (IW/2) * (IW/2);
  logic clk = 0, rst_n = 0, enable = 0, done;
  logic [$clog2(NM*IW*IW)-1:0] rd_addr;
  logic rden;
  logic [15:0] rd_q;
  logic ram_wren;
  logic [$clog2(NOUT)-1:0] ram_wraddr;
  logic [15:0] ram_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pool_layer #(.IN_W(IW), .N_MAPS(NM), .W(16)) dut (.*);

  logic signed [15:0] mem [NM*IW*IW];
  always_ff @(posedge clk) if (rden) rd_q <= mem[rd_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [NOUT];
    int n_wr = 0, cyc = 0;
    foreach (mem[i]) mem[i] = 16'($urandom);
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < IW/2; r++)
        for (int c = 0; c < IW/2; c++) begin
          automatic int mx = -100000;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              if (int'(mem[m*IW*IW + (2*r+dy)*IW + 2*c+dx]) > mx) mx = int'(mem[m*IW*IW + (2*r+dy)*IW + 2*c+dx]);
          exp[(m*(IW/2) + r)*(IW/2) + c] = mx;
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
          failures++; if (failures < 10) $display("out %0d: %0d exp %0d", n_wr, signed'(ram_data), exp[n_wr]);
        end
        n_wr++;
      end
    end
    checks++; if (n_wr != NOUT) failures++;
    checks++; if (cyc < NOUT * 4 || cyc > NOUT * 4 + 8) begin failures++; $display("cycles %0d", cyc); end
    $display("layer cycles %0d for %0d outputs", cyc, NOUT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
