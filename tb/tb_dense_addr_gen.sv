// tb_dense_addr_gen: compares the D6 address sequence with a loop model at a
// reduced size (3 neurons, 16 inputs, 4 weights per neuron) and at full size
// checks the neuron weight start addresses 0x000, 0x040, ... 0x240, the
// weight wrap every 64 inputs, and 2560 terms in 2560 cycles.
module tb_dense_addr_gen;
  logic clk = 0, rst_n = 0, start = 0, start2 = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0] ai; logic [3:0] aw; logic rd, busy; logic [4:0] cnt; logic [1:0] ni;
  dense_addr_gen #(.N_IN(16), .N_W(4), .N_OUT(3)) dut (
    .clk, .rst_n, .start, .addr_img(ai), .addr_w(aw), .rd_en(rd), .counter(cnt), .n_idx(ni), .busy);

  logic [7:0] fi; logic [9:0] fw; logic frd, fbusy; logic [8:0] fc; logic [3:0] fn;
  dense_addr_gen dut_full (
    .clk, .rst_n, .start(start2), .addr_img(fi), .addr_w(fw), .rd_en(frd), .counter(fc), .n_idx(fn), .busy(fbusy));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (!rd || int'(ai) != j || int'(aw) != k * 4 + j % 4 || int'(cnt) != j + 1 || int'(ni) != k) begin
          failures++; if (failures < 10) $display("k=%0d j=%0d: %0d %0d %0d %0d", k, j, ai, aw, cnt, ni);
        end
        @(negedge clk);
      end
    checks++; if (busy || rd) failures++;

    @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
    while (fbusy) begin
      if (fi == 8'd0) begin
        checks++; if (int'(fw) != int'(fn) * 'h40) begin failures++; $display("neuron %0d starts %h", fn, fw); end
      end
      if (fi == 8'd64 || fi == 8'd128) begin
        checks++; if (int'(fw) != int'(fn) * 'h40) failures++;
      end
      n++;
      @(negedge clk);
    end
    checks++; if (n != 2560) begin failures++; $display("full terms %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
