// tb_classification: fills a 10-word testbench RAM (one-clock read) with
// random signed 19-bit values, raises enable, and checks that class_o is the
// one-hot position of the largest value (lowest index on a tie), data_out is
// that value, and done comes 12 clocks after enable. Repeated with enable
// dropped and raised again between runs, including ties and all-negative sets.
module tb_classification;
  logic clk = 0, rst_n = 0, enable = 0, rden, done;
  logic [3:0] rd_addr;
  logic signed [18:0] rd_q, data_out;
  logic [9:0] class_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  classification #(.N(10), .W(19)) dut (.*);

  logic signed [18:0] mem [10];
  always_ff @(posedge clk) if (rden) rd_q <= mem[rd_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      automatic int best = 0, cyc = 0;
      foreach (mem[i]) begin
        mem[i] = 19'($urandom);
        if (run % 4 == 1) mem[i] = 19'(int'($urandom % 8) - 4);    // many ties
        if (run % 4 == 2) mem[i] = -19'sd1 - 19'($urandom % 1000);  // all negative
      end
      for (int i = 1; i < 10; i++) if (mem[i] > mem[best]) best = i;
      enable = 1;
      while (!done && cyc < 50) begin @(negedge clk); cyc++; end
      checks++;
      if (class_o != 10'(1 << best) || data_out != mem[best]) begin
        failures++; $display("run %0d: class %b data %0d exp %0d / %0d", run, class_o, data_out, best, mem[best]);
      end
      checks++; if (cyc != 12) begin failures++; $display("latency %0d", cyc); end
      enable = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
