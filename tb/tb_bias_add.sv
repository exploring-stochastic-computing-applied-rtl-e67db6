// tb_bias_add: random Q.10 sums and Q2.5 biases, including values that
// saturate both ways; the result must equal floor(acc/32)+bias clamped to the
// signed 13-bit range, one clock after in_valid.
module tb_bias_add;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [20:0] acc;
  logic signed [7:0] bias;
  logic out_valid;
  logic signed [12:0] result;
  int checks = 0, failures = 0, n_sat = 0;
  always #5 clk = ~clk;

  bias_add #(.IN_W(21), .OUT_W(13), .FRAC(5)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int e;
      acc  = 21'($urandom);
      if (i % 2) acc = acc >>> 6;
      bias = 8'($urandom);
      in_valid = 1;
      e = (acc >= 0) ? int'(acc) / 32 : -((-int'(acc) + 31) / 32);
      e += int'(bias);
      if (e > 4095)  begin e = 4095;  n_sat++; end
      if (e < -4096) begin e = -4096; n_sat++; end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(result) != e) begin
        failures++; if (failures < 10) $display("acc=%0d bias=%0d got %0d exp %0d", acc, bias, result, e);
      end
    end
    @(negedge clk);
    checks++; if (out_valid) failures++;
    checks++; if (n_sat < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
