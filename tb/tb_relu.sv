// tb_relu: random signed inputs; q must be the input if non-negative and 0
// otherwise, one clock after in_valid.
module tb_relu;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [12:0] d, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  relu #(.W(13)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      d = 13'($urandom);
      if (i == 0) d = 13'h1FED;  // -19
      if (i == 1) d = 13'd2;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || q != ((d < 0) ? 13'sd0 : d)) begin failures++; $display("d=%0d q=%0d", d, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
