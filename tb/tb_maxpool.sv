// tb_maxpool: random windows of four signed pixels, delivered in slot order
// 0..3 with random gaps; the output must be the largest of the four and
// appear only after slot 3.
module tb_maxpool;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] mp_cont;
  logic signed [12:0] d, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  maxpool #(.W(13)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      automatic int mx = -100000;
      for (int s = 0; s < 4; s++) begin
        while (($urandom % 4) == 0) begin in_valid = 0; @(negedge clk); checks++; if (out_valid) failures++; end
        d = 13'($urandom);
        if (w % 3 == 0) d = 13'(d % 300);
        if (int'(d) > mx) mx = int'(d);
        mp_cont = 2'(s);
        in_valid = 1;
        @(negedge clk);
        if (s < 3) begin checks++; if (out_valid) failures++; end
      end
      in_valid = 0;
      checks++;
      if (!out_valid || int'(q) != mx) begin failures++; if (failures < 10) $display("w=%0d q=%0d exp %0d", w, q, mx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
