// tb_sc_conversion: binary-to-stochastic conversion error against bitstream
// length. The multiplier at its default parameters is run with y = 255, whose
// stream is all ones, so the product stream is the stream of x alone. For
// x/255 = 4, 51, 127, 204 and 251 (0.0157 .. 0.9843) the running ones count
// is sampled after every 8 bits and at 255 bits; each sample is compared
// with a model of the LFSR and comparator, and the absolute error of the
// estimate ones/length is printed per length. After the full 255-bit LFSR
// period the estimate must be exact.
module tb_sc_conversion;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] x, y, ones, zeros;
  logic done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_mult dut (.*);

  function automatic logic [7:0] step(logic [7:0] s);
    return {s[4] ^ s[3] ^ s[2] ^ s[0], s[7:1]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] xs [5] = '{8'd4, 8'd51, 8'd127, 8'd204, 8'd251};
    real err [5][33];
    repeat (2) @(negedge clk);
    rst_n = 1;
    y = 8'd255;
    foreach (xs[v]) begin
      automatic logic [7:0] r = 8'd59;
      automatic int m = 0;
      x = xs[v];
      start = 1; @(negedge clk); start = 0;
      for (int n = 1; n <= 255; n++) begin
        m += int'(x >= r);
        r = step(r);
        @(negedge clk);
        if (n % 8 == 0 || n == 255) begin
          checks++;
          if (int'(ones) != m || int'(ones) + int'(zeros) != n) begin
            failures++; $display("x=%0d n=%0d ones=%0d exp %0d", x, n, ones, m);
          end
          err[v][n == 255 ? 32 : n / 8] = real'(ones) / real'(n) - real'(x) / 255.0;
          if (err[v][n == 255 ? 32 : n / 8] < 0) err[v][n == 255 ? 32 : n / 8] = -err[v][n == 255 ? 32 : n / 8];
        end
      end
      checks++; if (int'(ones) != int'(x)) begin failures++; $display("x=%0d: %0d ones in 255 bits", x, ones); end
    end
    $display("length  |error| for 0.0157 0.2000 0.4980 0.8000 0.9843");
    for (int k = 1; k <= 31; k += 3)
      $display("%6d  %.4f %.4f %.4f %.4f %.4f", k * 8, err[0][k], err[1][k], err[2][k], err[3][k], err[4][k]);
    $display("%6d  %.4f %.4f %.4f %.4f %.4f", 255, err[0][32], err[1][32], err[2][32], err[3][32], err[4][32]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
