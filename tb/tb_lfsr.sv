// tb_lfsr: checks the 8-bit LFSR against an independent bit-level model of
// the x^8+x^6+x^5+x^4+1 Fibonacci register, its 255-state period, hold when
// en is low and reload on load.
module tb_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lfsr #(.SEED(8'd59)) dut (.*);

  function automatic logic [7:0] step(logic [7:0] s);
    logic [1:8] x;
    logic fb;
    for (int i = 1; i <= 8; i++) x[i] = s[8 - i];
    fb = x[4] ^ x[5] ^ x[6] ^ x[8];
    for (int i = 8; i >= 2; i--) x[i] = x[i - 1];
    x[1] = fb;
    for (int i = 1; i <= 8; i++) step[8 - i] = x[i];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m;
    bit seen [256];
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 checks++; if (q !== 8'd59) begin failures++; $display("seed %0d", q); end
    m = 8'd59;
    en = 1;
    period = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      m = step(m);
      checks++; if (q !== m) begin failures++; $display("step %0d q=%0d exp=%0d", i, q, m); end
      if (period == 0 && q == 8'd59) period = i + 1;
      seen[q] = 1;
    end
    checks++; if (period != 255) begin failures++; $display("period %0d", period); end
    begin automatic int n = 0; foreach (seen[i]) n += seen[i];
      checks++; if (n != 255 || seen[0]) begin failures++; $display("distinct %0d", n); end end
    en = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (q !== m) failures++;
    load = 1; @(posedge clk); #1; load = 0;
    checks++; if (q !== 8'd59) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
