// tb_sto2bin: feeds random bitstreams with random enable gaps and compares the
// ones and zeros counters with counts kept by the testbench; checks clear.
module tb_sto2bin;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bit_i = 0;
  logic [8:0] ones, zeros;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sto2bin #(.CNT_W(9)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      automatic int n1 = 0, n0 = 0;
      clr = 1; @(posedge clk); #1; clr = 0;
      checks++; if (ones != 0 || zeros != 0) failures++;
      for (int i = 0; i < 300; i++) begin
        en = ($urandom % 4) != 0;
        bit_i = ($urandom % 8) < run * 2 + 1;
        if (en) begin if (bit_i) n1++; else n0++; end
        @(posedge clk); #1;
        checks++;
        if (ones != 9'(n1) || zeros != 9'(n0)) begin
          failures++; $display("ones=%0d/%0d zeros=%0d/%0d", ones, n1, zeros, n0);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
