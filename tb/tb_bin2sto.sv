// tb_bin2sto: drives the converter for one full LFSR period per input value
// and checks that the number of ones equals the number of LFSR states not
// above a (a states out of 1..255), and bit-by-bit against a model.
module tb_bin2sto;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0] a;
  logic bit_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bin2sto #(.SEED(8'd139)) dut (.*);

  function automatic logic [7:0] step(logic [7:0] s);
    return {s[4] ^ s[3] ^ s[2] ^ s[0], s[7:1]};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] vals [6] = '{8'd0, 8'd4, 8'd51, 8'd127, 8'd204, 8'd255};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (vals[v]) begin
      automatic int ones = 0;
      automatic logic [7:0] m = 8'd139;
      a = vals[v];
      load = 1; @(posedge clk); #1; load = 0; en = 1;
      for (int i = 0; i < 255; i++) begin
        checks++; if (bit_o !== (a >= m)) failures++;
        ones += bit_o;
        @(posedge clk); #1;
        m = step(m);
      end
      en = 0;
      checks++;
      if (ones != int'(a)) begin failures++; $display("a=%0d ones=%0d", a, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
