// tb_mac_block: feeds random signed sums of 5 terms with random idle cycles,
// checks every finished sum against one computed in the testbench, that
// out_valid comes one clock after the last term, and that mac_out keeps the
// previous result while the next sum is accumulated (two accumulators).
module tb_mac_block;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] img_in, wb_in;
  logic [2:0] k_elm;
  logic signed [18:0] mac_out;
  logic out_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mac_block #(.A_W(8), .B_W(8), .N_TERMS(5)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev = 0;
    logic have_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      automatic int sum = 0;
      for (int k = 1; k <= 5; k++) begin
        while (($urandom % 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
          if (have_prev) begin checks++; if (int'(mac_out) != prev) failures++; end
        end
        in_valid = 1;
        img_in = 8'($urandom);
        wb_in  = 8'($urandom);
        if (s == 0) begin img_in = -8'sd128; wb_in = -8'sd128; end
        k_elm  = 3'(k);
        sum += int'(img_in) * int'(wb_in);
        @(negedge clk);
        if (k < 5 && have_prev) begin
          checks++; if (int'(mac_out) != prev) begin failures++; $display("held result lost"); end
        end
      end
      in_valid = 0;
      checks++;
      if (!out_valid || int'(mac_out) != sum) begin
        failures++; if (failures < 10) $display("sum %0d: got %0d exp %0d v=%b", s, mac_out, sum, out_valid);
      end
      prev = sum; have_prev = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
