// tb_layer_controller: walks the controller through all six states, checks
// the one-hot enables and the state output, that done of a layer other than
// the current one does not move it, and that CLASS is final.
module tb_layer_controller;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NLAYERS-1:0] done_i = '0, enable_o;
  layer_state_e state_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  layer_controller dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(int s);
    checks++;
    if (int'(state_o) != s || enable_o != NLAYERS'(1 << s)) begin
      failures++; $display("state=%0d en=%b expected %0d", state_o, enable_o, s);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NLAYERS; s++) begin
      // several idle cycles, and a done of another layer, must not advance
      repeat (3) @(negedge clk);
      expect_state(s);
      done_i = NLAYERS'(1 << ((s + 2) % NLAYERS));
      @(negedge clk);
      expect_state(s);
      done_i = NLAYERS'(1 << s);
      @(negedge clk);
      done_i = '0;
      expect_state(s < NLAYERS - 1 ? s + 1 : s);
    end
    done_i = '1;
    repeat (5) @(negedge clk);
    expect_state(5);
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_state(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
