// tb_sync_rom: loads a 16-word ROM from tb/tb_sync_rom.hex and reads every
// address in random order; q must hold the listed word one clock after a read
// and keep its value while rden is low.
module tb_sync_rom;
  logic clk = 0, rden = 0;
  logic [3:0] addr;
  logic [7:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sync_rom #(.W(8), .DEPTH(16), .INIT_FILE("tb/tb_sync_rom.hex")) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp [16] = '{8'h5a, 8'h13, 8'hff, 8'h00, 8'h80, 8'h7f, 8'h3c, 8'hc4,
                             8'h01, 8'hfe, 8'h20, 8'he0, 8'h11, 8'hee, 8'h42, 8'hbd};
    repeat (2) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      addr = 4'($urandom);
      rden = 1;
      @(negedge clk);
      rden = 0;
      checks++; if (q != exp[addr]) begin failures++; $display("addr %0d q %h", addr, q); end
      addr = addr + 4'd1;
      @(negedge clk);
      checks++; if (q != exp[addr - 4'd1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
