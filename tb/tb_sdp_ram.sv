// tb_sdp_ram: random simultaneous writes and reads on a 64-word RAM compared
// with an array model; a read of the address being written returns the old
// word.
module tb_sdp_ram;
  logic clk = 0, wren = 0, rden = 0;
  logic [5:0] wraddress, rdaddress;
  logic [12:0] data, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sdp_ram #(.W(13), .DEPTH(64)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] model [64];
    logic [12:0] exp;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      wren = 1; wraddress = 6'(i); data = 13'($urandom); model[i] = data;
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      wren = ($urandom % 2) == 0;
      wraddress = 6'($urandom);
      data = 13'($urandom);
      rden = 1;
      rdaddress = (i % 5 == 0) ? wraddress : 6'($urandom);
      exp = model[rdaddress];
      if (wren) model[wraddress] = data;
      @(negedge clk);
      checks++; if (q != exp) begin failures++; if (failures < 10) $display("rd %0d q %0d exp %0d", rdaddress, q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
