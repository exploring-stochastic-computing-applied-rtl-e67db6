// tb_pool_addr_gen: compares the issued addresses and slot indices with a
// loop model for 2 maps of 6x6, checks one address per cycle, and checks the
// first eight S2-size addresses against the printed pattern 0x00, 0x01,
// 0x18, 0x19, 0x02, 0x03, 0x1A, 0x1B and the start of the next row pair 0x30.
module tb_pool_addr_gen;
  logic clk = 0, rst_n = 0, start = 0, start2 = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int IW = 6, NM = 2;
  logic [$clog2(NM*IW*IW)-1:0] addr;
  logic rd_en, busy;
  logic [1:0] mp_cont;
  pool_addr_gen #(.IN_W(IW), .N_MAPS(NM)) dut (.*);

  logic [11:0] a2; logic rd2, busy2; logic [1:0] mp2;
  pool_addr_gen dut_s2 (.clk, .rst_n, .start(start2), .addr(a2), .rd_en(rd2), .mp_cont(mp2), .busy(busy2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_a[$], exp_s[$];
    int n = 0, cyc = 0;
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < IW / 2; r++)
        for (int c = 0; c < IW / 2; c++)
          for (int s = 0; s < 4; s++) begin
            exp_a.push_back(m * IW * IW + (2 * r + s / 2) * IW + 2 * c + s % 2);
            exp_s.push_back(s);
          end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) begin
      checks++;
      if (!rd_en || n >= exp_a.size() || int'(addr) != exp_a[n] || int'(mp_cont) != exp_s[n]) begin
        failures++; if (failures < 10) $display("n=%0d addr=%0d slot=%0d", n, addr, mp_cont);
      end
      n++; cyc++;
      @(negedge clk);
    end
    checks++; if (n != NM * IW * IW) begin failures++; $display("reads %0d", n); end
    @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
    begin
      int pat[8] = '{'h00, 'h01, 'h18, 'h19, 'h02, 'h03, 'h1A, 'h1B};
      for (int i = 0; i < 8; i++) begin
        checks++; if (int'(a2) != pat[i]) begin failures++; $display("s2 %0d: %h", i, a2); end
        @(negedge clk);
      end
      repeat (48 - 8) @(negedge clk);
      checks++; if (a2 != 12'h30) begin failures++; $display("row pair start %h", a2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
