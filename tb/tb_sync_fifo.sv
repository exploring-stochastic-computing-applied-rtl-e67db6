// tb_sync_fifo: random writes and reads (never past full or empty) compared
// with a queue model; checks data order, the empty and full flags, and aclr.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, aclr = 0, wrreq = 0, rdreq = 0;
  logic [12:0] data, q;
  logic empty, full;
  int checks = 0, failures = 0, n_full = 0;
  always #5 clk = ~clk;

  sync_fifo #(.W(13), .DEPTH(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] model[$];
    logic [12:0] exp_q;
    logic check_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 8)) begin
        failures++; $display("flags e=%b f=%b size=%0d", empty, full, model.size());
      end
      if (full) n_full++;
      wrreq = !full && (($urandom % 100) < ((i / 500) % 2 ? 70 : 35));
      rdreq = !empty && (($urandom % 100) < 50);
      data = 13'($urandom);
      if (rdreq) exp_q = model.pop_front();
      if (wrreq) model.push_back(data);
      check_q = rdreq;
      @(negedge clk);
      if (check_q) begin checks++; if (q != exp_q) begin failures++; $display("q=%0d exp %0d", q, exp_q); end end
    end
    wrreq = 0; rdreq = 0;
    aclr = 1; @(negedge clk); aclr = 0;
    checks++; if (!empty) failures++;
    checks++; if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
