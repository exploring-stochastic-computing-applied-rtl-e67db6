// tb_fifo_ram_writer: a behavioural FIFO in the testbench receives 40 words
// at random times; the writer must read each once, write it at the next
// sequential address one clock after the read, never read an empty FIFO,
// raise done after exactly N words, and restart from address 0 on start.
module tb_fifo_ram_writer;
  logic clk = 0, rst_n = 0, start = 0, fifo_empty;
  logic [12:0] fifo_q = '0, wr_data;
  logic rdreq, wr_en, done;
  logic [5:0] wr_addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fifo_ram_writer #(.N(40), .W(13)) dut (.*);

  logic [12:0] fifo[$];
  logic [12:0] sent[$];
  assign fifo_empty = (fifo.size() == 0);
  always_ff @(posedge clk) if (rdreq) fifo_q <= fifo.pop_front();

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      automatic int n_wr = 0, pushed = 0;
      sent.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) begin
        if (pushed < 40 && ($urandom % 3) == 0) begin
          automatic logic [12:0] v = 13'($urandom);
          fifo.push_back(v); sent.push_back(v); pushed++;
        end
        @(negedge clk);
        if (wr_en) begin
          checks++;
          if (int'(wr_addr) != n_wr || wr_data != sent[n_wr]) begin
            failures++; $display("write %0d: addr %0d data %0d", n_wr, wr_addr, wr_data);
          end
          n_wr++;
        end
        if (n_wr > 45) break;
      end
      checks++; if (n_wr != 40) begin failures++; $display("writes %0d", n_wr); end
      repeat (3) @(negedge clk);
      checks++; if (!done || wr_en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rdreq && fifo_empty) begin failures++; $display("read of empty FIFO"); end
endmodule
