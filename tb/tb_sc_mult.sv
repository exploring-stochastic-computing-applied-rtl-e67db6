// tb_sc_mult: runs the stochastic multiplier on the grid x, y in
// {0.1 .. 0.9} (as round(v*255)) and on the end points. For each case it
// checks the exact ones count against a model of the two LFSRs, the
// comparators and the AND gate, that ones+zeros equals the 255-bit length,
// that done comes exactly 255 cycles after start, and that the result is
// within 0.05 of x*y.
module tb_sc_mult;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] x, y;
  logic [7:0] ones, zeros;
  logic done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_mult dut (.*);

  function automatic logic [7:0] step(logic [7:0] s);
    return {s[4] ^ s[3] ^ s[2] ^ s[0], s[7:1]};
  endfunction

  function automatic int model(logic [7:0] xa, logic [7:0] yb);
    logic [7:0] ra = 8'd59, rb = 8'd139;
    int n = 0;
    for (int i = 0; i < 255; i++) begin
      n += int'((xa >= ra) && (yb >= rb));
      ra = step(ra);
      rb = step(rb);
    end
    return n;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [7:0] xv, input logic [7:0] yv);
    int cyc = 0, exp;
    real err;
    x = xv; y = yv;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    exp = model(xv, yv);
    checks++; if (int'(ones) != exp) begin failures++; $display("x=%0d y=%0d ones=%0d exp=%0d", xv, yv, ones, exp); end
    checks++; if (int'(ones) + int'(zeros) != 255) failures++;
    checks++; if (cyc != 255) begin failures++; $display("latency %0d", cyc); end
    err = real'(ones) / 255.0 - (real'(xv) / 255.0) * (real'(yv) / 255.0);
    checks++; if (err > 0.05 || err < -0.05) begin failures++; $display("x=%0d y=%0d err=%f", xv, yv, err); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 1; i <= 9; i++)
      for (int j = 1; j <= 9; j++)
        run(8'($rtoi(i * 25.5 + 0.5)), 8'($rtoi(j * 25.5 + 0.5)));
    run(8'd0, 8'd200);
    run(8'd255, 8'd255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
