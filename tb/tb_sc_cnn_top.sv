// tb_sc_cnn_top: full-size run of the top level with every parameter at its
// default. While the Modified LeNet-5 classifies one random image (biases at
// their default of zero), the stochastic multiplier next to it is run on a
// set of x, y pairs. Checks: every layer RAM, class_o and data_out against
// the reference model in cnn_ref.svh; the layer order and per-layer cycle
// counts (within 12 of 59909, 2306, 26627, 1030, 2572); each multiplier
// result against a model of its LFSRs, comparators and AND gate and within
// 0.05 of x*y; and that every mechanism (each layer hand-over, ReLU
// clipping, both MAC accumulators, max-pooling, classification, stochastic
// multiplication) happened.
module tb_sc_cnn_top;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] class_o;
  logic signed [18:0] data_out;
  logic [11:0] c1_count2304;
  logic [2:0] state;
  logic cnn_done;
  logic sc_start = 0;
  logic [7:0] sc_x = 0, sc_y = 0, sc_ones, sc_zeros;
  logic sc_done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_cnn_top dut (.*);

  `include "cnn_ref.svh"

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_trans = 0, n_clip = 0, n_acc0 = 0, n_acc1 = 0, n_pool = 0, n_mult = 0;
  int cyc_in [6] = '{0, 0, 0, 0, 0, 0};
  logic [2:0] prev_state = 3'd0;
  always @(posedge clk) if (rst_n) begin
    if (state != prev_state) begin
      n_trans++;
      if (state != prev_state + 3'd1) begin failures++; $display("bad transition %0d -> %0d", prev_state, state); end
    end
    prev_state <= state;
    if (!cnn_done) cyc_in[state]++;
    if (dut.u_cnn.u_c1.u_relu.in_valid && dut.u_cnn.u_c1.u_relu.d < 0) n_clip++;
    if (dut.u_cnn.u_c3.u_relu.in_valid && dut.u_cnn.u_c3.u_relu.d < 0) n_clip++;
    if (dut.u_cnn.u_c3.u_mac.out_valid) begin if (dut.u_cnn.u_c3.u_mac.out_sel) n_acc1++; else n_acc0++; end
    if (dut.u_cnn.u_s2.u_max.out_valid || dut.u_cnn.u_s4.u_max.out_valid) n_pool++;
  end

  function automatic logic [7:0] step(logic [7:0] s);
    return {s[4] ^ s[3] ^ s[2] ^ s[0], s[7:1]};
  endfunction

  function automatic int sc_model(logic [7:0] xa, logic [7:0] yb);
    logic [7:0] ra = 8'd59, rb = 8'd139;
    int n = 0;
    for (int i = 0; i < 255; i++) begin
      n += int'((xa >= ra) && (yb >= rb));
      ra = step(ra);
      rb = step(rb);
    end
    return n;
  endfunction

  task automatic cnt(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // stochastic multiplier, running while the CNN works
  initial begin
    logic [7:0] xs [5] = '{8'd4, 8'd51, 8'd127, 8'd204, 8'd251};   // 0.0157 .. 0.9843
    wait (rst_n);
    foreach (xs[i]) begin
      automatic int e;
      automatic real err;
      @(negedge clk);
      sc_x = xs[i]; sc_y = xs[4 - i];
      sc_start = 1; @(negedge clk); sc_start = 0;
      wait (sc_done); @(negedge clk);
      e = sc_model(sc_x, sc_y);
      checks++; if (int'(sc_ones) != e || int'(sc_ones) + int'(sc_zeros) != 255) begin failures++; $display("sc x=%0d y=%0d ones=%0d exp %0d", sc_x, sc_y, sc_ones, e); end
      err = real'(sc_ones) / 255.0 - real'(sc_x) * real'(sc_y) / 65025.0;
      checks++; if (err > 0.05 || err < -0.05) failures++;
      n_mult++;
    end
  end

  initial begin
    int paper [5] = '{59909, 2306, 26627, 1030, 2572};
    for (int i = 0; i < 784; i++) begin
      ref_img[i] = int'($urandom % 33);
      dut.u_cnn.u_rom_img.mem[i] = 8'(ref_img[i]);
    end
    for (int i = 0; i < 100; i++) begin ref_c1w[i] = int'($urandom % 64) - 30; dut.u_cnn.u_rom_c1w.mem[i] = 8'(ref_c1w[i]); end
    for (int i = 0; i < 400; i++) begin ref_c3w[i] = int'($urandom % 48) - 23; dut.u_cnn.u_rom_c3w.mem[i] = 8'(ref_c3w[i]); end
    for (int i = 0; i < 640; i++) begin ref_d6w[i] = int'($urandom % 32) - 16; dut.u_cnn.u_rom_d6w.mem[i] = 8'(ref_d6w[i]); end
    ref_b1 = '{0, 0, 0, 0};
    ref_b3 = '{0, 0, 0, 0};
    foreach (ref_b6[i]) ref_b6[i] = 0;
    ref_run();

    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (cnn_done);
    repeat (3) @(negedge clk);

    for (int i = 0; i < 2304; i++) begin checks++; if (int'(signed'(dut.u_cnn.u_ram_c1.mem[i])) != ref_c1[i]) failures++; end
    for (int i = 0; i < 576;  i++) begin checks++; if (int'(signed'(dut.u_cnn.u_ram_s2.mem[i])) != ref_s2[i]) failures++; end
    for (int i = 0; i < 1024; i++) begin checks++; if (int'(signed'(dut.u_cnn.u_ram_c3.mem[i])) != ref_c3[i]) failures++; end
    for (int i = 0; i < 256;  i++) begin checks++; if (int'(signed'(dut.u_cnn.u_ram_s4.mem[i])) != ref_s4[i]) failures++; end
    for (int i = 0; i < 10;   i++) begin checks++; if (int'(signed'(dut.u_cnn.u_ram_d6.mem[i])) != ref_d6[i]) begin failures++; $display("D6[%0d] %0d exp %0d", i, signed'(dut.u_cnn.u_ram_d6.mem[i]), ref_d6[i]); end end
    checks++;
    if (class_o != 10'(1 << ref_class) || int'(data_out) != ref_d6[ref_class]) begin
      failures++; $display("class_o %b data_out %0d, expected class %0d value %0d", class_o, data_out, ref_class, ref_d6[ref_class]);
    end
    checks++; if (state != 3'd5) failures++;

    $display("class %0d, score %0d", ref_class, ref_d6[ref_class]);
    $display("cycles per layer (this design / published):");
    for (int l = 0; l < 5; l++) begin
      $display("  layer %0d: %0d / %0d", l, cyc_in[l], paper[l]);
      checks++;
      if (cyc_in[l] < paper[l] - 12 || cyc_in[l] > paper[l] + 12) failures++;
    end
    $display("total clocks to class_o: %0d", cyc_in[0] + cyc_in[1] + cyc_in[2] + cyc_in[3] + cyc_in[4] + cyc_in[5]);
    $display("mechanisms:");
    cnt("layer hand-overs (of 5)", n_trans == 5 ? n_trans : 0);
    cnt("ReLU clipped (C1 and C3)", n_clip);
    cnt("C3 sums in MAC accumulator 0", n_acc0);
    cnt("C3 sums in MAC accumulator 1", n_acc1);
    cnt("max-pool windows", n_pool);
    cnt("classification done", int'(cnn_done));
    cnt("stochastic multiplications", n_mult == 5 ? n_mult : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
