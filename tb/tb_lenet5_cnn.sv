// tb_lenet5_cnn: end-to-end run of the Modified LeNet-5 at full size with
// non-zero biases. The image ROM and the three weight ROMs are filled with
// random values before reset is released; after the classification the
// contents of every layer RAM, data_out and the one-hot class_o are compared
// with the reference model in cnn_ref.svh. It also checks the controller's
// state order, the cycles spent in each layer against the per-layer cycle
// counts published for the reference implementation (59909, 2306, 26627,
// 1030, 2572 clocks; within 12), and counts that each mechanism happened:
// every layer hand-over, ReLU clipping in C1 and C3, both MAC accumulators in
// use, max-pool windows, bias addition and the final classification.
module tb_lenet5_cnn;
  import cnn_pkg::*;
  localparam logic [31:0] B1 = {8'd12, -8'sd9, 8'd3, -8'sd20};
  localparam logic [31:0] B3 = {-8'sd30, 8'd25, -8'sd4, 8'd7};
  localparam logic [79:0] B6 = {8'd10, -8'sd10, 8'd20, -8'sd20, 8'd30, -8'sd30, 8'd40, -8'sd40, 8'd50, -8'sd50};

  logic clk = 0, rst_n = 0;
  logic [9:0] class_o;
  logic signed [18:0] data_out;
  logic [11:0] c1_count2304;
  layer_state_e state;
  logic done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lenet5_cnn #(.C1_BIAS(B1), .C3_BIAS(B3), .D6_BIAS(B6)) dut (.*);

  `include "cnn_ref.svh"

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_trans = 0, n_clip1 = 0, n_clip3 = 0, n_acc0 = 0, n_acc1 = 0, n_pool = 0, n_bias = 0;
  int cyc_in [6] = '{0, 0, 0, 0, 0, 0};
  layer_state_e prev_state = CONV1;
  always @(posedge clk) if (rst_n) begin
    if (state != prev_state) begin
      n_trans++;
      if (int'(state) != int'(prev_state) + 1) begin failures++; $display("bad transition %0d -> %0d", prev_state, state); end
    end
    prev_state <= state;
    if (!done) cyc_in[state]++;
    if (dut.u_c1.u_relu.in_valid && dut.u_c1.u_relu.d < 0) n_clip1++;
    if (dut.u_c3.u_relu.in_valid && dut.u_c3.u_relu.d < 0) n_clip3++;
    if (dut.u_c1.u_mac.out_valid) begin if (dut.u_c1.u_mac.out_sel) n_acc1++; else n_acc0++; end
    if (dut.u_s2.u_max.out_valid || dut.u_s4.u_max.out_valid) n_pool++;
    if (dut.u_d6.u_add.in_valid && dut.u_d6.u_add.bias != 0) n_bias++;
  end

  task automatic cnt(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    int paper [5] = '{59909, 2306, 26627, 1030, 2572};
    for (int i = 0; i < 784; i++) begin
      ref_img[i] = int'($urandom % 33);                 // pixel in [0,1] as Q.5
      dut.u_rom_img.mem[i] = 8'(ref_img[i]);
    end
    for (int i = 0; i < 100; i++) begin
      ref_c1w[i] = int'($urandom % 64) - 28; dut.u_rom_c1w.mem[i] = 8'(ref_c1w[i]);
    end
    for (int i = 0; i < 400; i++) begin
      ref_c3w[i] = int'($urandom % 48) - 22; dut.u_rom_c3w.mem[i] = 8'(ref_c3w[i]);
    end
    for (int i = 0; i < 640; i++) begin
      ref_d6w[i] = int'($urandom % 32) - 16; dut.u_rom_d6w.mem[i] = 8'(ref_d6w[i]);
    end
    for (int i = 0; i < 4; i++) begin
      ref_b1[i] = int'(signed'(B1[8*i +: 8]));
      ref_b3[i] = int'(signed'(B3[8*i +: 8]));
    end
    for (int i = 0; i < 10; i++) ref_b6[i] = int'(signed'(B6[8*i +: 8]));
    ref_run();

    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    repeat (3) @(negedge clk);

    for (int i = 0; i < 2304; i++) begin checks++; if (int'(signed'(dut.u_ram_c1.mem[i])) != ref_c1[i]) begin failures++; if (failures < 5) $display("C1[%0d] %0d exp %0d", i, signed'(dut.u_ram_c1.mem[i]), ref_c1[i]); end end
    for (int i = 0; i < 576;  i++) begin checks++; if (int'(signed'(dut.u_ram_s2.mem[i])) != ref_s2[i]) failures++; end
    for (int i = 0; i < 1024; i++) begin checks++; if (int'(signed'(dut.u_ram_c3.mem[i])) != ref_c3[i]) begin failures++; if (failures < 5) $display("C3[%0d] %0d exp %0d", i, signed'(dut.u_ram_c3.mem[i]), ref_c3[i]); end end
    for (int i = 0; i < 256;  i++) begin checks++; if (int'(signed'(dut.u_ram_s4.mem[i])) != ref_s4[i]) failures++; end
    for (int i = 0; i < 10;   i++) begin
      checks++;
      if (int'(signed'(dut.u_ram_d6.mem[i])) != ref_d6[i]) begin failures++; $display("D6[%0d] %0d exp %0d", i, signed'(dut.u_ram_d6.mem[i]), ref_d6[i]); end
    end
    checks++;
    if (class_o != 10'(1 << ref_class) || int'(data_out) != ref_d6[ref_class]) begin
      failures++; $display("class_o %b data_out %0d, expected class %0d value %0d", class_o, data_out, ref_class, ref_d6[ref_class]);
    end
    checks++; if (state != CLASS) failures++;
    checks++; if (c1_count2304 != 12'd2303) begin failures++; $display("c1_count2304 %0d", c1_count2304); end

    $display("class %0d, score %0d; D6 outputs:", ref_class, ref_d6[ref_class]);
    for (int i = 0; i < 10; i++) $write(" %0d", ref_d6[i]);
    $display("\ncycles per layer (this design / published):");
    for (int l = 0; l < 5; l++) begin
      $display("  layer %0d: %0d / %0d", l, cyc_in[l], paper[l]);
      checks++;
      if (cyc_in[l] < paper[l] - 12 || cyc_in[l] > paper[l] + 12) failures++;
    end
    $display("mechanisms:");
    cnt("layer hand-overs (of 5)", n_trans == 5 ? n_trans : 0);
    cnt("ReLU clipped in C1", n_clip1);
    cnt("ReLU clipped in C3", n_clip3);
    cnt("C1 sums in MAC accumulator 0", n_acc0);
    cnt("C1 sums in MAC accumulator 1", n_acc1);
    cnt("max-pool windows", n_pool);
    cnt("non-zero D6 bias additions", n_bias);
    cnt("classification done", int'(done));
    $display("reference clamps (saturation) %0d, ReLU clips %0d", ref_sats, ref_relu_clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
