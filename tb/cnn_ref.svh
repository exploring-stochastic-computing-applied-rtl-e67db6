// cnn_ref.svh: reference model of the Modified LeNet-5 fixed-point network,
// included inside a testbench module. It recomputes every layer from the
// image, weights and biases with plain loops, using the same number rules as
// the hardware: Q.5 values, products summed exactly, the sum divided by 32
// with rounding toward minus infinity, the 8-bit bias added, the result
// clamped to the layer width (13, 16, 19 bits) and, in C1 and C3, ReLU.

int ref_img [784];
int ref_c1w [100];
int ref_c3w [400];
int ref_d6w [640];
int ref_b1 [4], ref_b3 [4], ref_b6 [10];
int ref_c1 [2304], ref_s2 [576], ref_c3 [1024], ref_s4 [256], ref_d6 [10];
int ref_class;
int ref_relu_clips, ref_sats;

function automatic int ref_floor32(longint s);
  return (s >= 0) ? int'(s / 32) : -int'((-s + 31) / 32);
endfunction

function automatic int ref_clamp(int v, int bits);
  int hi = (1 << (bits - 1)) - 1;
  int lo = -(1 << (bits - 1));
  if (v > hi) begin ref_sats++; return hi; end
  if (v < lo) begin ref_sats++; return lo; end
  return v;
endfunction

task automatic ref_run();
  ref_relu_clips = 0;
  ref_sats = 0;
  // C1: 1 channel 28x28, 4 filters, out 4 x 24x24
  for (int f = 0; f < 4; f++)
    for (int y = 0; y < 24; y++)
      for (int x = 0; x < 24; x++) begin
        longint s = 0;
        int v;
        for (int ky = 0; ky < 5; ky++)
          for (int kx = 0; kx < 5; kx++)
            s += longint'(ref_img[(y + ky) * 28 + x + kx]) * ref_c1w[f * 25 + ky * 5 + kx];
        v = ref_clamp(ref_floor32(s) + ref_b1[f], 13);
        if (v < 0) begin v = 0; ref_relu_clips++; end
        ref_c1[f * 576 + y * 24 + x] = v;
      end
  // S2: 4 maps 24x24 -> 12x12
  for (int m = 0; m < 4; m++)
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 12; c++) begin
        int mx = ref_c1[m * 576 + 2 * r * 24 + 2 * c];
        for (int d = 1; d < 4; d++) begin
          int v = ref_c1[m * 576 + (2 * r + d / 2) * 24 + 2 * c + d % 2];
          if (v > mx) mx = v;
        end
        ref_s2[m * 144 + r * 12 + c] = mx;
      end
  // C3: each of 4 channels with its own 4 filters -> 16 maps 8x8
  for (int ch = 0; ch < 4; ch++)
    for (int f = 0; f < 4; f++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          longint s = 0;
          int v;
          for (int ky = 0; ky < 5; ky++)
            for (int kx = 0; kx < 5; kx++)
              s += longint'(ref_s2[ch * 144 + (y + ky) * 12 + x + kx]) * ref_c3w[(ch * 4 + f) * 25 + ky * 5 + kx];
          v = ref_clamp(ref_floor32(s) + ref_b3[f], 16);
          if (v < 0) begin v = 0; ref_relu_clips++; end
          ref_c3[(ch * 4 + f) * 64 + y * 8 + x] = v;
        end
  // S4/F5: 16 maps 8x8 -> 4x4, flattened in map, row, column order
  for (int m = 0; m < 16; m++)
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int mx = ref_c3[m * 64 + 2 * r * 8 + 2 * c];
        for (int d = 1; d < 4; d++) begin
          int v = ref_c3[m * 64 + (2 * r + d / 2) * 8 + 2 * c + d % 2];
          if (v > mx) mx = v;
        end
        ref_s4[m * 16 + r * 4 + c] = mx;
      end
  // D6: 10 neurons, input j uses weight n*64 + j%64
  for (int n = 0; n < 10; n++) begin
    longint s = 0;
    for (int j = 0; j < 256; j++) s += longint'(ref_s4[j]) * ref_d6w[n * 64 + j % 64];
    ref_d6[n] = ref_clamp(ref_floor32(s) + ref_b6[n], 19);
  end
  ref_class = 0;
  for (int n = 1; n < 10; n++) if (ref_d6[n] > ref_d6[ref_class]) ref_class = n;
endtask
