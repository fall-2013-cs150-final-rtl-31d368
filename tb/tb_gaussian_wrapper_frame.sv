// tb_gaussian_wrapper_frame: whole-image test of the DoG stage at its
// default size. Two 400x300 images (smooth gradients with random bright
// and dark squares) are fed as a down-sampled stream: one valid sample in
// every other slot of even rows, nothing on odd rows of 800 slots, as the
// down-sampler delivers them. The wrapper runs once with the DoG
// selection and once with G1. A reference computes G1 and G2 of the whole
// stream with the same separable kernel, truncation and edge replication,
// and every output is checked against it, including the first frame's
// border pixels. Also checks that each valid_in gives exactly one
// valid_out 4 cycles later and that the DoG image is not all black.
module tb_gaussian_wrapper_frame;
  import dog_pkg::*;
  localparam int unsigned LW = 400, LH = 300, FS = LW * LH;
  localparam int unsigned N = 2 * FS, DELAY = 2 * LW + 2, LAT = 4;
  localparam int unsigned K0 = 1, K1 = 64, K2 = 126;
  logic clk = 0, rst = 1;
  dog_sel_e sel;
  pixel_t pixel_in, pixel_out;
  logic valid_in, valid_out;
  int checks = 0, failures = 0, n_dog_pos = 0, n_in = 0, n_out = 0;
  int x[N], g1[N], g2[N];
  logic [LAT:0] vpipe;

  gaussian_wrapper dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t k=%0d", what, $time, n_out); end
  endtask

  function automatic int sm(input int a, b, c, d, e);
    return (K0 * (a + e) + K1 * (b + d) + K2 * c) / 256;
  endfunction

  // Reference with edge replication: a tap outside the LW x LH image takes
  // the nearest pixel inside it. src holds the stream being filtered.
  int src[N];
  function automatic int clampi(input int v, lo, hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction
  function automatic int at(input int j);
    return (j >= 0 && j < N) ? src[j] : 0;
  endfunction
  // Row-smoothed value centred on stream index j, in raster column c.
  function automatic int rowsm(input int j, c);
    int t[5];
    for (int k = -2; k <= 2; k++) t[k+2] = at(j + clampi(c + k, 0, LW - 1) - c);
    return sm(t[0], t[1], t[2], t[3], t[4]);
  endfunction
  // Filter output after stream sample n, the stream lagging the raster by
  // lag samples: the 5x5 window centred 2*LW+2 samples back.
  function automatic int filt(input int n, lag);
    int i = n - (2 * LW + 2);
    int p = (((i - lag) % FS) + FS) % FS;
    int c = p % LW, r = p / LW;
    int t[5];
    for (int k = -2; k <= 2; k++) t[k+2] = rowsm(i + LW * (clampi(r + k, 0, LH - 1) - r), c);
    return sm(t[0], t[1], t[2], t[3], t[4]);
  endfunction

  function automatic int expect_px(input int k);
    int p1 = (k >= DELAY) ? g1[k - DELAY] : 0;
    case (sel)
      SEL_G1:  return p1;
      SEL_G2:  return g2[k];
      default: return (p1 > g2[k]) ? p1 - g2[k] : 0;
    endcase
  endfunction

  always_ff @(posedge clk) vpipe <= {vpipe[LAT-1:0], valid_in};

  dog_sel_e sel_list[2] = '{SEL_DOG, SEL_G1};

  initial begin
    // Test images: gradient background with squares of random level.
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < LH; r++)
        for (int c = 0; c < LW; c++)
          x[f * FS + r * LW + c] = (c / 4 + r / 3 + 40 * f) % 256;
    for (int s = 0; s < 200; s++) begin
      automatic int f = $urandom_range(0, 1), r0 = $urandom_range(0, LH - 8), c0 = $urandom_range(0, LW - 8);
      automatic int sz = $urandom_range(2, 7), lvl = $urandom_range(0, 255);
      for (int r = r0; r < r0 + sz; r++)
        for (int c = c0; c < c0 + sz; c++) x[f * FS + r * LW + c] = lvl;
    end
    src = x;
    for (int n = 0; n < N; n++) g1[n] = (n >= DELAY) ? filt(n, 0) : 0;
    src = g1;
    for (int n = 0; n < N; n++) g2[n] = (n >= 2 * DELAY) ? filt(n, DELAY) : 0;

    pixel_in = 0; valid_in = 0; sel = SEL_DOG; vpipe = '0;
    foreach (sel_list[i]) begin
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      sel = sel_list[i];
      n_in = 0; n_out = 0;
      fork
        begin : drive
          // 800-slot rows: valid on even slots of even rows only.
          for (int slot = 0; n_in < N; slot++) begin
            @(negedge clk);
            valid_in = ((slot % 2) == 0) && (((slot / 800) % 2) == 0);
            pixel_in = valid_in ? pixel_t'(x[n_in]) : '0;
            if (valid_in) n_in++;
          end
          @(negedge clk); valid_in = 0;
        end
        begin : observe
          while (n_out < N) begin
            @(negedge clk);
            chk(valid_out == vpipe[LAT-1], "valid_out 4 cycles after valid_in");
            if (valid_out) begin
              // Outputs before the first G2 value of frame 0 are skipped.
              if (n_out >= 2 * DELAY) begin
                chk(int'(pixel_out) == expect_px(n_out), "output pixel");
                if (sel == SEL_DOG && pixel_out != 0) n_dog_pos++;
              end
              n_out++;
            end
          end
        end
      join
      repeat (10) @(posedge clk);
      chk(n_out == n_in, "one output per input");
    end
    chk(n_dog_pos > 1000, "DoG image has features");
    $display("DoG nonzero outputs: %0d", n_dog_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
