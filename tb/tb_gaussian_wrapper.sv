// tb_gaussian_wrapper: random pixels with random valid gaps, as LW x LH
// frames, run once per output selection (G1, G2, DoG). A reference builds
// G1 (5x5 separable smoothing of the input, edge pixels repeated outside
// the image), G2 (the same smoothing of G1, which lags the raster by
// 2*LW+2 samples) and G1 delayed by DELAY samples. Checks: valid_out follows every valid_in exactly 4
// cycles later and never otherwise; the k-th output equals the selected
// reference value for input sample k (G1[k-DELAY], G2[k] or their
// difference saturated at zero). Early samples that still depend on
// pipeline contents from before the run are not compared.
module tb_gaussian_wrapper;
  import dog_pkg::*;
  localparam int unsigned LW = 8, DELAY = 2 * LW + 2, LAT = 4;
  localparam int unsigned N = 500, K0 = 1, K1 = 64, K2 = 126, LH = 6, FS = LW * LH;
  logic clk = 0, rst = 1;
  dog_sel_e sel;
  pixel_t pixel_in, pixel_out;
  logic valid_in, valid_out;
  int checks = 0, failures = 0, n_dog_pos = 0;
  int x[N], g1[N], g2[N];
  logic [LAT:0] vpipe;
  int out_k;

  gaussian_wrapper #(.LINE_W(LW), .LINES(LH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog: out_k=%0d sel=%0d", out_k, sel);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t k=%0d", what, $time, out_k); end
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

  // Reference images for one run of N samples.
  task automatic build_ref();
    src = x;
    for (int n = 0; n < N; n++) g1[n] = (n >= DELAY) ? filt(n, 0) : 0;
    src = g1;
    for (int n = 0; n < N; n++) g2[n] = (n >= 2 * DELAY) ? filt(n, DELAY) : 0;
  endtask

  function automatic int expect_px(input int k);
    int p1 = g1[k - DELAY];
    case (sel)
      SEL_G1:  return p1;
      SEL_G2:  return g2[k];
      default: return (p1 > g2[k]) ? p1 - g2[k] : 0;
    endcase
  endfunction

  // Input valid history for the latency check.
  always_ff @(posedge clk) vpipe <= {vpipe[LAT-1:0], valid_in};

  initial begin
    for (int n = 0; n < N; n++) x[n] = $urandom_range(0, 255);
    build_ref();
    pixel_in = 0; valid_in = 0; sel = SEL_G1; vpipe = '0;
    foreach (sel_list[i]) begin
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      sel = sel_list[i];
      fork
        begin : drive
          automatic int n = 0;
          while (n < N) begin
            @(negedge clk);
            valid_in = ($urandom_range(0, 3) != 0);
            pixel_in = valid_in ? pixel_t'(x[n]) : pixel_t'($urandom);
            if (valid_in) n++;
          end
          @(negedge clk); valid_in = 0;
        end
        begin : observe
          out_k = 0;
          while (out_k < N) begin
            @(negedge clk);
            chk(valid_out == vpipe[LAT-1], "valid_out 4 cycles after valid_in");
            if (valid_out) begin
              if (out_k >= 8 * LW + 8 + DELAY) begin
                chk(int'(pixel_out) == expect_px(out_k), "selected output");
                if (sel == SEL_DOG && pixel_out != 0) n_dog_pos++;
              end
              out_k++;
            end
          end
        end
      join
      repeat (10) @(posedge clk);
    end
    chk(n_dog_pos > 0, "DoG output not always zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dog_sel_e sel_list[3] = '{SEL_G1, SEL_G2, SEL_DOG};
endmodule
