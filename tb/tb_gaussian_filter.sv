// tb_gaussian_filter: random pixels with random valid gaps, as a stream
// of LW x LH frames. A reference computes the 5-tap row smoothing of the
// raw samples and the 5-tap column smoothing of the row results, both with
// weights K0,K1,K2,K1,K0 and truncating /256, repeating the edge pixel for
// taps outside the image. After each accepted sample n the registered
// output must equal the value for the window centred 2*LW+2 samples back,
// from the first such window on. Also checks that a flat image passes
// unchanged and counts outputs at the image border.
module tb_gaussian_filter;
  import dog_pkg::*;
  localparam int unsigned LW = 8, K0 = 1, K1 = 64, K2 = 126;
  localparam int unsigned N = 600, LH = 6, FS = LW * LH;
  logic clk = 0, rst = 1;
  pixel_t pixel_in, pixel_out;
  logic valid_in;
  int checks = 0, failures = 0;
  int n_edge = 0;

  gaussian_filter #(.LINE_W(LW), .LINES(LH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
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

  initial begin
    int n = 0, exp_px;
    pixel_in = 0; valid_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (n < N) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 3) != 0);
      pixel_in = (n < N / 2) ? pixel_t'($urandom) : 8'd77;
      @(posedge clk);
      if (valid_in) begin
        src[n] = pixel_in;
        #1;
        if (n >= 2 * LW + 2) begin
          automatic int p = (n - 2 * LW - 2) % FS;
          exp_px = filt(n, 0);
          chk(pixel_out == pixel_t'(exp_px), "smoothed value");
          if (p % LW < 2 || p % LW >= LW - 2 || p / LW < 2 || p / LW >= LH - 2) n_edge++;
        end
        if (n >= N / 2 + 4 * LW + 4) chk(pixel_out == 8'd77, "flat image unchanged");
        n++;
      end else begin
        pixel_t held;
        held = pixel_out;
        #1 chk(pixel_out == held, "hold without valid");
      end
    end
    chk(n_edge > 0, "border windows checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
