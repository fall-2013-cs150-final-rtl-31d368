// tb_gaussian_wrapper_multi: random pixels with random valid gaps into a
// 4-level cascade, as LW x LH frames. The reference smooths the input
// repeatedly (G1..G5, same separable 5x5 kernel and truncation as the
// filter, edge pixels repeated outside the image; G_k lags the raster by
// (k-1)*(2*LW+2) samples) and expects
// level i to output G_i delayed by DELAY samples minus G_(i+1), saturated
// at zero, with valid_out[i] exactly i+2 cycles after each valid_in.
module tb_gaussian_wrapper_multi;
  import dog_pkg::*;
  localparam int unsigned LW = 8, DELAY = 2 * LW + 2, L = 4;
  localparam int unsigned N = 900, K0 = 1, K1 = 64, K2 = 126, LH = 6, FS = LW * LH;
  logic clk = 0, rst = 1;
  pixel_t pixel_in;
  logic valid_in;
  pixel_t dog [L];
  logic valid_out [L];
  int checks = 0, failures = 0, nonzero = 0;
  int g [L+2][N];       // g[0] = input, g[k] = k-times smoothed
  int outk [L];
  logic [L+2:0] vpipe;

  gaussian_wrapper_multi #(.LINE_W(LW), .LINES(LH), .LEVELS(L)) dut (.*);

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

  always_ff @(posedge clk) vpipe <= {vpipe[L+1:0], valid_in};

  initial begin
    for (int n = 0; n < N; n++) g[0][n] = $urandom_range(0, 255);
    for (int k = 1; k <= L + 1; k++)
      begin
        for (int n = 0; n < N; n++) src[n] = g[k-1][n];
        for (int n = 0; n < N; n++) g[k][n] = (n >= k * DELAY) ? filt(n, (k - 1) * DELAY) : 0;
      end
    foreach (outk[i]) outk[i] = 0;
    pixel_in = 0; valid_in = 0; vpipe = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      begin
        automatic int n = 0;
        while (n < N) begin
          @(negedge clk);
          valid_in = ($urandom_range(0, 3) != 0);
          pixel_in = valid_in ? pixel_t'(g[0][n]) : pixel_t'($urandom);
          if (valid_in) n++;
        end
        @(negedge clk); valid_in = 0;
      end
      begin
        while (outk[L-1] < N) begin
          @(negedge clk);
          #1;
          for (int i = 0; i < L; i++) begin
            chk(valid_out[i] == vpipe[i+1], "level valid latency");
            if (valid_out[i]) begin
              automatic int k = outk[i];
              if (k >= (i + 2) * (4 * LW + 4) + DELAY) begin
                automatic int a = g[i+1][k-DELAY], b = g[i+2][k];
                chk(int'(dog[i]) == ((a > b) ? a - b : 0), "level difference");
                if (dog[i] != 0) nonzero++;
              end
              outk[i]++;
            end
          end
        end
      end
    join
    chk(nonzero > 0, "differences not all zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
