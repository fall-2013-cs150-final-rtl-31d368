// gaussian_wrapper_multi: cascade of LEVELS difference-of-Gaussians
// stages (the multi-level variant of the DoG stage).
//
// Filters GF1..GF(LEVELS+1) are chained: GF1 smooths the input into o1,
// GF2 smooths o1 into o2, and so on. Level i pairs o_i, delayed DELAY
// samples by its own delay line, with o_(i+1), which the next filter
// delayed by the same 2*LINE_W+2 samples, and outputs their difference
// d_i (saturated at zero). The stages form a scale ladder: each level is
// the band between two successive amounts of smoothing.
// Control is the input valid: it steps GF1; each later filter and delay
// line is stepped by the valid of the stage before it, delayed one cycle
// to match the registered filter output. Level i's result dog[i] is
// formed from registered values and is valid on valid_out[i], i+2 cycles
// after the valid_in that produced it (one output per input, every level).
// Each filter pads the image border by edge replication; filter k is told
// that its input lags the raster by k*(2*LINE_W+2) samples.
// Follows the extra-credit block diagram of the source design; the
// per-level valid outputs and the saturation are this design's choice.
module gaussian_wrapper_multi
  import dog_pkg::*;
#(
  parameter int unsigned LINE_W = 400,
  parameter int unsigned LINES  = 300,
  parameter int unsigned DELAY  = 2 * LINE_W + 2,
  parameter int unsigned LEVELS = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pixel_in,
  input  logic   valid_in,
  output pixel_t dog       [LEVELS],
  output logic   valid_out [LEVELS]
);
  pixel_t o  [LEVELS+1];   // o[k]: output of filter k+1
  pixel_t oa [LEVELS];     // o[k] delayed by DELAY samples
  logic   v  [LEVELS+2];   // v[0] = valid_in, v[k+1] = valid of o[k]

  assign v[0] = valid_in;

  gaussian_filter #(.LINE_W(LINE_W), .LINES(LINES)) u_gf1 (
    .clk, .rst, .pixel_in, .valid_in, .pixel_out (o[0])
  );

  for (genvar k = 0; k <= LEVELS; k++) begin : g_valid
    always_ff @(posedge clk) begin
      if (rst) v[k+1] <= 1'b0;
      else     v[k+1] <= v[k];
    end
  end

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    delay_line #(.WIDTH(PIX_W), .DEPTH(DELAY)) u_sr (
      .clk, .rst, .ce (v[k+1]), .d (o[k]), .q (oa[k])
    );
    gaussian_filter #(.LINE_W(LINE_W), .LINES(LINES), .LAG((k + 1) * (2 * LINE_W + 2))) u_gf (
      .clk, .rst, .pixel_in (o[k]), .valid_in (v[k+1]), .pixel_out (o[k+1])
    );
    assign dog[k]       = (oa[k] > o[k+1]) ? oa[k] - o[k+1] : '0;
    assign valid_out[k] = v[k+2];
  end
endmodule
