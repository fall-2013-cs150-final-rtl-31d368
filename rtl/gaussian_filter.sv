// gaussian_filter: separable 5x5 Gaussian smoothing of a raster pixel stream,
// with the image border padded by edge replication.
//
// Each accepted pixel (valid_in high) advances the whole filter by one
// sample; pixel_out is meaningful whenever the caller says so (the filter
// carries no valid of its own). Row stage: a 4-deep tap line holds the
// last four pixels; with the current pixel they form a symmetric 5-tap
// window weighted K0,K1,K2,K1,K0, summed to 16 bits and divided by 256
// (top 8 bits kept). Column stage: the row results of the last four image
// lines are held in a LINE_W-deep line buffer (one 4x8-bit word per
// column); with the current row result they are weighted the same way,
// summed and divided by 256 into the registered output.
// Padding: column and row counters track where in the LINE_W x LINES
// frame each sample lies. A tap that would fall outside the image takes
// the value of the nearest tap inside it (the edge pixel is repeated), so
// the window never mixes in the neighbouring line or frame. The counters
// start at reset; LAG says how many samples the input stream already lags
// the raster (0 for a filter fed by the raw stream, 2*LINE_W+2 for one fed
// by another filter), so frames must arrive whole after reset.
// Delay: the output after sample n is the smoothed value of the window
// centred on sample n - (2*LINE_W + 2), i.e. 802 samples for a 400-pixel
// line.
// Timing: pixel_out is registered and changes the cycle after valid_in.
// The row/column split, the /256 with 8 kept bits and the 2w+2 delay
// follow the source design; the weight values and the padding rule (edge
// replication) are this design's choice (outer weight 1, matching the
// unweighted outer taps of the source).
module gaussian_filter
  import dog_pkg::*;
#(
  parameter int unsigned LINE_W = 400,
  parameter int unsigned LINES  = 300,
  parameter int unsigned LAG    = 0,
  parameter int unsigned K0     = 1,
  parameter int unsigned K1     = 64,
  parameter int unsigned K2     = 126
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pixel_in,
  input  logic   valid_in,
  output pixel_t pixel_out
);
  localparam int unsigned AW = $clog2(LINE_W);
  localparam int unsigned RW = $clog2(LINES);
  localparam longint unsigned FRAME = longint'(LINE_W) * LINES;
  // Raster position of the first sample after reset.
  localparam longint unsigned POS0 = (FRAME - (longint'(LAG) % FRAME)) % FRAME;
  localparam int unsigned COL0 = int'(POS0 % longint'(LINE_W));
  localparam int unsigned ROW0 = int'(POS0 / longint'(LINE_W));

  // Weights must sum to 256 so a flat image passes unchanged.
  initial assert (2 * K0 + 2 * K1 + K2 == 256) else $error("weights must sum to 256");
  initial assert (LINE_W >= 5 && LINES >= 5) else $error("image must be at least 5x5");

  // acc[7:0] is the remainder of the divide by 256 and is dropped.
  function automatic pixel_t smooth5(input pixel_t a, b, c, d, e);
    logic [15:0] acc;
    acc = 16'(K0 * (32'(a) + 32'(e)) + K1 * (32'(b) + 32'(d)) + K2 * 32'(c));
    return acc[15:8];
  endfunction

  // Raster position of the incoming sample.
  logic [AW-1:0] col;
  logic [RW-1:0] row;
  always_ff @(posedge clk) begin
    if (rst) begin
      col <= AW'(COL0);
      row <= RW'(ROW0);
    end else if (valid_in) begin
      if (col == AW'(LINE_W - 1)) begin
        col <= '0;
        row <= (row == RW'(LINES - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  // Row stage: the window is centred on s2, column col-2.
  pixel_t s1, s2, s3, s4;
  pixel_t ra, rb, rd, re;
  pixel_t row_res;
  always_ff @(posedge clk) begin
    if (rst) begin
      {s1, s2, s3, s4} <= '0;
    end else if (valid_in) begin
      s1 <= pixel_in;
      s2 <= s1;
      s3 <= s2;
      s4 <= s3;
    end
  end
  always_comb begin
    ra = s4; rb = s3; rd = s1; re = pixel_in;
    unique case (col)
      AW'(2):  begin ra = s2; rb = s2; end   // centre in column 0
      AW'(3):  ra = s3;                      // centre in column 1
      AW'(1):  begin rd = s2; re = s2; end   // centre in the last column
      AW'(0):  re = s1;                      // centre in the last column but one
      default: ;
    endcase
  end
  assign row_res = smooth5(ra, rb, s2, rd, re);

  // Row of the row result just produced (its centre is two samples back).
  logic [RW-1:0] rrow;
  assign rrow = (col >= AW'(2)) ? row : ((row == '0) ? RW'(LINES - 1) : row - 1'b1);

  // Column stage: line buffer holds row results delayed by 1..4 lines;
  // the window is centred two lines back, on row rrow-2.
  logic [4*PIX_W-1:0] line_mem [LINE_W];
  logic [AW-1:0]      ptr;
  logic [4*PIX_W-1:0] lines;
  pixel_t ca, cb, cc, cd, ce;
  assign lines = line_mem[ptr];

  always_comb begin
    ca = lines[3*PIX_W +: PIX_W];
    cb = lines[2*PIX_W +: PIX_W];
    cc = lines[PIX_W +: PIX_W];
    cd = lines[0 +: PIX_W];
    ce = row_res;
    unique case (rrow)
      RW'(2):  begin ca = cc; cb = cc; end   // centre in the first row
      RW'(3):  ca = cb;                      // centre in the second row
      RW'(1):  begin cd = cc; ce = cc; end   // centre in the last row
      RW'(0):  ce = cd;                      // centre in the last row but one
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (valid_in) line_mem[ptr] <= {lines[3*PIX_W-1:0], row_res};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr       <= '0;
      pixel_out <= '0;
    end else if (valid_in) begin
      ptr       <= (ptr == AW'(LINE_W - 1)) ? '0 : ptr + 1'b1;
      pixel_out <= smooth5(ca, cb, cc, cd, ce);
    end
  end
endmodule
