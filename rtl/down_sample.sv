// down_sample: 2x down-scaler for a raster pixel stream.
//
// Every input pixel (valid_in high) advances a column counter x (0..W-1)
// and, at the end of a row, a row counter y (0..H-1). A pixel is passed on
// with valid_out high only when both x and y are even, so 1 in 4 pixels of
// a W x H frame is marked valid and a (W/2) x (H/2) image results. The
// output stream keeps one pixel per input pixel: in cycles where
// valid_out is low, pixel_out is forced to black (zero), so a downstream
// consumer that counts W x H pixels stays in step.
// Timing: pixel_out/valid_out are combinational from the inputs and the
// current counter values (zero latency); counters update on the clock edge.
// The counter structure, the even/even test and the black filler follow
// the source design; the counters advance only on valid_in.
module down_sample
  import dog_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_W,
  parameter int unsigned HEIGHT = IMG_H
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pixel_in,
  input  logic   valid_in,
  output pixel_t pixel_out,
  output logic   valid_out
);
  logic [$clog2(WIDTH)-1:0]  x_count;
  logic [$clog2(HEIGHT)-1:0] y_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_count <= '0;
      y_count <= '0;
    end else if (valid_in) begin
      if (x_count == ($clog2(WIDTH))'(WIDTH - 1)) begin
        x_count <= '0;
        y_count <= (y_count == ($clog2(HEIGHT))'(HEIGHT - 1)) ? '0 : y_count + 1'b1;
      end else begin
        x_count <= x_count + 1'b1;
      end
    end
  end

  assign valid_out = valid_in && !x_count[0] && !y_count[0];
  assign pixel_out = valid_out ? pixel_in : '0;
endmodule
