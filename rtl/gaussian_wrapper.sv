// gaussian_wrapper: difference-of-Gaussians stage built around two
// cascaded gaussian_filter instances.
//
// Data path: input FWFT FIFO -> filter GF1 -> pixel_fil. pixel_fil feeds
// both a DELAY-deep delay line (SR) and a second filter GF2. Because GF2
// delays by the same 2*LINE_W+2 = 802 samples as SR, pixel_1 (G1 delayed)
// and pixel_2 (G2 = G1 filtered again) belong to the same image position;
// their difference is the DoG pixel. A select input picks G1, G2 or the
// difference; the result enters an output FWFT FIFO whose head is the
// module output.
// Control: everything is driven by the input valid. An input pixel is
// accepted whenever valid_in is high, leaves the input FIFO the next
// cycle (valid_mid stage), and the selected result reaches the output
// three cycles later: valid_out follows valid_in by 4 cycles, one output
// per input, with the image content shifted by 802 samples.
// Own choices: the difference is saturated at zero (pixel_1 < pixel_2
// gives black); FIFO depth is FIFO_DEPTH; there is no output back-pressure,
// the FIFOs drain every cycle they hold data. Border padding (edge
// replication) is done by the filters themselves, each told the image size
// (LINE_W x LINES) and how far its input lags the raster, instead of by
// inserting extra samples into the stream, so the 802-sample timing holds.
module gaussian_wrapper
  import dog_pkg::*;
#(
  parameter int unsigned LINE_W     = 400,
  parameter int unsigned LINES  = 300,
  parameter int unsigned DELAY      = 2 * LINE_W + 2,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst,
  input  dog_sel_e sel,
  input  pixel_t   pixel_in,
  input  logic     valid_in,
  output pixel_t   pixel_out,
  output logic     valid_out
);
  pixel_t in_head, pixel_fil, pixel_1, pixel_2, result;
  logic   in_empty, out_empty;
  logic   valid_f, valid_mid, valid_2;

  fwft_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst,
    .wr_en (valid_in), .din (pixel_in),
    .rd_en (!in_empty), .dout (in_head),
    .full (), .empty (in_empty), .count ()
  );
  assign valid_f = !in_empty;

  gaussian_filter #(.LINE_W(LINE_W), .LINES(LINES)) u_gf1 (
    .clk, .rst, .pixel_in (in_head), .valid_in (valid_f), .pixel_out (pixel_fil)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_mid <= 1'b0;
      valid_2   <= 1'b0;
    end else begin
      valid_mid <= valid_f;
      valid_2   <= valid_mid;
    end
  end

  delay_line #(.WIDTH(PIX_W), .DEPTH(DELAY)) u_sr (
    .clk, .rst, .ce (valid_mid), .d (pixel_fil), .q (pixel_1)
  );

  gaussian_filter #(.LINE_W(LINE_W), .LINES(LINES), .LAG(2 * LINE_W + 2)) u_gf2 (
    .clk, .rst, .pixel_in (pixel_fil), .valid_in (valid_mid), .pixel_out (pixel_2)
  );

  always_comb begin
    unique case (sel)
      SEL_G1:  result = pixel_1;
      SEL_G2:  result = pixel_2;
      default: result = (pixel_1 > pixel_2) ? pixel_1 - pixel_2 : '0;
    endcase
  end

  fwft_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst,
    .wr_en (valid_2), .din (result),
    .rd_en (!out_empty), .dout (pixel_out),
    .full (), .empty (out_empty), .count ()
  );
  assign valid_out = !out_empty;
endmodule
