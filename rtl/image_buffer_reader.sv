// image_buffer_reader: streams the front frame buffer of the external
// SRAM to the display, through arbiter read port R0.
//
// It walks the FRAME_WORDS words of the front buffer in order, wrapping at
// the end of the frame, and keeps a FWFT data FIFO filled: a read request
// (r0_valid, address r0_addr) is offered whenever the FIFO plus the reads
// still in flight leave room (r0_data_full otherwise). Returned words
// enter the FIFO and are unpacked low byte first into one pixel per
// accepted display cycle (disp_valid/disp_ready); disp_sof marks the first
// pixel of each frame.
// Buffer swap: while swap is high, the reader switches front_buf at the
// next frame boundary of its request stream and answers with a one-cycle
// swap_ack, so the display never shows a torn frame. front_buf tells the
// writer which buffer is the back one.
// The source design only names this block and its swap/swap_ack
// handshake; everything else here is this design's choice.
module image_buffer_reader
  import dog_pkg::*;
#(
  parameter int unsigned FRAME_PIX  = IMG_W * IMG_H,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  // swap controller
  input  logic               swap,
  output logic               swap_ack,
  output logic               front_buf,
  // arbiter port R0
  output logic               r0_valid,
  output logic [SRAM_AW-1:0] r0_addr,
  output logic               r0_data_full,
  input  logic               r0_pop,
  input  logic               r0_data_valid,
  input  logic [SRAM_DW-1:0] rdata,
  // display
  output pixel_t             disp_pixel,
  output logic               disp_valid,
  output logic               disp_sof,
  input  logic               disp_ready
);
  localparam int unsigned FRAME_WORDS = FRAME_PIX / PIX_PER_WORD;
  localparam int unsigned WW = $clog2(FRAME_WORDS);
  localparam int unsigned PW = $clog2(FRAME_PIX);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [WW-1:0]      word_idx;
  logic [CW-1:0]      in_flight, fifo_count;
  logic [SRAM_DW-1:0] head;
  logic               fifo_empty;
  logic [1:0]         lane;
  logic [PW-1:0]      out_count;

  wire last_word = (word_idx == WW'(FRAME_WORDS - 1));
  wire pop_pix   = disp_valid && disp_ready;
  wire pop_word  = pop_pix && (lane == 2'd3);

  assign r0_valid     = 1'b1;
  assign r0_addr      = (front_buf ? SRAM_AW'(FRAME_WORDS) : '0) + SRAM_AW'(word_idx);
  assign r0_data_full = (32'(fifo_count) + 32'(in_flight)) >= FIFO_DEPTH - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      word_idx  <= '0;
      front_buf <= 1'b0;
      swap_ack  <= 1'b0;
      in_flight <= '0;
    end else begin
      swap_ack <= 1'b0;
      if (r0_pop) begin
        word_idx <= last_word ? '0 : word_idx + 1'b1;
        if (last_word && swap && !swap_ack) begin
          front_buf <= ~front_buf;
          swap_ack  <= 1'b1;
        end
      end
      in_flight <= in_flight + CW'(r0_pop) - CW'(r0_data_valid);
    end
  end

  fwft_fifo #(.WIDTH(SRAM_DW), .DEPTH(FIFO_DEPTH)) u_data_fifo (
    .clk, .rst,
    .wr_en (r0_data_valid), .din (rdata),
    .rd_en (pop_word), .dout (head),
    .full (), .empty (fifo_empty), .count (fifo_count)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      lane      <= '0;
      out_count <= '0;
    end else if (pop_pix) begin
      lane      <= lane + 1'b1;
      out_count <= (out_count == PW'(FRAME_PIX - 1)) ? '0 : out_count + 1'b1;
    end
  end

  assign disp_valid = !fifo_empty;
  assign disp_pixel = head[lane*PIX_W +: PIX_W];
  assign disp_sof   = (out_count == '0);
endmodule
