// image_buffer_writer: stores one frame of a pixel stream in the back
// frame buffer of the external SRAM, through arbiter write port W0.
//
// Sequence: on bg_start it acknowledges (bg_start_ack, a registered one-cycle pulse), latches
// which buffer to fill (back_buf) and asks the image source to begin a
// frame (src_start held until src_start_ack). It then takes the next
// FRAME_PIX valid pixels, packs four per 32-bit word (first pixel in the
// low byte) and queues one write request per word in a FWFT request FIFO
// that the arbiter drains (w0_valid/w0_req/w0_pop). Word k of buffer b
// goes to address b*FRAME_WORDS + k. When the last word has left the FIFO
// it raises bg_done until bg_done_ack.
// The source design only names this block and its handshake with the swap
// controller; packing, addressing and the source start handshake are this
// design's choices. The arbiter must serve W0 at least once per four
// pixel cycles; an assertion flags a request FIFO overflow.
module image_buffer_writer
  import dog_pkg::*;
#(
  parameter int unsigned FRAME_PIX  = IMG_W * IMG_H,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  // swap controller
  input  logic       bg_start,
  output logic       bg_start_ack,
  output logic       bg_done,
  input  logic       bg_done_ack,
  input  logic       back_buf,
  // image source
  output logic       src_start,
  input  logic       src_start_ack,
  input  pixel_t     pixel_in,
  input  logic       valid_in,
  // arbiter port W0
  output logic       w0_valid,
  output sram_wreq_t w0_req,
  input  logic       w0_pop
);
  localparam int unsigned FRAME_WORDS = FRAME_PIX / PIX_PER_WORD;
  localparam int unsigned CW = $clog2(FRAME_PIX + 1);

  typedef enum logic [2:0] {WR_IDLE, WR_SRC, WR_PIX, WR_DRAIN, WR_DONE} wr_state_e;
  wr_state_e state;

  logic [CW-1:0]      pix_count;
  logic [SRAM_AW-1:0] word_addr;
  logic [1:0]         lane;
  logic [SRAM_DW-1:0] word;
  logic               push, fifo_full, fifo_empty;
  sram_wreq_t         req;

  wire take = (state == WR_PIX) && valid_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= WR_IDLE;
      bg_start_ack <= 1'b0;
      pix_count    <= '0;
      word_addr <= '0;
      lane      <= '0;
      word      <= '0;
    end else begin
      bg_start_ack <= (state == WR_IDLE) && bg_start;
      unique case (state)
        WR_IDLE: if (bg_start) begin
          state     <= WR_SRC;
          word_addr <= back_buf ? SRAM_AW'(FRAME_WORDS) : '0;
          pix_count <= '0;
          lane      <= '0;
        end
        WR_SRC: if (src_start_ack) state <= WR_PIX;
        WR_PIX: if (valid_in) begin
          word[lane*PIX_W +: PIX_W] <= pixel_in;
          lane      <= lane + 1'b1;
          pix_count <= pix_count + 1'b1;
          if (lane == 2'd3) word_addr <= word_addr + 1'b1;
          if (pix_count == CW'(FRAME_PIX - 1)) state <= WR_DRAIN;
        end
        WR_DRAIN: if (fifo_empty && !push) state <= WR_DONE;
        WR_DONE: if (bg_done_ack) state <= WR_IDLE;
        default: state <= WR_IDLE;
      endcase
    end
  end

  assign src_start    = (state == WR_SRC);
  assign bg_done      = (state == WR_DONE);

  // The completed word (this pixel in the top lane) is queued directly.
  always_comb begin
    req.addr = word_addr;
    req.data = word;
    req.data[3*PIX_W +: PIX_W] = pixel_in;
    req.mask = '1;
  end
  assign push = take && (lane == 2'd3);

  fwft_fifo #(.WIDTH($bits(sram_wreq_t)), .DEPTH(FIFO_DEPTH)) u_req_fifo (
    .clk, .rst,
    .wr_en (push), .din (req),
    .rd_en (w0_pop), .dout (w0_req),
    .full (fifo_full), .empty (fifo_empty), .count ()
  );
  assign w0_valid = !fifo_empty;

  a_req_room: assert property (@(posedge clk) disable iff (rst) push |-> !fifo_full);
endmodule
