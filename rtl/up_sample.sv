// up_sample: 2x up-scaler that fills the gaps of a down-sampled stream.
//
// Input is the 1-in-4 valid stream produced by down_sample (and delayed by
// the filter): in every pair of rows of LINE pixel slots, valid pixels sit
// on the even slots of the first row and the second row carries none.
// Two free-running counters keep the phase: repeat_counter toggles every
// cycle (0 on slots that carry a valid pixel) and row_counter runs
// 0 .. 2*LINE-1. In the first row of a pair (row_counter < LINE) the
// output is the input pixel when repeat_counter is 0 and the pixel
// storage register (last cycle's input) when it is 1, so each pixel is
// doubled horizontally; every output pixel is also written to a line
// FIFO. In the second row (row_counter >= LINE) the line is replayed from
// the FIFO, which doubles it vertically. The FIFO is first-word
// fall-through, so the replayed row is not skewed by a read latency.
// Timing: pixel_out is combinational from pixel_in, the storage register
// and the FIFO head; one output pixel per clock.
// Own choices: the counters are held at zero until the first valid_in
// and restart, with the line FIFO flushed, after the input has been idle
// for 2*LINE cycles (end of a frame); valid_out is high while the counters run; FIFO reads and writes
// are guarded by empty/full.
module up_sample
  import dog_pkg::*;
#(
  parameter int unsigned LINE = IMG_W
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pixel_in,
  input  logic   valid_in,
  output pixel_t pixel_out,
  output logic   valid_out,
  output logic   replay        // high while a row is replayed from the FIFO
);
  localparam int unsigned RW = $clog2(2 * LINE);
  localparam int unsigned TW = $clog2(2 * LINE + 1);

  logic          started;
  logic          repeat_counter;
  logic [RW-1:0] row_counter;
  logic [TW-1:0] idle_count;
  pixel_t        pixel_storage_reg;
  pixel_t        normal_out, fifo_dout;
  logic          fifo_wr, fifo_rd, fifo_full, fifo_empty;

  wire running = started || valid_in;
  wire timeout = started && !valid_in && (idle_count == TW'(2 * LINE - 1));

  always_ff @(posedge clk) begin
    pixel_storage_reg <= pixel_in;
    if (rst) begin
      started        <= 1'b0;
      repeat_counter <= 1'b0;
      row_counter    <= '0;
      idle_count     <= '0;
    end else if (running) begin
      started        <= 1'b1;
      repeat_counter <= ~repeat_counter;
      row_counter    <= (row_counter == RW'(2 * LINE - 1)) ? '0 : row_counter + 1'b1;
      idle_count     <= valid_in ? '0 : idle_count + 1'b1;
      if (timeout) begin
        started        <= 1'b0;
        repeat_counter <= 1'b0;
        row_counter    <= '0;
        idle_count     <= '0;
      end
    end
  end

  assign replay     = running && (row_counter >= RW'(LINE));
  assign normal_out = (repeat_counter == 1'b0) ? pixel_in : pixel_storage_reg;
  assign pixel_out  = replay ? fifo_dout : normal_out;
  assign valid_out  = running;

  assign fifo_wr = running && !replay && ((repeat_counter == 1'b0) ? valid_in : 1'b1) && !fifo_full;
  assign fifo_rd = replay && !fifo_empty;

  fwft_fifo #(.WIDTH(PIX_W), .DEPTH(LINE)) u_line_fifo (
    .clk, .rst (rst || timeout),
    .wr_en (fifo_wr),
    .din   (normal_out),
    .rd_en (fifo_rd),
    .dout  (fifo_dout),
    .full  (fifo_full),
    .empty (fifo_empty),
    .count ()
  );
endmodule
