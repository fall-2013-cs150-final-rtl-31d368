// dog_top: difference-of-Gaussians video filter with a double-buffered
// SRAM frame store.
//
// Pipeline (one pixel per clock, 800x600 frames):
//   source -> down_sample (800x600 -> 400x300, 1-in-4 valid)
//          -> gaussian_wrapper (G1, G2 or G1-G2 on the 400x300 image)
//          -> up_sample (back to 800x600, pixels and lines doubled)
//          -> switch mux -> image_buffer_writer -> sram_arbiter W0 -> SRAM
// The display path reads the front buffer through arbiter port R0
// (image_buffer_reader). The swap_controller runs the frame loop: write a
// background frame, run the overlay pass, swap buffers.
// The image source, the overlay engine, the SRAM and the display encoder
// are outside this module; their signals are ports. The overlay and the
// second read port are not used by the pipeline: arbiter ports W1 and R1
// are brought out so a client can be attached.
// Alongside, the down-sampled stream also feeds the multi-level cascade
// (gaussian_wrapper_multi), whose LEVELS band outputs are ports.
// Switch inputs: sel picks G1, G2 or the DoG image; bypass sends the
// source stream straight to the writer, skipping the filter path.
// Own choices: a single clock for the whole design (the source system ran
// the pixel path at 10 MHz and the SRAM side at 50 MHz); all resets are
// synchronous and active high.
module dog_top
  import dog_pkg::*;
#(
  parameter int unsigned WIDTH    = IMG_W,
  parameter int unsigned HEIGHT   = IMG_H,
  parameter int unsigned SRAM_LAT = 2,
  parameter int unsigned LEVELS   = 4
) (
  input  logic               clk,
  input  logic               rst,
  // switches
  input  dog_sel_e           sel,
  input  logic               bypass,
  input  logic               system_ready,
  // image source
  output logic               src_start,
  input  logic               src_start_ack,
  input  pixel_t             src_pixel,
  input  logic               src_valid,
  // overlay engine
  output logic               ol_start,
  input  logic               ol_start_ack,
  input  logic               ol_done,
  output logic               ol_done_ack,
  // spare arbiter ports
  input  logic               w1_valid,
  input  sram_wreq_t         w1_req,
  output logic               w1_pop,
  input  logic               r1_valid,
  input  logic [SRAM_AW-1:0] r1_addr,
  input  logic               r1_data_full,
  output logic               r1_pop,
  output logic               r1_data_valid,
  output logic [SRAM_DW-1:0] r1_data,
  // SRAM
  output logic               sram_en,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  output logic [SRAM_MW-1:0] sram_mask,
  input  logic [SRAM_DW-1:0] sram_rdata,
  // display
  output pixel_t             disp_pixel,
  output logic               disp_valid,
  output logic               disp_sof,
  input  logic               disp_ready,
  // multi-level DoG cascade on the down-sampled stream
  output pixel_t             ms_dog   [LEVELS],
  output logic               ms_valid [LEVELS],
  // observation
  output arb_state_e         arb_state,
  output swap_state_e        sw_state,
  output logic               us_replay
);
  localparam int unsigned FRAME_PIX = WIDTH * HEIGHT;

  pixel_t ds_pixel, gw_pixel, us_pixel, wr_pixel;
  logic   ds_valid, gw_valid, us_valid, wr_valid;

  down_sample #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_down (
    .clk, .rst, .pixel_in (src_pixel), .valid_in (src_valid),
    .pixel_out (ds_pixel), .valid_out (ds_valid)
  );

  gaussian_wrapper #(.LINE_W(WIDTH / 2), .LINES(HEIGHT / 2)) u_dog (
    .clk, .rst, .sel, .pixel_in (ds_pixel), .valid_in (ds_valid),
    .pixel_out (gw_pixel), .valid_out (gw_valid)
  );

  gaussian_wrapper_multi #(.LINE_W(WIDTH / 2), .LINES(HEIGHT / 2), .LEVELS(LEVELS)) u_multi (
    .clk, .rst, .pixel_in (ds_pixel), .valid_in (ds_valid),
    .dog (ms_dog), .valid_out (ms_valid)
  );

  up_sample #(.LINE(WIDTH)) u_up (
    .clk, .rst, .pixel_in (gw_pixel), .valid_in (gw_valid),
    .pixel_out (us_pixel), .valid_out (us_valid), .replay (us_replay)
  );

  assign wr_pixel = bypass ? src_pixel : us_pixel;
  assign wr_valid = bypass ? src_valid : us_valid;

  logic bg_start, bg_start_ack, bg_done, bg_done_ack, swap, swap_ack, front_buf;

  swap_controller u_swap (
    .clk, .rst, .system_ready,
    .bg_start, .bg_start_ack, .bg_done, .bg_done_ack,
    .ol_start, .ol_start_ack, .ol_done, .ol_done_ack,
    .swap, .swap_ack, .state (sw_state)
  );

  logic       w0_valid, w0_pop;
  sram_wreq_t w0_req;

  image_buffer_writer #(.FRAME_PIX(FRAME_PIX)) u_writer (
    .clk, .rst,
    .bg_start, .bg_start_ack, .bg_done, .bg_done_ack, .back_buf (~front_buf),
    .src_start, .src_start_ack, .pixel_in (wr_pixel), .valid_in (wr_valid),
    .w0_valid, .w0_req, .w0_pop
  );

  logic               r0_valid, r0_data_full, r0_pop, r0_data_valid;
  logic [SRAM_AW-1:0] r0_addr;
  logic [SRAM_DW-1:0] rdata;

  image_buffer_reader #(.FRAME_PIX(FRAME_PIX)) u_reader (
    .clk, .rst, .swap, .swap_ack, .front_buf,
    .r0_valid, .r0_addr, .r0_data_full, .r0_pop, .r0_data_valid, .rdata,
    .disp_pixel, .disp_valid, .disp_sof, .disp_ready
  );

  sram_arbiter #(.SRAM_LAT(SRAM_LAT)) u_arb (
    .clk, .rst,
    .w0_valid, .w0_req, .w0_pop,
    .w1_valid, .w1_req, .w1_pop,
    .r0_valid, .r0_addr, .r0_data_full, .r0_pop, .r0_data_valid,
    .r1_valid, .r1_addr, .r1_data_full, .r1_pop, .r1_data_valid,
    .rdata,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_mask, .sram_rdata,
    .state (arb_state)
  );
  assign r1_data = rdata;
endmodule
