// swap_controller: sequences the double-buffered frame store.
//
// After reset it waits in IDLE for system_ready, then loops:
//   BG_START  request a background frame write (bg_start until bg_start_ack)
//   BG_WAIT   wait for bg_done, answer with bg_done_ack
//   OL_START  request the overlay pass (ol_start until ol_start_ack)
//   OL_WAIT   wait for ol_done, answer with ol_done_ack
//   SWAP      ask the reader to swap front and back buffers (swap until
//             swap_ack), then start the next background frame.
// Outputs are Mealy, as on the transition labels of the source state
// diagram: a request is held while its acknowledge is low; in OL_START
// bg_done_ack follows bg_done, and in SWAP ol_done_ack follows ol_done, so
// a done/ack pair can finish its four-phase return to zero.
// The states and labels follow the source design; one clock domain.
module swap_controller
  import dog_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        system_ready,
  output logic        bg_start,
  input  logic        bg_start_ack,
  input  logic        bg_done,
  output logic        bg_done_ack,
  output logic        ol_start,
  input  logic        ol_start_ack,
  input  logic        ol_done,
  output logic        ol_done_ack,
  output logic        swap,
  input  logic        swap_ack,
  output swap_state_e state
);
  swap_state_e next;

  always_comb begin
    next        = state;
    bg_start    = 1'b0;
    bg_done_ack = 1'b0;
    ol_start    = 1'b0;
    ol_done_ack = 1'b0;
    swap        = 1'b0;
    unique case (state)
      SW_IDLE:     if (system_ready) begin bg_start = 1'b1; next = SW_BG_START; end
      SW_BG_START: if (bg_start_ack) next = SW_BG_WAIT; else bg_start = 1'b1;
      SW_BG_WAIT:  if (bg_done) begin bg_done_ack = 1'b1; next = SW_OL_START; end
      SW_OL_START: begin
        bg_done_ack = bg_done;
        if (ol_start_ack) next = SW_OL_WAIT; else ol_start = 1'b1;
      end
      SW_OL_WAIT:  if (ol_done) begin ol_done_ack = 1'b1; next = SW_SWAP; end
      SW_SWAP: begin
        ol_done_ack = ol_done;
        if (swap_ack) next = SW_BG_START; else swap = 1'b1;
      end
      default:     next = SW_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= SW_IDLE;
    else     state <= next;
  end
endmodule
