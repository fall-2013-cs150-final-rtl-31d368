// tb_swap_controller: behavioural writer, overlay and reader answer the
// controller's requests after random delays. Checks that nothing starts
// st_before system_ready, that each request is held until its acknowledge,
// that the handshakes come in the order background start, background
// done, overlay start, overlay done, swap, and that the loop repeats;
// also checks the state after each handshake.
module tb_swap_controller;
  import dog_pkg::*;
  logic clk = 0, rst = 1;
  logic system_ready, bg_start, bg_start_ack, bg_done, bg_done_ack;
  logic ol_start, ol_start_ack, ol_done, ol_done_ack, swap, swap_ack;
  swap_state_e state;
  int checks = 0, failures = 0, loops = 0, step = 0;

  swap_controller dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Each event is recorded when its acknowledge is seen at a clock edge;
  // expected cyclic order 0..4.
  task automatic event_seen(input int id, input string name);
    chk(id == step, {"order: ", name});
    step = (step + 1) % 5;
    if (id == 4) loops++;
  endtask

  int bg_delay, ol_delay;
  swap_state_e st_before;
  initial begin
    system_ready = 0; bg_start_ack = 0; bg_done = 0; ol_start_ack = 0; ol_done = 0; swap_ack = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (10) begin
      @(negedge clk);
      chk(!bg_start && !ol_start && !swap && state == SW_IDLE, "idle st_before system_ready");
    end
    system_ready = 1;
    while (loops < 6) begin
      @(negedge clk);
      bg_start_ack = 0; ol_start_ack = 0; swap_ack = 0;
      // writer: acknowledges start after a random delay, done later
      if (bg_start && $urandom_range(0, 2) == 0) begin
        bg_start_ack = 1; bg_delay = $urandom_range(2, 20);
      end
      if (ol_start && $urandom_range(0, 2) == 0) begin
        ol_start_ack = 1; ol_delay = $urandom_range(2, 20);
      end
      if (swap && $urandom_range(0, 3) == 0) swap_ack = 1;
      if (state == SW_BG_WAIT && !bg_done) begin
        if (bg_delay == 0) bg_done = 1; else bg_delay--;
      end
      if (bg_done && bg_done_ack) bg_done = 0;
      if (state == SW_OL_WAIT && !ol_done) begin
        if (ol_delay == 0) ol_done = 1; else ol_delay--;
      end
      if (ol_done && ol_done_ack) ol_done = 0;
      #1;
      // requests are held until acknowledged (state still waiting)
      if (state == SW_BG_START) chk(bg_start == !bg_start_ack, "bg_start held");
      if (state == SW_OL_START) chk(ol_start == !ol_start_ack, "ol_start held");
      if (state == SW_SWAP) chk(swap == !swap_ack, "swap held");
      st_before = state;
      @(posedge clk);
      #1;
      if (bg_start_ack) begin event_seen(0, "bg start"); chk(state == SW_BG_WAIT, "to BG_WAIT"); end
      if (state == SW_OL_START && st_before == SW_BG_WAIT) event_seen(1, "bg done");
      if (ol_start_ack) begin event_seen(2, "ol start"); chk(state == SW_OL_WAIT, "to OL_WAIT"); end
      if (state == SW_SWAP && st_before == SW_OL_WAIT) event_seen(3, "ol done");
      if (swap_ack) begin event_seen(4, "swap"); chk(state == SW_BG_START, "to BG_START"); end
    end
    chk(loops == 6, "six frame loops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
