// tb_dog_top: end-to-end run of the whole design on small frames (64x48).
//
// Around dog_top it models the external parts: an SRAM with two cycles of
// read latency, an image source that streams one frame per start
// request, an overlay engine that acknowledges its pass, and a display
// that takes pixels with random stalls. Four frames are written:
//   A  bypass, random image            -> stored exactly
//   B  DoG of a flat image             -> zero below the warm-up rows
//   C  G1 of a flat image              -> the flat value
//   D  DoG of a vertical step          -> zero far from the step,
//                                         non-zero next to it
// After every background write the back buffer in the SRAM model is
// compared with the expectation; the display stream is compared with the
// front buffer for the whole run and must show every swapped frame.
// It counts the mechanisms and fails if one never happened: bypass and
// filtered frames, buffer swaps, overlay passes, up-sampler line
// replays, arbiter W0 and R0 services, display stalls, and outputs of
// the multi-level cascade.
module tb_dog_top;
  import dog_pkg::*;
  localparam int unsigned W = 64, H = 48;

  localparam int unsigned FP = W * H, FW = FP / 4;
  localparam int unsigned CHECK_ROW0 = 24;   // rows above still hold filter warm-up
  localparam int unsigned EDGE_MARGIN = 24;  // columns near the step or the line wrap
  localparam int unsigned SAW = 18;

  logic clk = 0, rst = 1;
  dog_sel_e sel;
  logic bypass, system_ready;
  logic src_start, src_start_ack, src_valid;
  pixel_t src_pixel;
  logic ol_start, ol_start_ack, ol_done, ol_done_ack;
  logic w1_valid, w1_pop, r1_valid, r1_data_full, r1_pop, r1_data_valid;
  sram_wreq_t w1_req;
  logic [SRAM_AW-1:0] r1_addr;
  logic [SRAM_DW-1:0] r1_data;
  logic sram_en, sram_we;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata;
  logic [SRAM_MW-1:0] sram_mask;
  pixel_t disp_pixel;
  logic disp_valid, disp_sof, disp_ready;
  arb_state_e arb_state;
  swap_state_e sw_state;
  logic us_replay;
  pixel_t ms_dog [4];
  logic ms_valid [4];
  int n_ms_valid = 0, n_ms_nonzero = 0;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_filtered = 0, n_swaps = 0, n_overlay = 0, n_replay = 0;
  int n_w0 = 0, n_r0 = 0, n_w0_idle_w0 = 0, n_stall = 0, n_disp_frames = 0, n_dog_nonzero = 0;

  dog_top #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst, .sel, .bypass, .system_ready,
    .src_start, .src_start_ack, .src_pixel, .src_valid,
    .ol_start, .ol_start_ack, .ol_done, .ol_done_ack,
    .w1_valid, .w1_req, .w1_pop,
    .r1_valid, .r1_addr, .r1_data_full, .r1_pop, .r1_data_valid, .r1_data,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_mask, .sram_rdata,
    .disp_pixel, .disp_valid, .disp_sof, .disp_ready,
    .ms_dog, .ms_valid,
    .arb_state, .sw_state, .us_replay
  );

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // SRAM model, read latency 2.
  logic [SRAM_DW-1:0] sram [2**SRAM_AW];
  logic [SRAM_DW-1:0] rd1, rd2;
  always_ff @(posedge clk) begin
    if (sram_en && sram_we)
      for (int b = 0; b < SRAM_MW; b++)
        if (sram_mask[b]) sram[sram_addr][b*8 +: 8] <= sram_wdata[b*8 +: 8];
    rd1 <= sram[sram_addr];
    rd2 <= rd1;
  end
  assign sram_rdata = rd2;

  // Test images.
  typedef enum int {IMG_RANDOM, IMG_FLAT100, IMG_FLAT60, IMG_STEP} img_e;
  img_e cur_img;
  function automatic pixel_t image_px(input img_e k, input int x, input int y);
    case (k)
      IMG_RANDOM:  return pixel_t'((x * 37 + y * 11 + (x * y) % 23) % 256);
      IMG_FLAT100: return 8'd100;
      IMG_FLAT60:  return 8'd60;
      default:     return (x < W / 2) ? 8'd20 : 8'd220;
    endcase
  endfunction

  function automatic pixel_t stored_px(input int b, input int i);
    return sram[b * FW + i / 4][(i % 4) * 8 +: 8];
  endfunction

  // Overlay engine: acknowledges, then reports done after a few cycles.
  always @(negedge clk) begin
    if (rst) begin
      ol_start_ack <= 0; ol_done <= 0;
    end else begin
      ol_start_ack <= ol_start;
      if (ol_start_ack) begin n_overlay++; ol_done <= 1; end
      else if (ol_done_ack) ol_done <= 0;
    end
  end

  // Display: random stalls; compare with the front buffer.
  int front = 0, disp_buf = 0, disp_idx = 0;
  logic disp_synced = 0;
  always @(negedge clk) begin
    if (!rst) begin
      disp_ready <= ($urandom_range(0, 9) != 0);
      if (!disp_ready) n_stall++;
    end
  end
  always @(posedge clk) begin
    if (!rst && disp_valid && disp_ready) begin
      if (disp_sof) begin
        if (disp_synced) begin chk(disp_idx == FP, "display frame length"); n_disp_frames++; end
        disp_buf = front; disp_idx = 0; disp_synced = 1;
      end
      if (disp_synced) begin
        if (disp_pixel != stored_px(disp_buf, disp_idx)) chk(0, "display pixel");
        else checks++;
        disp_idx++;
      end
    end
  end

  // Mechanism counters from the observation ports.
  arb_state_e a1, a2;
  swap_state_e s1;
  always @(posedge clk) begin
    if (!rst) begin
      if (arb_state == ARB_W0) n_w0++;
      if (arb_state == ARB_R0) n_r0++;
      if (a2 == ARB_W0 && a1 == ARB_IDLE && arb_state == ARB_W0) n_w0_idle_w0++;
      if (us_replay) n_replay++;
      for (int i = 0; i < 4; i++) if (ms_valid[i]) begin
        n_ms_valid++;
        if (ms_dog[i] != 0) n_ms_nonzero++;
      end
      if (s1 == SW_SWAP && sw_state == SW_BG_START) begin n_swaps++; front = 1 - front; end
      a2 <= a1; a1 <= arb_state; s1 <= sw_state;
    end
  end

  // Image source: one frame per start request.
  task automatic serve_frame(input img_e k, input logic byp, input dog_sel_e s);
    while (!src_start) @(negedge clk);
    bypass = byp; sel = s; cur_img = k;
    src_start_ack = 1;
    @(negedge clk);
    src_start_ack = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        src_valid = 1; src_pixel = image_px(k, x, y);
        @(negedge clk);
      end
    src_valid = 0; src_pixel = 0;
  endtask

  // Check the back buffer once the background write is done.
  task automatic check_frame(input img_e k, input logic byp, input dog_sel_e s);
    int b;
    while (sw_state != SW_BG_WAIT) @(negedge clk);
    while (sw_state == SW_BG_WAIT) @(negedge clk);
    b = 1 - front;
    if (byp) n_bypass++; else n_filtered++;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        pixel_t got = stored_px(b, y * W + x);
        if (byp) chk(got == image_px(k, x, y), "bypass frame stored");
        else if (y >= CHECK_ROW0) begin
          if (k == IMG_STEP) begin
            if (x >= EDGE_MARGIN && x < W - EDGE_MARGIN && (x < W / 2 - EDGE_MARGIN || x >= W / 2 + EDGE_MARGIN))
              chk(got == 0, "DoG zero away from the step");
            if (got != 0) n_dog_nonzero++;
          end else if (s == SEL_DOG) chk(got == 0, "DoG of flat image");
          else chk(got == image_px(k, x, y), "G1 of flat image");
        end
      end
  endtask

  task automatic run_frame(input img_e k, input logic byp, input dog_sel_e s);
    fork
      serve_frame(k, byp, s);
      check_frame(k, byp, s);
    join
  endtask

  initial begin
    sel = SEL_DOG; bypass = 0; system_ready = 0;
    src_start_ack = 0; src_valid = 0; src_pixel = 0;
    w1_valid = 0; w1_req = '0; r1_valid = 0; r1_addr = '0; r1_data_full = 0;
    disp_ready = 0; cur_img = IMG_RANDOM;
    foreach (sram[i]) sram[i] = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    @(negedge clk);
    system_ready = 1;
    run_frame(IMG_RANDOM, 1'b1, SEL_DOG);
    run_frame(IMG_FLAT100, 1'b0, SEL_DOG);
    run_frame(IMG_FLAT60, 1'b0, SEL_G1);
    run_frame(IMG_STEP, 1'b0, SEL_DOG);
    // let the last frame be swapped in and displayed once
    while (n_swaps < 4) @(negedge clk);
    begin
      int f0 = n_disp_frames;
      while (n_disp_frames < f0 + 2) @(negedge clk);
    end
    chk(n_bypass == 1, "bypass frame written");
    chk(n_filtered == 3, "filtered frames written");
    chk(n_swaps >= 4, "buffer swaps");
    chk(n_overlay >= 4, "overlay passes");
    chk(n_replay > 0, "up-sampler line replays");
    chk(n_w0 >= 4 * FW, "arbiter W0 services");
    chk(n_r0 > 0, "arbiter R0 services");
    chk(n_stall > 0, "display stalls");
    chk(n_disp_frames >= 2, "display frames");
    chk(n_dog_nonzero > 0, "DoG responds at the step");
    chk(n_ms_valid == 4 * 4 * FP / 4, "multi-level outputs, one per down-sampled pixel and level");
    chk(n_ms_nonzero > 0, "multi-level cascade responds");
    $display("mechanisms: bypass=%0d filtered=%0d swaps=%0d overlay=%0d replay=%0d w0=%0d r0=%0d w0_idle_w0=%0d stalls=%0d disp_frames=%0d dog_nonzero=%0d ms_valid=%0d ms_nonzero=%0d",
             n_bypass, n_filtered, n_swaps, n_overlay, n_replay, n_w0, n_r0, n_w0_idle_w0, n_stall, n_disp_frames, n_dog_nonzero, n_ms_valid, n_ms_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
