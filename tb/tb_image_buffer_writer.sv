// tb_image_buffer_writer: two frames of random pixels (with random valid
// gaps) are written, first into buffer 1, then into buffer 0. A
// behavioural arbiter pops the W0 request FIFO at random (at least once
// every four cycles) and stores each word in a memory model. Checks the
// start / source-start / done handshakes, that no pixel is taken before
// src_start_ack, and that every word of each buffer holds its four pixels
// low byte first at base + word index.
module tb_image_buffer_writer;
  import dog_pkg::*;
  localparam int unsigned FP = 96, FW = FP / 4;
  logic clk = 0, rst = 1;
  logic bg_start, bg_start_ack, bg_done, bg_done_ack, back_buf;
  logic src_start, src_start_ack, valid_in, w0_valid, w0_pop;
  pixel_t pixel_in;
  sram_wreq_t w0_req;
  int checks = 0, failures = 0;
  logic [31:0] mem [2*FW];
  pixel_t img [FP];

  image_buffer_writer #(.FRAME_PIX(FP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Arbiter model: pops at random, at most every other cycle like a
  // W0 -> other -> W0 rotation, at least once per four cycles.
  int since = 0;
  always @(negedge clk) begin
    w0_pop <= 1'b0;
    if (!rst && w0_valid) begin
      since++;
      if (since >= 4 || $urandom_range(0, 1) == 0) begin
        w0_pop <= 1'b1;
        since = 0;
      end
    end
  end
  always @(posedge clk) begin
    if (w0_pop) begin
      chk(w0_req.mask == 4'hF, "full-word mask");
      if (w0_req.addr < 2 * FW) mem[w0_req.addr] <= w0_req.data;
      else chk(0, "address in range");
    end
  end

  task automatic frame(input logic b);
    int n = 0, waitc = 0;
    foreach (img[i]) img[i] = pixel_t'($urandom);
    @(negedge clk);
    back_buf = b; bg_start = 1;
    do @(negedge clk); while (!bg_start_ack);
    bg_start = 0;
    chk(src_start, "source start requested");
    repeat (3) begin @(negedge clk); chk(src_start, "source start held"); end
    src_start_ack = 1;
    @(negedge clk);
    src_start_ack = 0;
    chk(!src_start, "source start released");
    while (n < FP) begin
      valid_in = ($urandom_range(0, 4) != 0);
      pixel_in = valid_in ? img[n] : pixel_t'($urandom);
      if (valid_in) n++;
      chk(!bg_done, "not done during frame");
      @(negedge clk);
    end
    valid_in = 0;
    while (!bg_done && waitc < 100) begin @(negedge clk); waitc++; end
    chk(bg_done, "done raised");
    chk(!w0_valid, "all requests drained before done");
    repeat (2) begin @(negedge clk); chk(bg_done, "done held"); end
    bg_done_ack = 1;
    @(negedge clk);
    bg_done_ack = 0;
    @(negedge clk);
    chk(!bg_done, "done released");
    for (int w = 0; w < FW; w++)
      chk(mem[b * FW + w] == {img[4*w+3], img[4*w+2], img[4*w+1], img[4*w]}, "stored word");
  endtask

  initial begin
    bg_start = 0; bg_done_ack = 0; back_buf = 0; src_start_ack = 0; valid_in = 0; pixel_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // pixels offered before the source was started must be ignored
    repeat (10) begin @(negedge clk); valid_in = 1; pixel_in = 8'hEE; chk(!w0_valid, "idle ignores pixels"); end
    valid_in = 0;
    frame(1'b1);
    frame(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
