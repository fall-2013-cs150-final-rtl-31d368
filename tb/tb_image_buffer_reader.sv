// tb_image_buffer_reader: memory model holding two small frames, an
// arbiter model that accepts R0 requests at random (only when
// r0_data_full is low) and returns the word two cycles later, and a
// display that is ready at random. Checks the displayed stream is frame 0
// repeated with disp_sof on each first pixel, that the data FIFO never
// overflows, and that a swap request is acknowledged once at a frame
// boundary, after which whole frames of buffer 1 are shown.
module tb_image_buffer_reader;
  import dog_pkg::*;
  localparam int unsigned FP = 64, FW = FP / 4, LAT = 2;
  logic clk = 0, rst = 1;
  logic swap, swap_ack, front_buf;
  logic r0_valid, r0_data_full, r0_pop, r0_data_valid;
  logic [SRAM_AW-1:0] r0_addr;
  logic [SRAM_DW-1:0] rdata;
  pixel_t disp_pixel;
  logic disp_valid, disp_sof, disp_ready;
  int checks = 0, failures = 0, acks = 0, frames_b1 = 0, throttled = 0;
  logic [31:0] mem [2*FW];

  image_buffer_reader #(.FRAME_PIX(FP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Arbiter + SRAM model: pop decided at negedge, data LAT cycles later.
  logic [LAT-1:0] vpipe;
  logic [31:0]    dpipe [LAT];
  always @(negedge clk) begin
    r0_pop <= !rst && r0_valid && !r0_data_full && ($urandom_range(0, 1) == 0);
    if (r0_valid && r0_data_full) throttled++;
    disp_ready <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    vpipe <= {vpipe[LAT-2:0], r0_pop};
    dpipe[0] <= mem[r0_addr];
    for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
  end
  assign r0_data_valid = vpipe[LAT-1];
  assign rdata = dpipe[LAT-1];

  function automatic pixel_t px(input int b, input int i);
    return mem[b * FW + i / 4][(i % 4) * 8 +: 8];
  endfunction

  int idx = 0, cur = 0;
  logic synced = 0;
  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    swap = 0; vpipe = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      #1;
      if (cyc == 1500) swap = 1;
      if (disp_valid && disp_ready) begin
        if (disp_sof) begin
          chk(!synced || idx == FP, "frame length");
          idx = 0;
          if (synced && cur == 1) frames_b1++;
          if (acks > 0) cur = 1;
          synced = 1;
        end
        if (synced) begin
          chk(disp_pixel == px(cur, idx), "displayed pixel");
          idx++;
        end
      end
      @(posedge clk);
      #1;
      if (swap_ack) begin
        acks++;
        swap = 0;
      end
    end
    chk(acks == 1, "one swap acknowledge");
    chk(front_buf == 1'b1, "front buffer switched");
    chk(frames_b1 > 5, "frames from buffer 1 shown");
    chk(throttled > 0, "requests throttled by data FIFO room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
