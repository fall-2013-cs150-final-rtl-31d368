// tb_fwft_fifo: random pushes and pops against a queue model. Checks the
// head word (visible without read latency), empty, full and count.
module tb_fwft_fifo;
  localparam int unsigned W = 8, D = 5;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  fwft_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      chk(count == model.size(), "count");
      if (model.size() > 0) chk(dout == model[0], "head");
      wr_en = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35)) && !full;
      rd_en = ($urandom_range(0, 99) < ((i / 500) % 2 ? 35 : 70)) && !empty;
      din = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
