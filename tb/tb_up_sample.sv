// tb_up_sample: feeds the 1-in-4 valid pattern of a down-sampled stream
// (valid pixels on even slots of every other row of LINE slots) and
// checks the doubled output: each row pair must read p0 p0 p1 p1 ... twice,
// the second copy replayed from the line FIFO. After an idle gap longer
// than two rows a second burst starts at an arbitrary phase and must be
// doubled the same way.
module tb_up_sample;
  import dog_pkg::*;
  localparam int unsigned LINE = 8, PAIRS = 4;
  logic clk = 0, rst = 1;
  pixel_t pixel_in, pixel_out;
  logic valid_in, valid_out, replay;
  int checks = 0, failures = 0, replays = 0;

  up_sample #(.LINE(LINE)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic burst();
    pixel_t line_px [LINE/2];
    for (int p = 0; p < PAIRS; p++) begin
      foreach (line_px[i]) line_px[i] = pixel_t'($urandom_range(0, 255));
      for (int r = 0; r < 2; r++) begin
        for (int s = 0; s < LINE; s++) begin
          @(negedge clk);
          valid_in = (r == 0) && (s % 2 == 0);
          pixel_in = valid_in ? line_px[s/2] : pixel_t'($urandom);
          #1;
          chk(valid_out, "valid_out");
          chk(pixel_out == line_px[s/2], "doubled pixel");
          chk(replay == (r == 1), "replay phase");
          if (replay) replays++;
        end
      end
    end
    @(negedge clk); valid_in = 0;
  endtask

  initial begin
    pixel_in = 0; valid_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    burst();
    repeat (2 * LINE + 7) @(posedge clk);
    #1 chk(!valid_out, "idle after burst");
    burst();
    chk(replays == 2 * PAIRS * LINE, "replay count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
