// tb_down_sample: drives random pixels with random valid gaps through
// several small frames and checks that exactly the pixels at even column
// and even row pass with valid_out, that other cycles output black, and
// that each frame yields (W/2)*(H/2) valid pixels.
module tb_down_sample;
  import dog_pkg::*;
  localparam int unsigned W = 10, H = 6;
  logic clk = 0, rst = 1;
  pixel_t pixel_in, pixel_out;
  logic valid_in, valid_out;
  int checks = 0, failures = 0;
  int x = 0, y = 0, nvalid = 0;

  down_sample #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s x=%0d y=%0d", what, x, y); end
  endtask

  initial begin
    pixel_in = 0; valid_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) begin
      nvalid = 0;
      while (!(x == 0 && y == 0 && nvalid > 0)) begin
        @(negedge clk);
        pixel_in = pixel_t'($urandom_range(1, 255));
        valid_in = (f == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        #1;
        if (valid_in && x % 2 == 0 && y % 2 == 0) begin
          chk(valid_out == 1'b1, "valid_out high");
          chk(pixel_out == pixel_in, "pixel passed");
          nvalid++;
        end else begin
          chk(valid_out == 1'b0, "valid_out low");
          chk(pixel_out == 0, "black filler");
        end
        if (valid_in) begin
          x++;
          if (x == W) begin x = 0; y = (y + 1) % H; end
        end
        @(posedge clk);
      end
      chk(nvalid == (W / 2) * (H / 2), "valid pixels per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
