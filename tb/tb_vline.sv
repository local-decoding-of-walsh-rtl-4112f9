// tb_vline: scans a 640x480 frame and checks that exactly the pixels
// Y0..Y1 of column X are colored.
module tb_vline;
  import walsh_pkg::*;
  int checks = 0, failures = 0;
  logic [9:0] pixel, line;
  rgb_t color;
  vline #(.Y0(100), .Y1(300), .X(50), .COLOR(24'h123456)) dut (.pixel, .line, .color);
  initial begin
    for (int y = 0; y < 480; y += 1)
      for (int x = 0; x < 640; x += 1) begin
        pixel = 10'(x); line = 10'(y);
        #1;
        checks++;
        if (color != ((y >= 100 && y <= 300 && x == 50) ? 24'h123456 : 24'h0)) begin
          failures++; if (failures < 10) $display("FAIL %0d,%0d", x, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
