// tb_hline: scans a 640x480 frame and checks that exactly the pixels
// X0..X1 of line Y are colored.
module tb_hline;
  import walsh_pkg::*;
  int checks = 0, failures = 0;
  logic [9:0] pixel, line;
  rgb_t color;
  hline #(.X0(100), .X1(300), .Y(50), .COLOR(24'h123456)) dut (.pixel, .line, .color);
  initial begin
    for (int y = 0; y < 480; y += 1)
      for (int x = 0; x < 640; x += 1) begin
        pixel = 10'(x); line = 10'(y);
        #1;
        checks++;
        if (color != ((x >= 100 && x <= 300 && y == 50) ? 24'h123456 : 24'h0)) begin
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
