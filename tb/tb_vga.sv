// tb_vga: runs more than one frame and checks the counters' wrap points,
// the sync pulse positions and widths, and blanking against the standard
// 640x480 timing (800 x 525 clocks per frame).
module tb_vga;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, hsync, vsync, blank;
  logic [9:0] pixel, line;
  vga dut (.clk, .rst, .pixel, .line, .hsync, .vsync, .blank);
  initial begin
    int ep = 0, el = 0, hs_cnt = 0, vs_cnt = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 800*525 + 5000; c++) begin
      @(negedge clk);
      ep = ep + 1;
      if (ep == 800) begin ep = 0; el = (el + 1) % 525; end
      checks++;
      if (int'(pixel) != ep || int'(line) != el
          || hsync != !(ep >= 656 && ep < 752)
          || vsync != !(el >= 490 && el < 492)
          || blank != (ep >= 640 || el >= 480)) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d,%0d got %0d,%0d h%0d v%0d b%0d", ep, el, pixel, line, hsync, vsync, blank);
      end
      if (!hsync) hs_cnt++;
      if (!vsync && ep == 0) vs_cnt++;
    end
    checks++;
    if (hs_cnt < 96 * 525 || vs_cnt != 2) begin failures++; $display("FAIL sync counts %0d %0d", hs_cnt, vs_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
