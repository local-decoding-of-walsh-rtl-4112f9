// tb_power_gauge: for every value 0..7 scans the gauge box and checks that
// exactly 'value' rectangles are drawn from the bottom (rectangle r on
// lines Y1-19r-14 .. Y1-19r, pixels X0+6 .. X0+79), in the right color.
module tb_power_gauge;
  import walsh_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] value;
  logic [9:0] pixel, line;
  rgb_t color;
  power_gauge #(.X0(358), .Y1(417)) dut (.value, .pixel, .line, .color);
  initial begin
    for (int v = 0; v < 8; v++) begin
      int lit;
      lit = 0;
      value = 3'(v);
      for (int y = 270; y < 430; y++)
        for (int x = 358 - 2; x < 358 + 90; x++) begin
          int up, r;
          rgb_t exp;
          pixel = 10'(x); line = 10'(y);
          #1;
          up = 417 - y; r = up / 19;
          exp = (up >= 0 && up % 19 <= 14 && r < v && x >= 358 + 6 && x <= 358 + 79) ? {8'(42*r), 8'(128-18*r), 8'd0} : BLACK;
          if (color != BLACK) lit++;
          checks++;
          if (color != exp) begin failures++; if (failures < 10) $display("FAIL v=%0d x=%0d y=%0d", v, x, y); end
        end
      checks++;
      if (lit != v * 15 * 74) begin failures++; $display("FAIL v=%0d lit %0d", v, lit); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
