// tb_snr_gauge: for every value 0..7 scans the gauge box and checks that
// a single green rectangle 6 lines high is drawn with its top at
// Y0 + 18*value (value 0 at the top).
module tb_snr_gauge;
  import walsh_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] value;
  logic [9:0] pixel, line;
  rgb_t color;
  snr_gauge #(.X0(247), .Y0(284)) dut (.value, .pixel, .line, .color);
  initial begin
    for (int v = 0; v < 8; v++) begin
      int lit, top;
      lit = 0; top = -1;
      value = 3'(v);
      for (int y = 270; y < 430; y++)
        for (int x = 240; x < 340; x++) begin
          pixel = 10'(x); line = 10'(y);
          #1;
          if (color == GREEN) begin lit++; if (top < 0) top = y; end
          checks++;
          if (color != GREEN && color != BLACK) failures++;
        end
      checks++;
      if (lit != 6 * 74 || top != 284 + 18 * v) begin failures++; $display("FAIL v=%0d lit=%0d top=%0d", v, lit, top); end
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
