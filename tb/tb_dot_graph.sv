// tb_dot_graph: shifts in a sequence of BER values and scans the graph
// area: a pixel must be lit exactly where slot i (newest at the left)
// draws its dash at line Y0 - STEP*value.
module tb_dot_graph;
  import walsh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, enable = 0;
  logic [2:0] ber = 0;
  logic [9:0] pixel = 0, line = 0;
  rgb_t color;
  int hist [8];
  dot_graph #(.DEPTH(8), .SLOT(9), .STEP(16), .X0(136), .Y0(248)) dut
    (.clk, .rst, .enable, .ber, .pixel, .line, .color);
  initial begin
    for (int i = 0; i < 8; i++) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 12; r++) begin
      ber = 3'($urandom);
      enable = 1; @(negedge clk); enable = 0;
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(ber);
      ber = 3'($urandom);               // not enabled: must be ignored
      @(negedge clk);
      for (int y = 120; y <= 250; y++)
        for (int x = 130; x < 136 + 8*9 + 4; x++) begin
          logic exp;
          int s, o;
          pixel = 10'(x); line = 10'(y);
          #1;
          s = (x - 136) / 9; o = (x - 136) % 9;
          exp = (x >= 136) && (s < 8) && (o >= 1) && (o <= 7) && (y == 248 - 16*hist[s]);
          checks++;
          if ((color == BLUE) != exp || (color != BLUE && color != BLACK)) begin
            failures++; if (failures < 10) $display("FAIL r=%0d x=%0d y=%0d", r, x, y);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
