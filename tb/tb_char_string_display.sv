// tb_char_string_display: draws "Hi A!" at (50,20) at scale 2 from a
// scrambled stand-in font and checks every pixel of the surrounding area,
// one cycle after it is presented, against the font bit it should show.
module tb_char_string_display;
  import walsh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic [9:0] pixel = 0, line = 0;
  logic [10:0] font_addr;
  logic [7:0] font_row;
  rgb_t color;
  localparam logic [39:0] TEXT = "Hi A!";
  char_string_display #(.NCHAR(5), .X0(50), .Y0(20), .SCALE_LOG2(1)) dut
    (.clk, .rst, .text(TEXT), .pixel, .line, .font_addr, .font_row, .color);
  font_rom_model u_font (.clk, .addr(font_addr), .row(font_row));

  function automatic logic expect_px(input int x, input int y);
    int dx = x - 50, dy = y - 20;
    logic [7:0] ch, bits;
    logic [10:0] a;
    if (dx < 0 || dx >= 80 || dy < 0 || dy >= 32) return 1'b0;
    ch = TEXT[8*(4 - dx/16) +: 8];
    a = {ch[6:0], 4'(dy/2)};
    bits = (a[10:4] == 7'h20) ? 8'h00 : {a[10:7] ^ a[3:0], a[6:4] ^ a[2:0], a[3]};
    return bits[7 - (dx/2) % 8];
  endfunction

  initial begin
    int px, py, lit;
    px = -1; py = -1; lit = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int y = 15; y < 56; y++)
      for (int x = 45; x < 135; x++) begin
        pixel = 10'(x); line = 10'(y);
        @(negedge clk);
        checks++;
        if ((color == WHITE) != expect_px(x, y) || (color != WHITE && color != BLACK)) begin
          failures++; if (failures < 10) $display("FAIL x=%0d y=%0d", x, y);
        end
        if (color == WHITE) lit++;
      end
    checks++;
    if (lit < 200) begin failures++; $display("FAIL too few lit %0d", lit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
