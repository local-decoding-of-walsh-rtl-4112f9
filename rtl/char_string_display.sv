// char_string_display: draws a line of text from a bitmap font ROM.
//
// The string (NCHAR ASCII bytes, first character in the most significant
// byte) is placed with its top-left corner at (X0, Y0). Each character is
// an 8x16 font cell magnified by 2**SCALE_LOG2. For the current pixel the
// module finds the character and the font row under it and presents
// font_addr = {ascii[6:0], row[3:0]}; the font ROM returns that row
// (8 bits, MSB leftmost) on the next cycle, and `color` is white when the
// bit under the pixel is set. `color` is therefore one cycle behind
// pixel/line. The lookup scheme and the scale factor are the original design's;
// the 8x16 cell, the one-cycle ROM and the color are this design's.
module char_string_display
  import walsh_pkg::*;
#(
  parameter int unsigned NCHAR      = 16,
  parameter int unsigned X0         = 0,
  parameter int unsigned Y0         = 0,
  parameter int unsigned SCALE_LOG2 = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [8*NCHAR-1:0] text,
  input  logic [9:0]         pixel,
  input  logic [9:0]         line,
  output logic [10:0]        font_addr,
  input  logic [7:0]         font_row,
  output rgb_t               color
);
  localparam int unsigned W = (8 * NCHAR) << SCALE_LOG2;
  localparam int unsigned H = 16 << SCALE_LOG2;

  int         dx, dy, ci;
  logic       in_box, in_q;
  logic [2:0] col, col_q;
  logic [3:0] row;
  logic [7:0] ch;

  always_comb begin
    dx     = int'(pixel) - int'(X0);
    dy     = int'(line) - int'(Y0);
    in_box = (dx >= 0) && (dx < int'(W)) && (dy >= 0) && (dy < int'(H));
    ci     = in_box ? (dx >> (SCALE_LOG2 + 3)) : 0;
    col    = 3'(dx >> SCALE_LOG2);
    row    = 4'(dy >> SCALE_LOG2);
    ch     = text[8*(int'(NCHAR) - 1 - ci) +: 8];
  end

  assign font_addr = {ch[6:0], row};

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q  <= 1'b0;
      col_q <= '0;
    end else begin
      in_q  <= in_box;
      col_q <= col;
    end
  end

  assign color = (in_q && font_row[3'd7 - col_q]) ? WHITE : BLACK;
endmodule
