// vline: one vertical line of the display.
// color = COLOR when Y0 <= line <= Y1 and pixel == X, otherwise black.
// Purely combinational. Used for the BER axis and the left and right
// edges of the gauge boxes.
module vline
  import walsh_pkg::*;
#(
  parameter int unsigned Y0    = 0,
  parameter int unsigned Y1    = 479,
  parameter int unsigned X     = 0,
  parameter rgb_t        COLOR = WHITE
) (
  input  logic [9:0] pixel,
  input  logic [9:0] line,
  output rgb_t       color
);
  assign color = (line >= 10'(Y0) && line <= 10'(Y1) && pixel == 10'(X)) ? COLOR : BLACK;
endmodule
