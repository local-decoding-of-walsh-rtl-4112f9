// hline: one horizontal line of the display.
// color = COLOR when X0 <= pixel <= X1 and line == Y, otherwise black.
// Purely combinational. Used for the time axis and the top and bottom
// edges of the gauge boxes.
module hline
  import walsh_pkg::*;
#(
  parameter int unsigned X0    = 0,
  parameter int unsigned X1    = 639,
  parameter int unsigned Y     = 0,
  parameter rgb_t        COLOR = WHITE
) (
  input  logic [9:0] pixel,
  input  logic [9:0] line,
  output rgb_t       color
);
  assign color = (pixel >= 10'(X0) && pixel <= 10'(X1) && line == 10'(Y)) ? COLOR : BLACK;
endmodule
