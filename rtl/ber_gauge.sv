// ber_gauge: bar gauge for the bit error count.
//
// Draws `value` rectangles stacked upwards from line Y1 inside the box
// that starts at pixel X0; zero draws nothing. Rectangle r (r = 0 at the
// bottom) covers lines Y1-19r-14 .. Y1-19r and pixels X0+6 .. X0+79.
// The stacking and the zero rule are the original design's; sizes and the light
// grey color are this design's. Combinational.
module ber_gauge
  import walsh_pkg::*;
#(
  parameter int unsigned X0 = 135,
  parameter int unsigned Y1 = 417
) (
  input  logic [2:0] value,
  input  logic [9:0] pixel,
  input  logic [9:0] line,
  output rgb_t       color
);
  int   up, r;
  logic hit;
  always_comb begin
    up  = int'(Y1) - int'(line);          // lines above the bottom
    r   = up / 19;
    hit = (up >= 0) && (up % 19 <= 14) && (r < int'(value))
          && (pixel >= 10'(X0 + 6)) && (pixel <= 10'(X0 + 79));
  end
  assign color = hit ? GREY : BLACK;
endmodule
