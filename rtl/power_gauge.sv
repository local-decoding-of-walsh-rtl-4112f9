// power_gauge: bar gauge for the estimated power.
//
// Like the BER gauge, draws `value` rectangles stacked upwards from line
// Y1 (zero draws nothing), but rectangle r is colored from green at the
// bottom towards red at the top: red = 42*r, green = 128 - 18*r, blue 0.
// Rectangle r covers lines Y1-19r-14 .. Y1-19r and pixels X0+6 .. X0+79.
// The stacking, the zero rule and the green-to-red ramp are the
// original design's; the sizes and exact colors are this design's. Combinational.
module power_gauge
  import walsh_pkg::*;
#(
  parameter int unsigned X0 = 358,
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
    up  = int'(Y1) - int'(line);
    r   = up / 19;
    hit = (up >= 0) && (up % 19 <= 14) && (r < int'(value))
          && (pixel >= 10'(X0 + 6)) && (pixel <= 10'(X0 + 79));
  end
  assign color = hit ? {8'(42 * r), 8'(128 - 18 * r), 8'd0} : BLACK;
endmodule
