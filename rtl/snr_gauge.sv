// snr_gauge: position gauge for the channel SNR.
//
// Draws one narrow green rectangle, 6 lines high, whose top is at line
// Y0 + 18*value, pixels X0+6 .. X0+79: value 0 is the topmost position and
// each step moves it down. The top-is-zero rule is the original design's; the
// sizes are this design's, and the top level feeds it minus the SNR in dB
// (0 dB -> 0, -5 dB -> 5). Combinational.
module snr_gauge
  import walsh_pkg::*;
#(
  parameter int unsigned X0 = 247,
  parameter int unsigned Y0 = 284
) (
  input  logic [2:0] value,
  input  logic [9:0] pixel,
  input  logic [9:0] line,
  output rgb_t       color
);
  int   top;
  logic hit;
  always_comb begin
    top = int'(Y0) + 18 * int'(value);
    hit = (int'(line) >= top) && (int'(line) < top + 6)
          && (pixel >= 10'(X0 + 6)) && (pixel <= 10'(X0 + 79));
  end
  assign color = hit ? GREEN : BLACK;
endmodule
