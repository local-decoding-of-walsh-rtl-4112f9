// dot_graph: BER-over-time plot.
//
// A DEPTH-entry shift register of 3-bit BER values; each `enable` shifts
// the new value into entry 0 and moves the others one place back, so
// entry 0 is the newest. Entry i owns a SLOT-pixel-wide column starting at
// X0 + i*SLOT and is drawn as a blue dash SLOT-2 pixels wide, one line
// high, on line Y0 - STEP*value, where Y0 is the time axis. The 3-bit
// shift register and the enable-driven shifting are the original design's; the
// sizes, the newest-left direction and the dash shape are this design's.
// Drawing is combinational from pixel/line.
module dot_graph
  import walsh_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned SLOT  = 9,
  parameter int unsigned STEP  = 16,
  parameter int unsigned X0    = 136,
  parameter int unsigned Y0    = 248
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic [2:0] ber,
  input  logic [9:0] pixel,
  input  logic [9:0] line,
  output rgb_t       color
);
  logic [2:0] hist [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) hist[i] <= '0;
    end else if (enable) begin
      hist[0] <= ber;
      for (int i = 1; i < int'(DEPTH); i++) hist[i] <= hist[i-1];
    end
  end

  // which slot the pixel falls in, and where inside it
  int   dx, slot, off;
  logic hit;
  always_comb begin
    dx   = int'(pixel) - int'(X0);
    slot = dx / int'(SLOT);
    off  = dx % int'(SLOT);
    hit  = 1'b0;
    if (dx >= 0 && slot < int'(DEPTH) && off >= 1 && off <= int'(SLOT) - 2)
      hit = (int'(line) == int'(Y0) - int'(STEP) * int'(hist[slot[$clog2(DEPTH)-1:0]]));
  end

  assign color = hit ? BLUE : BLACK;
endmodule
