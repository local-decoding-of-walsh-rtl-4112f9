// vga: 640x480, 60 Hz raster timing.
//
// A pixel counter runs 0..H_TOTAL-1 and a line counter 0..V_TOTAL-1. The
// visible area is pixels 0..639 of lines 0..479; `blank` is high outside
// it. hsync and vsync are active low. The 640x480 at 60 Hz format is the
// original design's; the porch and sync lengths are the common values for that
// format (horizontal 16/96/48, vertical 10/2/33). All outputs are registered
// together, so they describe the same pixel.
module vga #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_TOTAL  = 800,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_TOTAL  = 525
) (
  input  logic       clk,
  input  logic       rst,
  output logic [9:0] pixel,
  output logic [9:0] line,
  output logic       hsync,
  output logic       vsync,
  output logic       blank
);
  logic [9:0] p_n, l_n;
  always_comb begin
    p_n = pixel + 1'b1;
    l_n = line;
    if (pixel == 10'(H_TOTAL - 1)) begin
      p_n = '0;
      l_n = (line == 10'(V_TOTAL - 1)) ? '0 : line + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pixel <= '0; line <= '0; hsync <= 1'b1; vsync <= 1'b1; blank <= 1'b0;
    end else begin
      pixel <= p_n;
      line  <= l_n;
      hsync <= !(p_n >= 10'(H_ACTIVE + H_FP) && p_n < 10'(H_ACTIVE + H_FP + H_SYNC));
      vsync <= !(l_n >= 10'(V_ACTIVE + V_FP) && l_n < 10'(V_ACTIVE + V_FP + V_SYNC));
      blank <= (p_n >= 10'(H_ACTIVE)) || (l_n >= 10'(V_ACTIVE));
    end
  end
endmodule
