// walsh_pkg: types and constants shared by the Walsh-decoder demonstrator.
// The decoder works on 64-chip Walsh codewords (6 bits each) of 10-bit
// received symbols, and the display on a 640x480 frame with 24-bit RGB
// colors. The algorithm encoding
// and the color type are this design's own choices.
package walsh_pkg;
  // The three decoding algorithms, in the order the mode button steps
  // through them.
  typedef enum logic [1:0] {
    ALGO_LOCAL    = 2'd0,
    ALGO_OPTIMAL  = 2'd1,
    ALGO_ADAPTIVE = 2'd2
  } algo_e;

  typedef logic [23:0] rgb_t;   // {red, green, blue}, 8 bits each

  localparam int unsigned SYM_W = 10;   // received symbol width

  localparam rgb_t WHITE = 24'hFFFFFF;
  localparam rgb_t GREY  = 24'hDCDCDC;
  localparam rgb_t GREEN = 24'h008000;
  localparam rgb_t BLUE  = 24'h0000FF;
  localparam rgb_t BLACK = 24'h000000;
endpackage
