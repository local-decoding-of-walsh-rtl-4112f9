// walsh_labkit: the complete Walsh-decoding demonstrator.
//
// A test vector of noisy 64-chip Walsh codewords is decoded, one codeword
// per 5 Hz tick, by the algorithm the user picks: the generalized local
// decoder with a user-chosen number (2..8) of length-8 FHTs, the optimal
// length-64 FHT decoder, or the adaptive decoder whose FHT count a
// feedback controller sets from the measured bit errors. The screen shows
// the error count over time and gauges for errors, SNR and estimated
// power.
//
// Data path per tick: divider -> vector_select restarts the chip address
// -> test_vector_rom (one cycle) -> walsh_decoder, started one cycle after
// the tick so that chip k arrives on its k-th cycle -> ber_detector
// against the transmitted word -> feedback_controller (adaptive mode only)
// and display. Buttons pass through debounce. Left/right set the user FHT
// count (2..8, 2 after reset), up/down the SNR vector, btn_3 the algorithm.
//
// `clk` is the 26.6 MHz pixel clock; the clock manager that makes it is
// outside this design. Font ROMs are outside too: one font_addr/font_row
// pair per caption string (seven), font_row returned one cycle after
// font_addr. VGA outputs are aligned with the one-cycle display pipeline.
// The power estimate shown is 7 for the optimal decoder and num_fhts/2 for
// the local ones (about the ratio of their butterfly additions); the SNR
// gauge shows minus the SNR in dB. Both mappings are this design's.
module walsh_labkit
  import walsh_pkg::*;
#(
  parameter int unsigned DIVISOR  = 5_320_000,
  parameter int unsigned DEBOUNCE = 266_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        btn_up,
  input  logic        btn_down,
  input  logic        btn_left,
  input  logic        btn_right,
  input  logic        btn_3,
  output logic [10:0] font_addr [7],
  input  logic [7:0]  font_row  [7],
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  output logic [5:0]  decoded,
  output logic        decoded_valid,
  output logic [2:0]  errors,
  output logic [3:0]  num_fhts,
  output algo_e       algo
);
  // buttons
  logic up, down, left, right, b3;
  debounce #(.DELAY(DEBOUNCE)) u_db_up    (.clk, .rst, .noisy(btn_up),    .clean(up));
  debounce #(.DELAY(DEBOUNCE)) u_db_down  (.clk, .rst, .noisy(btn_down),  .clean(down));
  debounce #(.DELAY(DEBOUNCE)) u_db_left  (.clk, .rst, .noisy(btn_left),  .clean(left));
  debounce #(.DELAY(DEBOUNCE)) u_db_right (.clk, .rst, .noisy(btn_right), .clean(right));
  debounce #(.DELAY(DEBOUNCE)) u_db_3     (.clk, .rst, .noisy(btn_3),     .clean(b3));

  algorithm_selector u_algo (.clk, .rst, .button(b3), .algo(algo));

  // user FHT count, 2..8
  logic [3:0] user_fhts;
  logic       left_q, right_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      user_fhts <= 4'd2; left_q <= 1'b0; right_q <= 1'b0;
    end else begin
      left_q  <= left;
      right_q <= right;
      if (left && !left_q && user_fhts > 4'd2)        user_fhts <= user_fhts - 1'b1;
      else if (right && !right_q && user_fhts < 4'd8) user_fhts <= user_fhts + 1'b1;
    end
  end

  // codeword timing
  logic tick, start;
  divider #(.DIVISOR(DIVISOR)) u_div (.clk, .rst, .enable(tick));
  always_ff @(posedge clk) begin
    if (rst) start <= 1'b0;
    else     start <= tick;
  end

  logic [9:0] addr;
  logic       vector;
  logic [2:0] codeword;
  vector_select u_vsel (.clk, .rst, .up, .down, .enable(tick),
                        .addr, .vector, .codeword);

  logic signed [SYM_W-1:0] symbol;
  logic [5:0]              sent;
  test_vector_rom #(.SW(SYM_W)) u_rom (.clk, .addr, .symbol,
                                       .cw_addr({vector, codeword}), .sent);

  logic [3:0] fb_fhts;
  walsh_decoder #(.SW(SYM_W)) u_dec (
    .clk, .rst, .start, .algo, .user_fhts, .fb_fhts, .symbol,
    .bits(decoded), .ready(decoded_valid), .num_fhts(num_fhts));

  logic err_valid;
  ber_detector u_ber (.clk, .rst, .valid(decoded_valid), .decoded, .sent,
                      .errors, .err_valid);

  feedback_controller u_fb (.clk, .rst, .err_valid(err_valid && algo == ALGO_ADAPTIVE),
                            .errors, .num_fhts(fb_fhts));

  // display
  logic [9:0] pixel, line;
  logic       hs, vs, bl;
  vga u_vga (.clk, .rst, .pixel, .line, .hsync(hs), .vsync(vs), .blank(bl));

  logic [2:0] snr_code, power_code;
  assign snr_code   = vector ? 3'd5 : 3'd0;
  assign power_code = (algo == ALGO_OPTIMAL) ? 3'd7 : 3'(num_fhts >> 1);

  rgb_t color;
  display u_disp (.clk, .rst, .pixel, .line, .ber_valid(err_valid), .ber(errors),
                  .snr(snr_code), .power(power_code), .algo, .font_addr, .font_row,
                  .color);

  logic bl_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      vga_hsync <= 1'b1; vga_vsync <= 1'b1; bl_q <= 1'b1;
    end else begin
      vga_hsync <= hs; vga_vsync <= vs; bl_q <= bl;
    end
  end
  assign vga_blank = bl_q;
  assign {vga_r, vga_g, vga_b} = bl_q ? 24'd0 : color;
endmodule
