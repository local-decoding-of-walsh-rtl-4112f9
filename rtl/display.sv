// display: composes the demonstrator's screen.
//
// Layout (640x480): the title "Generalized Local Decoding" at the top; a
// BER-versus-time graph below it (vertical BER axis at x=135, time axis at
// y=249, a dot_graph plotting the last 32 error counts); three gauge boxes
// under the graph, left to right BER, SNR and Power, each with its caption
// above; and "Mode: ..." naming the active algorithm at the bottom. Every
// element is a small module that returns a color for the current
// (pixel, line); the colors are ORed. Text needs one cycle for the font
// lookup, so the other elements are registered once to stay aligned:
// `color` is one cycle behind pixel/line.
// Font ROMs are outside this module: one font_addr/font_row pair per
// string, NSTR = 7. The arrangement and the captions follow the
// original design's screen; coordinates and colors are this design's.
module display
  import walsh_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  pixel,
  input  logic [9:0]  line,
  input  logic        ber_valid,
  input  logic [2:0]  ber,
  input  logic [2:0]  snr,
  input  logic [2:0]  power,
  input  algo_e       algo,
  output logic [10:0] font_addr [7],
  input  logic [7:0]  font_row  [7],
  output rgb_t        color
);
  // gauge boxes: x ranges and common y range
  localparam int unsigned BOX_Y0 = 281, BOX_Y1 = 419;
  localparam int unsigned BER_X = 135, SNR_X = 247, PWR_X = 358, BOX_W = 85;

  rgb_t shape [14];

  hline #(.X0(135), .X1(441), .Y(249)) u_taxis (.pixel, .line, .color(shape[0]));
  vline #(.Y0(97),  .Y1(249), .X(135)) u_baxis (.pixel, .line, .color(shape[1]));

  hline #(.X0(BER_X), .X1(BER_X+BOX_W), .Y(BOX_Y0)) u_b_t (.pixel, .line, .color(shape[2]));
  hline #(.X0(BER_X), .X1(BER_X+BOX_W), .Y(BOX_Y1)) u_b_b (.pixel, .line, .color(shape[3]));
  hline #(.X0(SNR_X), .X1(SNR_X+BOX_W), .Y(BOX_Y0)) u_s_t (.pixel, .line, .color(shape[4]));
  hline #(.X0(SNR_X), .X1(SNR_X+BOX_W), .Y(BOX_Y1)) u_s_b (.pixel, .line, .color(shape[5]));
  hline #(.X0(PWR_X), .X1(PWR_X+BOX_W), .Y(BOX_Y0)) u_p_t (.pixel, .line, .color(shape[6]));
  hline #(.X0(PWR_X), .X1(PWR_X+BOX_W), .Y(BOX_Y1)) u_p_b (.pixel, .line, .color(shape[7]));
  // left and right box edges
  rgb_t edge_c [6];
  vline #(.Y0(BOX_Y0), .Y1(BOX_Y1), .X(BER_X))       u_b_l (.pixel, .line, .color(edge_c[0]));
  vline #(.Y0(BOX_Y0), .Y1(BOX_Y1), .X(BER_X+BOX_W)) u_b_r (.pixel, .line, .color(edge_c[1]));
  vline #(.Y0(BOX_Y0), .Y1(BOX_Y1), .X(SNR_X))       u_s_l (.pixel, .line, .color(edge_c[2]));
  vline #(.Y0(BOX_Y0), .Y1(BOX_Y1), .X(SNR_X+BOX_W)) u_s_r (.pixel, .line, .color(edge_c[3]));
  vline #(.Y0(BOX_Y0), .Y1(BOX_Y1), .X(PWR_X))       u_p_l (.pixel, .line, .color(edge_c[4]));
  vline #(.Y0(BOX_Y0), .Y1(BOX_Y1), .X(PWR_X+BOX_W)) u_p_r (.pixel, .line, .color(edge_c[5]));
  assign shape[8] = edge_c[0] | edge_c[1] | edge_c[2] | edge_c[3] | edge_c[4] | edge_c[5];

  dot_graph #(.X0(136), .Y0(248)) u_graph (
    .clk, .rst, .enable(ber_valid), .ber, .pixel, .line, .color(shape[9]));
  ber_gauge   #(.X0(BER_X), .Y1(BOX_Y1 - 2)) u_berg (.value(ber),   .pixel, .line, .color(shape[10]));
  snr_gauge   #(.X0(SNR_X), .Y0(BOX_Y0 + 3)) u_snrg (.value(snr),   .pixel, .line, .color(shape[11]));
  power_gauge #(.X0(PWR_X), .Y1(BOX_Y1 - 2)) u_pwrg (.value(power), .pixel, .line, .color(shape[12]));
  assign shape[13] = BLACK;

  rgb_t shapes_c, shapes_q;
  always_comb begin
    shapes_c = BLACK;
    for (int i = 0; i < 14; i++) shapes_c |= shape[i];
  end
  always_ff @(posedge clk) begin
    if (rst) shapes_q <= BLACK;
    else     shapes_q <= shapes_c;
  end

  // text
  logic [8*14-1:0] mode_text;
  always_comb begin
    unique case (algo)
      ALGO_OPTIMAL:  mode_text = "Mode: Optimal ";
      ALGO_ADAPTIVE: mode_text = "Mode: Adaptive";
      default:       mode_text = "Mode: Local   ";
    endcase
  end

  rgb_t txt [7];
  char_string_display #(.NCHAR(26), .X0(112), .Y0(24), .SCALE_LOG2(1)) u_title (
    .clk, .rst, .text("Generalized Local Decoding"), .pixel, .line,
    .font_addr(font_addr[0]), .font_row(font_row[0]), .color(txt[0]));
  char_string_display #(.NCHAR(3), .X0(124), .Y0(78)) u_lab_ber (
    .clk, .rst, .text("BER"), .pixel, .line,
    .font_addr(font_addr[1]), .font_row(font_row[1]), .color(txt[1]));
  char_string_display #(.NCHAR(4), .X0(448), .Y0(241)) u_lab_time (
    .clk, .rst, .text("Time"), .pixel, .line,
    .font_addr(font_addr[2]), .font_row(font_row[2]), .color(txt[2]));
  char_string_display #(.NCHAR(3), .X0(BER_X + 31), .Y0(262)) u_cap_ber (
    .clk, .rst, .text("BER"), .pixel, .line,
    .font_addr(font_addr[3]), .font_row(font_row[3]), .color(txt[3]));
  char_string_display #(.NCHAR(3), .X0(SNR_X + 31), .Y0(262)) u_cap_snr (
    .clk, .rst, .text("SNR"), .pixel, .line,
    .font_addr(font_addr[4]), .font_row(font_row[4]), .color(txt[4]));
  char_string_display #(.NCHAR(5), .X0(PWR_X + 23), .Y0(262)) u_cap_pwr (
    .clk, .rst, .text("Power"), .pixel, .line,
    .font_addr(font_addr[5]), .font_row(font_row[5]), .color(txt[5]));
  char_string_display #(.NCHAR(14), .X0(135), .Y0(436)) u_mode (
    .clk, .rst, .text(mode_text), .pixel, .line,
    .font_addr(font_addr[6]), .font_row(font_row[6]), .color(txt[6]));

  assign color = shapes_q | txt[0] | txt[1] | txt[2] | txt[3] | txt[4] | txt[5] | txt[6];
endmodule
