// tb_display: drives the screen compositor with known BER, SNR, power and
// mode values and probes chosen pixels one cycle later: the two graph axes,
// gauge-box edges, a BER-graph dash, the bars of each gauge, black space,
// and the font addresses and text pixels of the captions (with a
// stand-in font).
module tb_display;
  import walsh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, ber_valid = 0;
  logic [2:0] ber = 0, snr = 0, power = 0;
  algo_e algo = ALGO_LOCAL;
  logic [9:0] pixel = 0, line = 0;
  logic [10:0] font_addr [7];
  logic [7:0]  font_row [7];
  rgb_t color;

  display dut (.clk, .rst, .pixel, .line, .ber_valid, .ber, .snr, .power, .algo,
               .font_addr, .font_row, .color);
  for (genvar i = 0; i < 7; i++) begin : g_font
    font_rom_model u_font (.clk, .addr(font_addr[i]), .row(font_row[i]));
  end

  task automatic probe(input int x, input int y, input rgb_t exp, input string what);
    pixel = 10'(x); line = 10'(y);
    @(negedge clk);
    checks++;
    if (color != exp) begin
      failures++; $display("FAIL %s at %0d,%0d: %h expected %h", what, x, y, color, exp);
    end
  endtask

  task automatic addr_of(input int x, input int y, input int s, input byte ch, input int row);
    pixel = 10'(x); line = 10'(y);
    #1;
    checks++;
    if (font_addr[s] != {ch[6:0], 4'(row)}) begin
      failures++; $display("FAIL string %0d at %0d,%0d addr %h", s, x, y, font_addr[s]);
    end
  endtask

  initial begin
    int lit;
    repeat (2) @(negedge clk);
    rst = 0;
    ber = 3; snr = 5; power = 7; algo = ALGO_ADAPTIVE;
    ber_valid = 1; @(negedge clk); ber_valid = 0;
    probe(135, 150, WHITE, "BER axis");
    probe(300, 249, WHITE, "time axis");
    probe(135, 350, WHITE, "BER box left");
    probe(200, 281, WHITE, "BER box top");
    probe(331, 419, WHITE, "SNR box bottom corner");
    probe(445, 350, BLACK, "right of power box");
    probe(300, 180, BLACK, "empty graph");
    probe(140, 248 - 48, BLUE, "newest dash");
    probe(140, 248, BLACK, "no dash at zero");
    probe(149, 248, BLUE, "older dash at zero");
    probe(180, 417, GREY, "BER bar 0");
    probe(180, 417 - 2*19, GREY, "BER bar 2");
    probe(180, 417 - 3*19, BLACK, "no BER bar 3");
    probe(290, 287 + 90, GREEN, "SNR mark");
    probe(290, 287, BLACK, "no SNR mark at 0");
    probe(400, 417, {8'd0, 8'd128, 8'd0}, "power bar 0 green");
    probe(400, 417 - 6*19, {8'd252, 8'd20, 8'd0}, "power bar 6 red");
    // caption addressing: "Mode: Adaptive" starts at (135,436); char 6 is 'A'
    addr_of(135, 436, 6, "M", 0);
    addr_of(135 + 6*8, 436 + 5, 6, "A", 5);
    algo = ALGO_OPTIMAL;
    addr_of(135 + 6*8, 436 + 5, 6, "O", 5);
    addr_of(112 + 2*16, 24 + 2, 0, "n", 1);
    // some title pixels must be lit and all lit pixels white
    lit = 0;
    for (int x = 112; x < 112 + 26*16; x += 3) begin
      pixel = 10'(x); line = 10'(40);
      @(negedge clk);
      if (color == WHITE) lit++;
    end
    checks++;
    if (lit < 10) begin failures++; $display("FAIL title not drawn (%0d)", lit); end
    // a new BER shifts the graph
    ber = 1; ber_valid = 1; @(negedge clk); ber_valid = 0;
    probe(140, 248 - 16, BLUE, "new dash after shift");
    probe(149, 248 - 48, BLUE, "shifted dash");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
