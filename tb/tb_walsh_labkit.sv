// tb_walsh_labkit: end-to-end run of the demonstrator with a short tick
// (DIVISOR = 200) and debounce (DEBOUNCE = 4). Buttons walk it through
// the local decoder with several FHT counts, both SNR vectors, the
// optimal decoder and the adaptive decoder. Every decoded codeword is
// checked against the reference decoders applied to the test-vector
// formula, and every error count against the transmitted word. Counts
// and requires: decodes in each mode, decodes with bit errors, both SNR
// vectors, user FHT count changes, adaptive FHT count rising and falling,
// and video with sync pulses and lit pixels.
module tb_walsh_labkit;
  import walsh_pkg::*;
  import walsh_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0, btn_3 = 0;
  logic [10:0] font_addr [7];
  logic [7:0]  font_row  [7];
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hsync, vga_vsync, vga_blank, decoded_valid;
  logic [5:0]  decoded;
  logic [2:0]  errors;
  logic [3:0]  num_fhts;
  algo_e       algo;

  walsh_labkit #(.DIVISOR(200), .DEBOUNCE(4)) dut (.*);
  for (genvar i = 0; i < 7; i++) begin : g_font
    font_rom_model u_font (.clk, .addr(font_addr[i]), .row(font_row[i]));
  end

  int n_mode [3];
  int n_err = 0, n_vec [2], n_user_chg = 0, n_fb_up = 0, n_fb_down = 0, n_hs = 0, n_lit = 0;
  int last_fb = -1, last_user = 2;

  // check every decode
  always @(negedge clk) begin
    if (!rst && decoded_valid) begin
      int x[64];
      int c, w, expb, mode, nf;
      c    = int'({dut.vector, dut.codeword});
      mode = int'(dut.u_dec.algo_run);
      nf   = int'(num_fhts);
      for (int i = 0; i < 64; i++) x[i] = ref_chip(c * 64 + i);
      expb = (mode == int'(ALGO_OPTIMAL)) ? ref_optimal(x) : ref_local(x, nf);
      w = ref_word(c);
      checks++;
      if (int'(decoded) != expb) begin
        failures++; $display("FAIL cw %0d mode %0d nf %0d: decoded %0d exp %0d", c, mode, nf, decoded, expb);
      end
      n_mode[mode]++;
      n_vec[c / 8]++;
      if (expb != w) n_err++;
    end
  end

  // error count one cycle after each decode
  always @(negedge clk) begin
    if (!rst && dut.err_valid) begin
      checks++;
      if (int'(errors) != $countones(6'(ref_word(int'({dut.vector, dut.codeword}))) ^ decoded)) begin
        failures++; $display("FAIL error count %0d", errors);
      end
    end
  end

  // adaptive FHT count and video activity
  always @(negedge clk) begin
    if (!rst) begin
      int fb;
      fb = int'(dut.fb_fhts);
      if (last_fb >= 0 && fb > last_fb) n_fb_up++;
      if (last_fb >= 0 && fb < last_fb) n_fb_down++;
      last_fb = fb;
      if (int'(dut.user_fhts) != last_user) begin n_user_chg++; last_user = int'(dut.user_fhts); end
      if (!vga_hsync) n_hs++;
      if (!vga_blank && {vga_r, vga_g, vga_b} != 0) n_lit++;
    end
  end

  task automatic press(ref logic b);
    b = 1; repeat (10) @(negedge clk);
    b = 0; repeat (10) @(negedge clk);
  endtask

  task automatic codewords(input int n);
    repeat (n * 200) @(negedge clk);
  endtask

  initial begin
    n_mode = '{0, 0, 0}; n_vec = '{0, 0};
    repeat (3) @(negedge clk);
    rst = 0;
    codewords(6);                                    // local, 2 FHTs, 0 dB
    press(btn_right); press(btn_right); press(btn_right);
    checks++; if (dut.user_fhts != 5) begin failures++; $display("FAIL user fhts %0d", dut.user_fhts); end
    codewords(4);
    press(btn_left);
    checks++; if (dut.user_fhts != 4) begin failures++; $display("FAIL user fhts %0d", dut.user_fhts); end
    press(btn_down);                                 // -5 dB vector
    codewords(10);
    press(btn_left); press(btn_left); press(btn_left);
    checks++; if (dut.user_fhts != 2) begin failures++; $display("FAIL user fhts floor %0d", dut.user_fhts); end
    codewords(10);
    press(btn_3);                                    // optimal
    checks++; if (algo != ALGO_OPTIMAL) begin failures++; $display("FAIL mode"); end
    codewords(10);
    press(btn_3);                                    // adaptive
    checks++; if (algo != ALGO_ADAPTIVE) begin failures++; $display("FAIL mode"); end
    codewords(40);
    press(btn_up);                                   // back to 0 dB
    codewords(30);
    press(btn_3);                                    // local again
    checks++; if (algo != ALGO_LOCAL) begin failures++; $display("FAIL mode wrap"); end
    codewords(4);
    // a stretch long enough for a full video line with sync
    repeat (1000) @(negedge clk);
    $display("decodes local/optimal/adaptive %0d/%0d/%0d, with errors %0d, vectors %0d/%0d",
             n_mode[0], n_mode[1], n_mode[2], n_err, n_vec[0], n_vec[1]);
    $display("user count changes %0d, adaptive up %0d down %0d, hsync cycles %0d, lit pixels %0d",
             n_user_chg, n_fb_up, n_fb_down, n_hs, n_lit);
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_err == 0 || n_vec[0] == 0 ||
        n_vec[1] == 0 || n_user_chg == 0 || n_fb_up == 0 || n_fb_down == 0 || n_hs == 0 || n_lit == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
