// tb_walsh_labkit_full: the demonstrator at its real parameters (5 Hz
// codeword tick from the 26.6 MHz clock, 10 ms debounce). It waits for the
// first tick and checks the local decode of codeword 1, holds the mode
// button long enough to pass the debouncer, and checks the optimal decode
// at the second tick against the reference decoders.
module tb_walsh_labkit_full;
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

  walsh_labkit dut (.*);
  for (genvar i = 0; i < 7; i++) begin : g_font
    font_rom_model u_font (.clk, .addr(font_addr[i]), .row(font_row[i]));
  end

  task automatic expect_decode(input int c, input algo_e mode, input int t_tick);
    int x[64];
    int expb, t;
    t = 0;
    while (!decoded_valid) begin @(negedge clk); t++; end
    for (int i = 0; i < 64; i++) x[i] = ref_chip(c * 64 + i);
    expb = (mode == ALGO_OPTIMAL) ? ref_optimal(x) : ref_local(x, 2);
    checks++;
    if (int'(decoded) != expb) begin failures++; $display("FAIL codeword %0d decoded %0d exp %0d", c, decoded, expb); end
    checks++;
    if (t < t_tick) begin failures++; $display("FAIL decode came early, after %0d cycles", t); end
    $display("codeword %0d mode %0d decoded %0d sent %0d after %0d cycles", c, mode, decoded, ref_word(c), t);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    expect_decode(1, ALGO_LOCAL, 5_320_000);
    btn_3 = 1;
    repeat (300_000) @(negedge clk);
    btn_3 = 0;
    checks++;
    if (algo != ALGO_OPTIMAL) begin failures++; $display("FAIL mode did not change"); end
    expect_decode(2, ALGO_OPTIMAL, 5_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (11_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
