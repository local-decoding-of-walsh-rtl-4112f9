// tb_decoder_ber: the original design's comparison workload. Decodes all 16
// test-vector codewords (8 at 0 dB, 8 at -5 dB) with the local decoder at
// every FHT count from 2 to 8 and with the optimal decoder, reading the
// chips from the test-vector ROM. Each decode is checked against the
// reference decoders; the bit errors per configuration and SNR are
// printed, and the optimal decoder must not do worse than the two-FHT
// local decoder.
module tb_decoder_ber;
  import walsh_pkg::*;
  import walsh_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, start = 0, ready;
  algo_e algo = ALGO_LOCAL;
  logic [3:0] user_fhts = 2, num_fhts;
  logic [9:0] addr = 0;
  logic [3:0] cw_addr = 0;
  logic signed [9:0] symbol;
  logic [5:0] sent, bits;

  test_vector_rom u_rom (.clk, .addr, .symbol, .cw_addr, .sent);
  walsh_decoder   u_dec (.clk, .rst, .start, .algo, .user_fhts, .fb_fhts(4'd8),
                         .symbol, .bits, .ready, .num_fhts);

  int errs [9][2];     // [config: 0..6 local 2..8 FHTs, 8 optimal][snr]

  task automatic decode(input int cfg, input int c);
    int x[64];
    int expb;
    algo = (cfg == 8) ? ALGO_OPTIMAL : ALGO_LOCAL;
    user_fhts = 4'(cfg + 2);
    cw_addr = 4'(c);
    for (int i = 0; i < 64; i++) x[i] = ref_chip(c * 64 + i);
    expb = (cfg == 8) ? ref_optimal(x) : ref_local(x, cfg + 2);
    // chip k must reach the decoder on the (k+1)-th cycle after start;
    // the ROM adds one cycle, so the address leads by one
    addr = 10'(c * 64);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 1; k < 64; k++) begin addr = 10'(c * 64 + k); @(negedge clk); end
    while (!ready) @(negedge clk);
    checks++;
    if (int'(bits) != expb) begin failures++; $display("FAIL cfg %0d cw %0d got %0d exp %0d", cfg, c, bits, expb); end
    checks++;
    if (int'(sent) != ref_word(c)) begin failures++; $display("FAIL sent word of cw %0d", c); end
    errs[cfg][c / 8] += $countones(bits ^ sent);
  endtask

  initial begin
    for (int i = 0; i < 9; i++) begin errs[i][0] = 0; errs[i][1] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int cfg = 0; cfg < 9; cfg++) begin
      if (cfg == 7) continue;
      for (int c = 0; c < 16; c++) decode(cfg, c);
    end
    for (int cfg = 0; cfg < 9; cfg++) begin
      if (cfg == 7) continue;
      if (cfg == 8) $display("optimal      : bit errors of 48 at 0 dB %0d, at -5 dB %0d", errs[cfg][0], errs[cfg][1]);
      else          $display("local %0d FHTs : bit errors of 48 at 0 dB %0d, at -5 dB %0d", cfg + 2, errs[cfg][0], errs[cfg][1]);
    end
    checks++;
    if (errs[8][0] > errs[0][0] || errs[8][1] > errs[0][1]) begin failures++; $display("FAIL optimal worse than two FHTs"); end
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
