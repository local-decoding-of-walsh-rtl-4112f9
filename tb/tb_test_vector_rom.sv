// tb_test_vector_rom: reads every address and checks, one cycle later,
// that each chip carries its codeword's Walsh sign (chip*H64[w][n] summed
// over the codeword is large and positive), that the noise stays within
// its bounds, and that the 0 dB vector has the larger mean amplitude.
module tb_test_vector_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [9:0] addr = 0;
  logic [3:0] cw_addr = 0;
  logic signed [9:0] symbol;
  logic [5:0] sent;
  test_vector_rom dut (.clk, .addr, .symbol, .cw_addr, .sent);
  int corr [16];
  int w [16];
  initial begin
    for (int c = 0; c < 16; c++) begin
      cw_addr = 4'(c);
      @(negedge clk);
      w[c] = int'(sent);
      corr[c] = 0;
      for (int n = 0; n < 64; n++) begin
        addr = 10'(c*64 + n);
        @(negedge clk);
        corr[c] += (($countones(6'(w[c]) & 6'(n)) % 2 != 0) ? -1 : 1) * int'(symbol);
        checks++;
        if (symbol > 10'sd400 || symbol < -10'sd400) begin failures++; $display("FAIL range %0d", symbol); end
      end
      checks++;
      if (corr[c] < 64 * (c < 8 ? 40 : 20)) begin failures++; $display("FAIL codeword %0d correlation %0d", c, corr[c]); end
    end
    checks++;
    if (corr[0]+corr[1]+corr[2]+corr[3]+corr[4]+corr[5]+corr[6]+corr[7] <=
        corr[8]+corr[9]+corr[10]+corr[11]+corr[12]+corr[13]+corr[14]+corr[15]) begin
      failures++; $display("FAIL 0 dB vector weaker than -5 dB vector");
    end
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
