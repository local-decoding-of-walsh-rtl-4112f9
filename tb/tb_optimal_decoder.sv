// tb_optimal_decoder: decodes clean and noisy codewords with the length-64
// FHT decoder and compares with a direct correlation against all 64 Walsh
// codes (largest signed value, first maximum wins). Checks that ready
// rises exactly on cycle 127.
module tb_optimal_decoder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1;
  logic signed [9:0] symbol;
  logic [5:0] bits;
  logic ready;

  optimal_decoder dut (.clk, .rst, .symbol, .bits, .ready);

  function automatic logic [5:0] model(input int x[64]);
    int best = 0, bi = 0;
    for (int k = 0; k < 64; k++) begin
      int c = 0;
      for (int j = 0; j < 64; j++) c += ($countones(k & j) % 2 != 0) ? -x[j] : x[j];
      if (k == 0 || c > best) begin best = c; bi = k; end
    end
    return 6'(bi);
  endfunction

  task automatic decode(input int w, input int amp, input int noise);
    int x[64];
    logic [5:0] exp_bits;
    for (int i = 0; i < 64; i++) begin
      x[i] = (($countones(6'(w) & 6'(i)) % 2 != 0) ? -amp : amp)
             + (noise > 0 ? $urandom_range(2*noise) - noise : 0);
      if (x[i] > 511) x[i] = 511;
      if (x[i] < -512) x[i] = -512;
    end
    exp_bits = model(x);
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 130; t++) begin
      symbol = (t < 64) ? 10'(x[t]) : 10'($urandom);
      #1;
      if (t == 126 || t == 127) begin
        checks++;
        if (ready != (t == 127)) begin failures++; $display("FAIL ready=%0d at cycle %0d", ready, t); end
      end
      if (t == 127) begin
        checks++;
        if (bits != exp_bits) begin failures++; $display("FAIL w=%0d got %0d exp %0d", w, bits, exp_bits); end
        if (noise == 0) begin
          checks++;
          if (bits != 6'(w)) begin failures++; $display("FAIL clean w=%0d got %0d", w, bits); end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    symbol = 0;
    repeat (2) @(negedge clk);
    for (int w = 0; w < 64; w++) decode(w, 100, 0);
    for (int r = 0; r < 40; r++) decode($urandom_range(63), 30, 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
