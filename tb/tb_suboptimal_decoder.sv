// tb_suboptimal_decoder: feeds noisy and clean Walsh codewords to the
// local decoder for every FHT count, and compares its output with a direct
// model of the same subset correlation (magnitudes summed per bit group,
// first maximum wins). Also checks that ready rises exactly on cycle 71.
module tb_suboptimal_decoder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1;
  logic [3:0] num_fhts;
  logic signed [9:0] symbol;
  logic [5:0] bits;
  logic ready;

  suboptimal_decoder dut (.clk, .rst, .num_fhts, .symbol, .bits, .ready);

  function automatic int h8(input int k, input int j);
    return ($countones(k & j) % 2 != 0) ? -1 : 1;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // reference: three bits from the subset sums
  function automatic logic [5:0] model(input int x[64], input int nf);
    int n = nf < 2 ? 2 : (nf > 8 ? 8 : nf);
    int nlo = (n + 1) / 2, nhi = n / 2;
    int best_lo = -1, best_hi = -1, ilo = 0, ihi = 0;
    for (int k = 0; k < 8; k++) begin
      int slo = 0, shi = 0;
      for (int m = 0; m < nlo; m++) begin
        int c = 0;
        for (int j = 0; j < 8; j++) c += h8(k, j) * x[8*m + j];
        slo += iabs(c);
      end
      for (int m = 0; m < nhi; m++) begin
        int c = 0;
        for (int j = 0; j < 8; j++) c += h8(k, j) * x[8*j + m];
        shi += iabs(c);
      end
      if (slo > best_lo) begin best_lo = slo; ilo = k; end
      if (shi > best_hi) begin best_hi = shi; ihi = k; end
    end
    return {3'(ihi), 3'(ilo)};
  endfunction

  task automatic decode(input int w, input int amp, input int noise, input int nf);
    int x[64];
    logic [5:0] exp_bits;
    int t;
    for (int i = 0; i < 64; i++) begin
      x[i] = (($countones(6'(w) & 6'(i)) % 2 != 0) ? -amp : amp)
             + (noise > 0 ? $urandom_range(2*noise) - noise : 0);
      if (x[i] > 511) x[i] = 511;
      if (x[i] < -512) x[i] = -512;
    end
    exp_bits = model(x, nf);
    num_fhts = 4'(nf);
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (t = 0; t < 80; t++) begin
      symbol = (t < 64) ? 10'(x[t]) : 10'($urandom);
      #1;
      if (t == 70 || t == 71) begin
        checks++;
        if (ready != (t == 71)) begin failures++; $display("FAIL ready=%0d at cycle %0d", ready, t); end
      end
      if (t == 71) begin
        checks++;
        if (bits != exp_bits) begin
          failures++; $display("FAIL w=%0d nf=%0d amp=%0d got %0d exp %0d", w, nf, amp, bits, exp_bits);
        end
        if (noise == 0) begin
          checks++;
          if (bits != 6'(w)) begin failures++; $display("FAIL clean w=%0d nf=%0d got %0d", w, nf, bits); end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    num_fhts = 2; symbol = 0;
    repeat (2) @(negedge clk);
    for (int w = 0; w < 64; w++) decode(w, 100, 0, 2 + (w % 7));
    for (int nf = 0; nf < 16; nf++)
      for (int r = 0; r < 6; r++) decode($urandom_range(63), 60, 250, nf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
