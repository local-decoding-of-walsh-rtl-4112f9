// tb_fht: checks the pipelined FHT at length 8 and length 64 against a
// direct Hadamard correlation, including the cycle on which each pair of
// correlations appears (N/2-1+k cycles after the first input pair).
module tb_fht;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst8, rst64;
  logic signed [9:0]  u8, l8, u64, l64;
  logic signed [12:0] o8u, o8l;
  logic signed [15:0] o64u, o64l;
  logic v8, v64;
  logic [1:0] k8;
  logic [4:0] k64;

  fht #(.LOG2N(3), .IW(10)) dut8  (.clk, .rst(rst8),  .in_u(u8),  .in_l(l8),
    .out_u(o8u),  .out_l(o8l),  .out_valid(v8),  .out_idx(k8));
  fht #(.LOG2N(6), .IW(10)) dut64 (.clk, .rst(rst64), .in_u(u64), .in_l(l64),
    .out_u(o64u), .out_l(o64l), .out_valid(v64), .out_idx(k64));

  function automatic int corr(input int x[64], input int n, input int row);
    int s = 0;
    for (int i = 0; i < n; i++) s += ($countones(row & i) % 2 != 0) ? -x[i] : x[i];
    return s;
  endfunction

  task automatic run(input int n, input int trial);
    int x[64];
    int half = n / 2;
    int seen = 0;
    for (int i = 0; i < 64; i++) begin
      x[i] = $urandom_range(1023) - 512;
      if (trial == 0) x[i] = (i == 5) ? 100 : 0;     // one impulse
      if (trial == 1) x[i] = -512;                    // full-scale
    end
    if (n == 8) rst8 = 1; else rst64 = 1;
    @(negedge clk);
    if (n == 8) rst8 = 0; else rst64 = 0;
    for (int t = 0; t < n; t++) begin             // cycle t after reset
      if (t < half) begin
        if (n == 8) begin u8 = 10'(x[t]); l8 = 10'(x[t+half]); end
        else begin u64 = 10'(x[t]); l64 = 10'(x[t+half]); end
      end else begin
        u8 = 10'($urandom); l8 = 10'($urandom); u64 = 10'($urandom); l64 = 10'($urandom);
      end
      #1;
      if (t >= half - 1 && t <= n - 2) begin
        int k = t - (half - 1);
        int gu, gl, gv, gk;
        if (n == 8) begin gu = o8u; gl = o8l; gv = v8; gk = k8; end
        else begin gu = o64u; gl = o64l; gv = v64; gk = k64; end
        checks++;
        if (!gv || gk != k || gu != corr(x, n, 2*k) || gl != corr(x, n, 2*k+1)) begin
          failures++;
          $display("FAIL n=%0d t=%0d k=%0d got %0d/%0d v=%0d idx=%0d exp %0d/%0d",
                   n, t, k, gu, gl, gv, gk, corr(x, n, 2*k), corr(x, n, 2*k+1));
        end
        seen++;
      end else begin
        checks++;
        if ((n == 8 ? v8 : v64) != 0) begin failures++; $display("FAIL n=%0d early/late valid t=%0d", n, t); end
      end
      @(negedge clk);
    end
    checks++;
    if (seen != half) begin failures++; $display("FAIL n=%0d saw %0d pairs", n, seen); end
  endtask

  initial begin
    rst8 = 1; rst64 = 1; u8 = 0; l8 = 0; u64 = 0; l64 = 0;
    repeat (3) @(negedge clk);
    for (int tr = 0; tr < 12; tr++) begin run(8, tr); run(64, tr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
