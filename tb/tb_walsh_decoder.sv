// tb_walsh_decoder: starts codeword decodes in all three modes with
// several FHT counts, checks the decoded bits against the reference
// models, the ready pulse (73 cycles after start for the local decoders,
// 129 for the optimal one), the FHT-count selection, and that the decoder
// not selected stays idle.
module tb_walsh_decoder;
  import walsh_pkg::*;
  import walsh_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, start = 0, ready;
  algo_e algo = ALGO_LOCAL;
  logic [3:0] user_fhts = 2, fb_fhts = 8, num_fhts;
  logic signed [9:0] symbol = 0;
  logic [5:0] bits;
  int n_local = 0, n_opt = 0, n_adapt = 0;

  walsh_decoder dut (.clk, .rst, .start, .algo, .user_fhts, .fb_fhts, .symbol,
                     .bits, .ready, .num_fhts);

  task automatic run(input algo_e a, input int uf, input int ff, input int noise);
    int x[64];
    int w, expb, lat, got_at;
    w = $urandom_range(63);
    for (int i = 0; i < 64; i++)
      x[i] = (($countones(6'(w) & 6'(i)) % 2 != 0) ? -60 : 60) + $urandom_range(2*noise) - noise;
    algo = a; user_fhts = 4'(uf); fb_fhts = 4'(ff);
    expb = (a == ALGO_OPTIMAL) ? ref_optimal(x) : ref_local(x, a == ALGO_ADAPTIVE ? ff : uf);
    lat = (a == ALGO_OPTIMAL) ? 129 : 73;
    start = 1;
    @(negedge clk);
    start = 0;
    got_at = -1;
    for (int t = 0; t < 140; t++) begin       // t = cycles after start's cycle, minus one
      symbol = (t < 64) ? 10'(x[t]) : 10'($urandom);
      #1;
      checks++;
      if (int'(num_fhts) != (a == ALGO_ADAPTIVE ? ff : uf)) begin failures++; $display("FAIL num_fhts"); end
      if (t == 10) begin          // changes during a decode wait for the next start
        algo = algo_e'((int'(a) + 1) % 3); user_fhts = 4'(uf ^ 1); fb_fhts = 4'(ff ^ 1);
      end
      if (a == ALGO_OPTIMAL && dut.u_sub.cyc != 0) begin failures++; $display("FAIL local decoder not idle"); end
      if (a != ALGO_OPTIMAL && dut.u_opt.cyc != 0) begin failures++; $display("FAIL optimal decoder not idle"); end
      if (ready) begin
        if (got_at >= 0) begin failures++; $display("FAIL second ready"); end
        got_at = t + 1;
        checks++;
        if (int'(bits) != expb) begin failures++; $display("FAIL algo %0d bits %0d exp %0d", a, bits, expb); end
      end
      @(negedge clk);
    end
    checks++;
    if (got_at != lat) begin failures++; $display("FAIL algo %0d ready after %0d cycles, exp %0d", a, got_at, lat); end
    case (a)
      ALGO_LOCAL:   n_local++;
      ALGO_OPTIMAL: n_opt++;
      default:      n_adapt++;
    endcase
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 60; r++) begin
      run(ALGO_LOCAL, 2 + r % 7, 8, 200);
      run(ALGO_OPTIMAL, 2, 8, 300);
      run(ALGO_ADAPTIVE, 8, 2 + (r * 3) % 7, 200);
    end
    checks++;
    if (n_local == 0 || n_opt == 0 || n_adapt == 0) failures++;
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
