// tb_debounce: with DELAY = 20, bursts of bounces shorter than 20 cycles
// must not change the output; a level held steady must appear after
// 2 + 20 cycles.
module tb_debounce;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, noisy = 0, clean;
  debounce #(.DELAY(20)) dut (.clk, .rst, .noisy, .clean);
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 20; r++) begin
      logic lvl;
      lvl = !clean;
      // bounce: toggles that never last 20 cycles
      for (int b = 0; b < 10; b++) begin
        noisy = lvl; repeat (1 + $urandom_range(15)) @(negedge clk);
        noisy = !lvl; repeat (1 + $urandom_range(3)) @(negedge clk);
        checks++;
        if (clean == lvl) begin failures++; $display("FAIL bounce passed"); end
      end
      noisy = lvl;
      for (int t = 1; t <= 30; t++) begin
        @(negedge clk);
        if (t == 21 || t == 22) begin
          checks++;
          if (clean != (t == 22 ? lvl : !lvl)) begin failures++; $display("FAIL latency t=%0d", t); end
        end
      end
    end
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
