// tb_algorithm_selector: presses of varying length must step the mode
// local -> optimal -> adaptive -> local, once per press.
module tb_algorithm_selector;
  import walsh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, button = 0;
  algo_e algo;
  algo_e exp_algo;
  algorithm_selector dut (.clk, .rst, .button, .algo);
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    exp_algo = ALGO_LOCAL;
    checks++; if (algo != ALGO_LOCAL) begin failures++; $display("FAIL reset"); end
    for (int p = 0; p < 30; p++) begin
      button = 1;
      repeat (1 + $urandom_range(5)) @(negedge clk);
      button = 0;
      repeat (1 + $urandom_range(5)) @(negedge clk);
      exp_algo = (exp_algo == ALGO_LOCAL) ? ALGO_OPTIMAL : (exp_algo == ALGO_OPTIMAL) ? ALGO_ADAPTIVE : ALGO_LOCAL;
      checks++;
      if (algo != exp_algo) begin failures++; $display("FAIL press %0d got %0d exp %0d", p, algo, exp_algo); end
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
