// tb_feedback_controller: random error counts; the FHT count must follow
// n <= clamp(n + errors - 1, 2, 8), starting from 8 after reset, and
// must not move without err_valid. Counts rises, falls and both limits.
module tb_feedback_controller;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, err_valid = 0;
  logic [2:0] errors = 0;
  logic [3:0] num_fhts;
  int model = 8, ups = 0, downs = 0, at_min = 0, at_max = 0;
  feedback_controller dut (.clk, .rst, .err_valid, .errors, .num_fhts);
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    checks++; if (num_fhts != 8) begin failures++; $display("FAIL reset value %0d", num_fhts); end
    for (int i = 0; i < 400; i++) begin
      int nxt;
      errors = (i % 50 < 25) ? 3'($urandom_range(1)) : 3'($urandom_range(6));
      err_valid = ($urandom_range(3) != 0);
      nxt = model;
      if (err_valid) begin
        nxt = model + int'(errors) - 1;
        if (nxt < 2) nxt = 2;
        if (nxt > 8) nxt = 8;
      end
      if (nxt > model) ups++;
      if (nxt < model) downs++;
      if (nxt == 2) at_min++;
      if (nxt == 8) at_max++;
      model = nxt;
      @(negedge clk);
      checks++;
      if (int'(num_fhts) != model) begin failures++; $display("FAIL i=%0d got %0d exp %0d", i, num_fhts, model); end
    end
    checks++;
    if (ups == 0 || downs == 0 || at_min == 0 || at_max == 0) begin failures++; $display("FAIL coverage"); end
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
