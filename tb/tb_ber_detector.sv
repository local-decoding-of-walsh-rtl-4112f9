// tb_ber_detector: random decoded/sent pairs; the registered error count
// must equal the number of differing bits, with err_valid one cycle later.
module tb_ber_detector;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, valid = 0, err_valid;
  logic [5:0] decoded, sent;
  logic [2:0] errors;
  ber_detector dut (.clk, .rst, .valid, .decoded, .sent, .errors, .err_valid);
  initial begin
    decoded = 0; sent = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      int e;
      decoded = 6'($urandom); sent = 6'($urandom);
      if (i < 64) begin sent = 6'(i); decoded = 0; end
      e = 0;
      for (int b = 0; b < 6; b++) if (decoded[b] != sent[b]) e++;
      valid = 1;
      @(negedge clk);
      valid = 0;
      checks++;
      if (!err_valid || int'(errors) != e) begin failures++; $display("FAIL %b %b got %0d exp %0d", decoded, sent, errors, e); end
      decoded = ~decoded;
      @(negedge clk);
      checks++;
      if (err_valid || int'(errors) != e) begin failures++; $display("FAIL hold"); end
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
