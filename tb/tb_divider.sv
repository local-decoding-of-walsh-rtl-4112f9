// tb_divider: with DIVISOR = 37 the enable must be a single-cycle pulse
// exactly every 37 cycles.
module tb_divider;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, enable;
  divider #(.DIVISOR(37)) dut (.clk, .rst, .enable);
  initial begin
    int last = -1, cyc = 0, pulses = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      if (enable) begin
        pulses++;
        if (last >= 0) begin
          checks++;
          if (cyc - last != 37) begin failures++; $display("FAIL period %0d", cyc - last); end
        end
        last = cyc;
      end
    end
    checks++;
    if (pulses != 27) begin failures++; $display("FAIL pulses %0d", pulses); end
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
