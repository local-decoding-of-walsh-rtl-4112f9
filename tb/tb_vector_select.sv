// tb_vector_select: the address is {vector, codeword, symbol}; symbol
// restarts at 0 the cycle after enable and counts every clock, codeword
// advances on enable, and an up/down request changes the vector only at
// the next enable.
module tb_vector_select;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, up = 0, down = 0, enable = 0;
  logic [9:0] addr;
  logic vector;
  logic [2:0] codeword;
  vector_select dut (.clk, .rst, .up, .down, .enable, .addr, .vector, .codeword);
  int ev = 0, ec = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      int want;
      want = ev;
      if (n % 5 == 2) begin down = 1; want = 1; end
      if (n % 5 == 4) begin up = 1; want = 0; end
      @(negedge clk); up = 0; down = 0;
      checks++;
      if (vector != 1'(ev)) begin failures++; $display("FAIL vector changed early"); end
      enable = 1;
      @(negedge clk);
      enable = 0;
      ev = want; ec = (ec + 1) % 8;
      for (int s = 0; s < 70; s++) begin
        checks++;
        if (addr != {1'(ev), 3'(ec), 6'(s)}) begin failures++; $display("FAIL n=%0d s=%0d addr=%h", n, s, addr); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
