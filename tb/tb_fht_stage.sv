// tb_fht_stage: drives one FHT butterfly stage (depths 1, 2 and 4) with
// random pairs over a 2D-cycle window and checks the reordering: in the
// second half of the window the outputs are (sum[t-D], sum[t]), in the
// half after it (diff[t-2D], diff[t-D]).
module tb_fht_stage;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1;
  logic [3:0] t;
  logic signed [9:0] u, l;
  logic signed [10:0] ou0, ou1, ou2, ol0, ol1, ol2;
  logic signed [10:0] ou [3];
  logic signed [10:0] ol [3];
  assign ou = '{ou0, ou1, ou2};
  assign ol = '{ol0, ol1, ol2};

  fht_stage #(.IW(10), .D(1)) d1 (.clk, .rst, .phase(t[0]), .in_u(u), .in_l(l), .out_u(ou0), .out_l(ol0));
  fht_stage #(.IW(10), .D(2)) d2 (.clk, .rst, .phase(t[1]), .in_u(u), .in_l(l), .out_u(ou1), .out_l(ol1));
  fht_stage #(.IW(10), .D(4)) d4 (.clk, .rst, .phase(t[2]), .in_u(u), .in_l(l), .out_u(ou2), .out_l(ol2));

  int su[16], sd[16];

  initial begin
    t = 0; u = 0; l = 0;
    repeat (2) @(negedge clk);
    for (int trial = 0; trial < 50; trial++) begin
      rst = 1; @(negedge clk); rst = 0;
      for (int c = 0; c < 12; c++) begin
        t = 4'(c);
        u = 10'($urandom); l = 10'($urandom);
        if (trial == 0) begin u = -512; l = 511; end
        su[c] = int'(u) + int'(l);
        sd[c] = int'(u) - int'(l);
        #1;
        for (int s = 0; s < 3; s++) begin
          int d;
          d = 1 << s;
          if (c >= d && c < 2*d) begin
            checks++;
            if (ou[s] != su[c-d] || ol[s] != su[c]) begin
              failures++; $display("FAIL D=%0d c=%0d sum pair %0d %0d exp %0d %0d", d, c, ou[s], ol[s], su[c-d], su[c]);
            end
          end else if (c >= 2*d && c < 3*d) begin
            checks++;
            if (ou[s] != sd[c-2*d] || ol[s] != sd[c-d]) begin
              failures++; $display("FAIL D=%0d c=%0d diff pair", d, c);
            end
          end
        end
        @(negedge clk);
      end
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
