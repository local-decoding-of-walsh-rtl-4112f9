// debounce: synchronizer and debouncer for one push button.
//
// The raw input passes two flip-flops to lower the chance of a metastable
// value reaching the logic, then a counter accepts a new level only when
// the synchronized input has differed from the output for DELAY
// consecutive cycles (default 266,000 cycles, 10 ms at 26.6 MHz). Any bounce
// restarts the count. The need for both is stated in the original design; the
// two-flop depth and the 10 ms window are this design's choices.
// Latency: 2 + DELAY cycles from a clean edge to `clean`.
module debounce #(
  parameter int unsigned DELAY = 266_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  logic s0, s1;
  logic [$clog2(DELAY+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s0 <= 1'b0; s1 <= 1'b0; cnt <= '0; clean <= 1'b0;
    end else begin
      s0 <= noisy;
      s1 <= s0;
      if (s1 == clean) begin
        cnt <= '0;
      end else if (cnt == $bits(cnt)'(DELAY - 1)) begin
        cnt   <= '0;
        clean <= s1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
