// divider: one-cycle enable pulse every DIVISOR clock cycles.
//
// With the 26.6 MHz pixel clock the default DIVISOR of 5,320,000 gives the
// 5 Hz tick that starts each codeword decode and each display update. A
// counter runs 0..DIVISOR-1; `enable` is high on the cycle the
// counter wraps. The 5 Hz rate and clock are the original design's.
module divider #(
  parameter int unsigned DIVISOR = 5_320_000
) (
  input  logic clk,
  input  logic rst,
  output logic enable
);
  logic [$clog2(DIVISOR+1)-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      enable <= 1'b0;
    end else if (cnt == $bits(cnt)'(DIVISOR - 1)) begin
      cnt    <= '0;
      enable <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      enable <= 1'b0;
    end
  end
endmodule
