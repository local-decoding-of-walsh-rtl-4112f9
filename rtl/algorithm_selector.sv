// algorithm_selector: steps through the decoding algorithms on a button.
//
// Each rising edge of the (debounced) button level selects the next
// algorithm in the series local -> optimal -> adaptive -> local. The order
// is the original design's; starting in local after reset and reacting to the
// rising edge are this design's choices. The new selection is visible one
// cycle after the edge is seen.
module algorithm_selector
  import walsh_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  button,
  output algo_e algo
);
  logic button_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      button_q <= 1'b0;
      algo     <= ALGO_LOCAL;
    end else begin
      button_q <= button;
      if (button && !button_q) begin
        unique case (algo)
          ALGO_LOCAL:    algo <= ALGO_OPTIMAL;
          ALGO_OPTIMAL:  algo <= ALGO_ADAPTIVE;
          default:       algo <= ALGO_LOCAL;
        endcase
      end
    end
  end
endmodule
