// vector_select: address generator for the test-vector ROM.
//
// The 10-bit address is {vector, codeword, symbol}: one bit picks the SNR
// vector (0: 0 dB, 1: -5 dB), three bits the codeword within the vector
// and six bits the chip. The up button asks for the higher SNR and the
// down button for the lower one; the request takes effect at the next
// `enable`, so a codeword is never read from two vectors. Each `enable`
// advances the codeword and restarts the symbol count at 0; the symbol
// count then advances every clock (wrapping after 63). Address layout and
// counting rules are the original design's; the button mapping and the restart of
// the symbol count are this design's choices.
// Timing: enable on cycle E gives symbol address 0 on cycle E+1.
module vector_select (
  input  logic       clk,
  input  logic       rst,
  input  logic       up,
  input  logic       down,
  input  logic       enable,
  output logic [9:0] addr,
  output logic       vector,
  output logic [2:0] codeword
);
  logic       up_q, down_q, want;
  logic [5:0] sym;

  always_ff @(posedge clk) begin
    if (rst) begin
      up_q <= 1'b0; down_q <= 1'b0; want <= 1'b0;
      vector <= 1'b0; codeword <= '0; sym <= '0;
    end else begin
      up_q   <= up;
      down_q <= down;
      if (up && !up_q)          want <= 1'b0;
      else if (down && !down_q) want <= 1'b1;
      if (enable) begin
        vector   <= want;
        codeword <= codeword + 1'b1;
        sym      <= '0;
      end else begin
        sym      <= sym + 1'b1;
      end
    end
  end

  assign addr = {vector, codeword, sym};
endmodule
