// ber_detector: counts the bit errors of one decoded codeword.
//
// errors = sum over i = 0..5 of (decoded[i] xor sent[i]), the number of
// the six Walsh bits the decoder got wrong. The count is registered when
// `valid` is high and `err_valid` pulses on the following cycle. The
// formula is the original design's; the register and pulse are this design's.
// In a real receiver the sent bits are unknown; here they come from the
// test-vector ROM.
module ber_detector (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [5:0] decoded,
  input  logic [5:0] sent,
  output logic [2:0] errors,
  output logic       err_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      errors    <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= valid;
      if (valid) errors <= 3'($countones(decoded ^ sent));
    end
  end
endmodule
