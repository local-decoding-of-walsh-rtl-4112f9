// feedback_controller: proportional controller for the adaptive decoder.
//
// On every new error count it moves the number of length-8 FHTs by the
// difference between the measured and the target error count:
//   num_fhts <= clamp(num_fhts + errors - TARGET, MIN_FHTS, MAX_FHTS).
// More errors than the target add FHTs (more chips, lower BER, more
// power); fewer errors remove them. The proportional law and the 2..8
// range are the original design's; the target of one bit error per codeword, the
// gain of one and the start value of MAX_FHTS after reset are this
// design's choices. Updates take one cycle after err_valid.
module feedback_controller #(
  parameter int unsigned TARGET   = 1,
  parameter int unsigned MIN_FHTS = 2,
  parameter int unsigned MAX_FHTS = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       err_valid,
  input  logic [2:0] errors,
  output logic [3:0] num_fhts
);
  int next;
  always_comb begin
    next = int'(num_fhts) + int'(errors) - int'(TARGET);
    if (next < int'(MIN_FHTS)) next = int'(MIN_FHTS);
    if (next > int'(MAX_FHTS)) next = int'(MAX_FHTS);
  end

  always_ff @(posedge clk) begin
    if (rst)            num_fhts <= 4'(MAX_FHTS);
    else if (err_valid) num_fhts <= 4'(next);
  end
endmodule
