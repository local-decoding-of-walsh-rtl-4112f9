// fht_stage: one butterfly stage of the pipelined Fast Hadamard Transform.
//
// Two streams enter, one on each terminal. A stage of depth D works in
// windows of 2D cycles, selected by `phase` (one bit of the FHT's cycle
// counter, bit log2(D)). It forms sum = u + l and diff = u - l and reorders
// them through two D-deep shift registers so that the next stage receives
// pairs of sums (and then pairs of differences) that lie D samples apart:
//   phase 0: upper register <= sum, lower register <= diff (the lower one
//            only shifts in phase 0); outputs = (lower reg, upper reg),
//            which are the difference pairs of the previous window;
//   phase 1: upper register <= diff; outputs = (upper reg, current sum).
// The add/subtract, the two registers, the input mux and the two output
// muxes under an inverted enable are the stage structure of the published
// Hadamard-transformer design this follows; the exact mux wiring is derived
// here so that correlations leave the FHT in natural order.
// Outputs are combinational from the inputs in phase 1. Registers clear on
// rst. The output is one bit wider than the input.
module fht_stage #(
  parameter int unsigned IW = 10,
  parameter int unsigned D  = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 phase,
  input  logic signed [IW-1:0] in_u,
  input  logic signed [IW-1:0] in_l,
  output logic signed [IW:0]   out_u,
  output logic signed [IW:0]   out_l
);
  logic signed [IW:0] sum, diff;
  logic signed [IW:0] up_q  [D];   // shifts every cycle
  logic signed [IW:0] lo_q  [D];   // shifts in phase 0 only

  assign sum  = (IW+1)'(in_u) + (IW+1)'(in_l);
  assign diff = (IW+1)'(in_u) - (IW+1)'(in_l);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(D); i++) begin
        up_q[i] <= '0;
        lo_q[i] <= '0;
      end
    end else begin
      up_q[0] <= phase ? diff : sum;
      for (int i = 1; i < int'(D); i++) up_q[i] <= up_q[i-1];
      if (!phase) begin
        lo_q[0] <= diff;
        for (int i = 1; i < int'(D); i++) lo_q[i] <= lo_q[i-1];
      end
    end
  end

  assign out_u = phase ? up_q[D-1] : lo_q[D-1];
  assign out_l = phase ? sum       : up_q[D-1];
endmodule
