// optimal_decoder: maximum-likelihood decoder for 64-chip Walsh codewords.
//
// The 64 received symbols are correlated with all 64 Walsh codes by one
// length-64 FHT; the index of the largest (signed) correlation is the six
// decoded bits. Timing, counted from the first cycle with rst low: cycles
// 0-63 store `symbol` (symbol k on cycle k); cycles 64-95 feed the FHT with
// symbols c and c+32; cycles 95-126 compare the two correlations the FHT
// delivers each cycle against the best so far; from cycle 127 `bits` is
// valid and `ready` is high until the next reset. The schedule is the
// original design's; ties keeping the lower index is this design's choice.
module optimal_decoder #(
  parameter int unsigned SW = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [SW-1:0] symbol,
  output logic [5:0]           bits,
  output logic                 ready
);
  localparam int unsigned CW = SW + 6;

  logic [6:0]           cyc;
  logic signed [SW-1:0] sbuf [64];

  always_ff @(posedge clk) begin
    if (rst)               cyc <= '0;
    else if (cyc != 7'd127) cyc <= cyc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst && cyc < 7'd64) sbuf[cyc[5:0]] <= symbol;
  end

  logic signed [CW-1:0] cu, cl;
  logic                 cvalid;
  logic [4:0]           k;

  fht #(.LOG2N(6), .IW(SW)) u_fht (
    .clk(clk), .rst(rst || cyc < 7'd64),
    .in_u(sbuf[{1'b0, cyc[4:0]}]), .in_l(sbuf[{1'b1, cyc[4:0]}]),
    .out_u(cu), .out_l(cl), .out_valid(cvalid), .out_idx(k)
  );

  logic signed [CW-1:0] best;
  logic [5:0]           idx;
  always_ff @(posedge clk) begin
    if (rst) begin
      best <= '0; idx <= '0;
    end else if (cvalid) begin
      if (cl > cu) begin
        if (cl > best || k == 5'd0) begin best <= cl; idx <= {k, 1'b1}; end
      end else begin
        if (cu > best || k == 5'd0) begin best <= cu; idx <= {k, 1'b0}; end
      end
    end
  end

  assign ready = (cyc == 7'd127);
  assign bits  = idx;
endmodule
