// fht: pipelined Fast Hadamard Transform of length N = 2**LOG2N.
//
// Input: for N/2 cycles starting on cycle 0 (the first cycle with rst low),
// symbol k on in_u and symbol k+N/2 on in_l. Output: on cycle N/2-1+k,
// out_u holds correlation 2k and out_l correlation 2k+1 (k = 0..N/2-1),
// with out_valid high and out_idx = k. Correlation j is the dot product of
// the input with row j of the Sylvester Hadamard matrix,
// H[j][n] = (-1)**popcount(j & n). The length-8 instance delivers its
// first pair on cycle 3, the length-64 instance on cycle 31.
//
// Structure: LOG2N-1 registered butterfly stages with shift registers of
// N/4, N/8, ..., 1 words, then a final unregistered adder/subtractor pair.
// One cycle counter drives them all: its top bit sets the phase of the
// first stage and its bit 0 that of the last registered stage. While rst is
// high the counter and every register are held at zero, so an FHT that is
// not used does not switch. Word growth is one bit per stage.
module fht #(
  parameter int unsigned LOG2N = 6,
  parameter int unsigned IW    = 10
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic signed [IW-1:0]        in_u,
  input  logic signed [IW-1:0]        in_l,
  output logic signed [IW+LOG2N-1:0]  out_u,
  output logic signed [IW+LOG2N-1:0]  out_l,
  output logic                        out_valid,
  output logic [LOG2N-2:0]            out_idx
);
  localparam int unsigned HALF = 1 << (LOG2N - 1);   // N/2
  localparam int unsigned OW   = IW + LOG2N;

  // cycle counter: 0 .. N-2 covers input and output; it then stops
  logic [LOG2N-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst)                         cnt <= '0;
    else if (cnt != LOG2N'(2*HALF-1)) cnt <= cnt + 1'b1;
  end

  // stream between stages; stage s has input width IW+s (all kept at OW)
  logic signed [OW-1:0] su [LOG2N];
  logic signed [OW-1:0] sl [LOG2N];
  assign su[0] = OW'(in_u);
  assign sl[0] = OW'(in_l);

  for (genvar s = 0; s < int'(LOG2N) - 1; s++) begin : g_stage
    localparam int unsigned SW = IW + s;
    logic signed [SW:0] ou, ol;
    fht_stage #(.IW(SW), .D(HALF >> (s + 1))) u_stage (
      .clk  (clk),
      .rst  (rst),
      .phase(cnt[LOG2N-2-s]),
      .in_u (su[s][SW-1:0]),
      .in_l (sl[s][SW-1:0]),
      .out_u(ou),
      .out_l(ol)
    );
    assign su[s+1] = OW'(ou);
    assign sl[s+1] = OW'(ol);
  end

  // final butterfly, no register
  assign out_u = su[LOG2N-1] + sl[LOG2N-1];
  assign out_l = su[LOG2N-1] - sl[LOG2N-1];

  assign out_valid = !rst && (cnt >= LOG2N'(HALF - 1)) && (cnt != LOG2N'(2*HALF-1));
  assign out_idx   = (LOG2N-1)'(cnt - LOG2N'(HALF - 1));
endmodule
