// suboptimal_decoder: generalized local decoder for 64-chip Walsh codewords.
//
// Idea: write the chip index as n = {n_hi, n_lo} and the codeword index as
// w = {w_hi, w_lo} (3 bits each). Then H64[w][n] = H8[w_hi][n_hi] *
// H8[w_lo][n_lo], so any 8 chips that share n_hi form a length-8 Walsh
// word of w_lo (times an unknown sign), and any 8 chips sharing n_lo one of
// w_hi. A length-8 FHT over such a subset estimates three of the six bits
// from only 8 of the 64 chips.
//
// FHT 2m (m = 0..3) takes chips 8m..8m+7 and votes for w_lo; FHT 2m+1
// takes chips m, m+8, ..., m+56 and votes for w_hi. Only FHTs
// 0..num_fhts-1 run (num_fhts clamped to 2..8); the others are held in
// reset and do not switch. The magnitudes of the correlations of each
// group are summed component-wise (the sign of a subset is unknown) and
// the largest sum of each group gives its three bits.
//
// Timing, counted from the first cycle with rst low: cycles 0-63 store
// `symbol` (symbol k on cycle k); cycles 64-67 feed the FHTs (two chips per
// FHT per cycle); cycles 67-70 sum and compare the correlations; from cycle
// 71 `bits` = {w_hi, w_lo} is valid and `ready` is high until the next
// reset. The schedule is the original design's; the subset choice and magnitude
// combining are this design's own.
module suboptimal_decoder #(
  parameter int unsigned SW   = 10,
  parameter int unsigned NFHT = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [3:0]           num_fhts,
  input  logic signed [SW-1:0] symbol,
  output logic [5:0]           bits,
  output logic                 ready
);
  localparam int unsigned CW = SW + 3;        // length-8 correlation width
  localparam int unsigned AW = CW + 2;        // sum of up to 4 magnitudes

  logic [6:0]           cyc;                  // saturates at 127
  logic signed [SW-1:0] sbuf [64];
  logic [3:0]           nf;

  always_ff @(posedge clk) begin
    if (rst)               cyc <= '0;
    else if (cyc != 7'd127) cyc <= cyc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst && cyc < 7'd64) sbuf[cyc[5:0]] <= symbol;
  end

  always_comb begin
    if (num_fhts < 4'd2)              nf = 4'd2;
    else if (num_fhts > 4'(NFHT))     nf = 4'(NFHT);
    else                              nf = num_fhts;
  end

  // feeding: cycle 64+c carries index c (upper) and c+4 (lower) of each subset
  logic [1:0] c;
  assign c = cyc[1:0];

  logic signed [CW-1:0] cu [NFHT];
  logic signed [CW-1:0] cl [NFHT];
  logic                 cvalid [NFHT];
  logic [1:0]           cidx [NFHT];

  for (genvar f = 0; f < int'(NFHT); f++) begin : g_fht
    localparam int unsigned M = f / 2;
    logic signed [SW-1:0] iu, il;
    logic                 frst;
    always_comb begin
      if (f % 2 == 0) begin          // low group: chips 8M + j
        iu = sbuf[6'(8*M) + 6'(c)];
        il = sbuf[6'(8*M) + 6'(c) + 6'd4];
      end else begin                 // high group: chips 8j + M
        iu = sbuf[{1'b0, c, 3'(M)}];
        il = sbuf[{1'b1, c, 3'(M)}];
      end
    end
    assign frst = rst || (cyc < 7'd64) || (4'(f) >= nf);
    fht #(.LOG2N(3), .IW(SW)) u_fht (
      .clk(clk), .rst(frst), .in_u(iu), .in_l(il),
      .out_u(cu[f]), .out_l(cl[f]), .out_valid(cvalid[f]), .out_idx(cidx[f])
    );
  end

  function automatic logic [CW-1:0] mag(input logic signed [CW-1:0] v);
    return v < 0 ? CW'(-v) : CW'(v);
  endfunction

  // component-wise sums of the two correlations on the outputs this cycle
  logic [AW-1:0] lo_e, lo_o, hi_e, hi_o;
  always_comb begin
    lo_e = '0; lo_o = '0; hi_e = '0; hi_o = '0;
    for (int f = 0; f < int'(NFHT); f++) begin
      if (4'(f) < nf) begin
        if (f % 2 == 0) begin
          lo_e += AW'(mag(cu[f]));
          lo_o += AW'(mag(cl[f]));
        end else begin
          hi_e += AW'(mag(cu[f]));
          hi_o += AW'(mag(cl[f]));
        end
      end
    end
  end

  // running maximum per group over cycles 67-70 (FHT 0 always runs)
  logic [AW-1:0] best_lo, best_hi;
  logic [2:0]    idx_lo, idx_hi;
  logic [1:0]    k;
  assign k = cidx[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      best_lo <= '0; best_hi <= '0; idx_lo <= '0; idx_hi <= '0;
    end else if (cvalid[0]) begin
      if (lo_o > lo_e) begin
        if (lo_o > best_lo) begin best_lo <= lo_o; idx_lo <= {k, 1'b1}; end
      end else begin
        if (lo_e > best_lo || k == 2'd0) begin best_lo <= lo_e; idx_lo <= {k, 1'b0}; end
      end
      if (hi_o > hi_e) begin
        if (hi_o > best_hi) begin best_hi <= hi_o; idx_hi <= {k, 1'b1}; end
      end else begin
        if (hi_e > best_hi || k == 2'd0) begin best_hi <= hi_e; idx_hi <= {k, 1'b0}; end
      end
    end
  end

  assign ready = (cyc >= 7'd71);
  assign bits  = {idx_hi, idx_lo};
endmodule
