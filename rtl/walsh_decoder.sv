// walsh_decoder: the selectable Walsh-codeword decoder.
//
// Holds one generalized local (suboptimal) decoder with eight length-8
// FHTs and one optimal decoder with a length-64 FHT. The decoder that is
// not selected stays in reset, so its FHTs do not switch. The adaptive
// algorithm is the local decoder with its FHT count taken from the
// feedback controller (fb_fhts) instead of the buttons (user_fhts).
// Both decoders stay in reset from rst until the first start. A `start`
// pulse resets both decoders for one cycle and latches the
// algorithm and the FHT count for the codeword that follows, so a button
// press during a decode takes effect at the next codeword. Symbol k must
// arrive on the (k+1)-th cycle after start (the decoder's cycle k). When
// the selected decoder raises its ready flag, `bits` is updated and
// `ready` pulses for one cycle: 73 cycles after start for the local
// decoders, 129 for the optimal one. `num_fhts` is the latched count.
// The structure is the original design's; the start/ready handshake and the
// latching are this design's.
module walsh_decoder
  import walsh_pkg::*;
#(
  parameter int unsigned SW = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  algo_e                algo,
  input  logic [3:0]           user_fhts,
  input  logic [3:0]           fb_fhts,
  input  logic signed [SW-1:0] symbol,
  output logic [5:0]           bits,
  output logic                 ready,
  output logic [3:0]           num_fhts
);
  logic       sub_rst, opt_rst, sub_rdy, opt_rdy, sel_rdy, sel_rdy_q;
  logic [5:0] sub_bits, opt_bits;
  algo_e      algo_run;
  logic       armed;            // a start has been seen since reset

  always_ff @(posedge clk) begin
    if (rst) begin
      armed    <= 1'b0;
      algo_run <= ALGO_LOCAL;
      num_fhts <= 4'd2;
    end else if (start) begin
      armed    <= 1'b1;
      algo_run <= algo;
      num_fhts <= (algo == ALGO_ADAPTIVE) ? fb_fhts : user_fhts;
    end
  end

  assign sub_rst  = rst || start || !armed || (algo_run == ALGO_OPTIMAL);
  assign opt_rst  = rst || start || !armed || (algo_run != ALGO_OPTIMAL);

  suboptimal_decoder #(.SW(SW)) u_sub (
    .clk(clk), .rst(sub_rst), .num_fhts(num_fhts), .symbol(symbol),
    .bits(sub_bits), .ready(sub_rdy)
  );

  optimal_decoder #(.SW(SW)) u_opt (
    .clk(clk), .rst(opt_rst), .symbol(symbol),
    .bits(opt_bits), .ready(opt_rdy)
  );

  assign sel_rdy = (algo_run == ALGO_OPTIMAL) ? opt_rdy : sub_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_rdy_q <= 1'b0;
      ready     <= 1'b0;
      bits      <= '0;
    end else begin
      sel_rdy_q <= sel_rdy && !start;
      ready     <= sel_rdy && !sel_rdy_q && !start;
      if (sel_rdy && !sel_rdy_q && !start)
        bits <= (algo_run == ALGO_OPTIMAL) ? opt_bits : sub_bits;
    end
  end
endmodule
