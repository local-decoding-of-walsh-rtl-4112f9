// test_vector_rom: received chips for the decoder demonstration.
//
// Holds two vectors of eight 64-chip Walsh codewords: addresses 0-511 at
// 0 dB and 512-1023 at -5 dB chip signal-to-noise ratio, 10-bit signed,
// plus the transmitted 6-bit Walsh index of each of the 16 codewords.
// Both ports are synchronous: data appears one cycle after the address.
//
// Contents are computed at elaboration (no data file):
//   w(c)     = hash(1024 + c)[5:0] for codeword c = {vector, codeword}
//   chip(a)  = A * H64[w][a mod 64] + sum of four uniform draws in [-64,63]
//              taken from the four bytes of hash(a) (bits [6:0] of each),
//   A        = 74 for 0 dB (the noise sigma) and 42 for -5 dB,
//   hash(x)  = two rounds of 32-bit xorshift (13, 17, 5) on
//              x * 32'h9E3779B9 + 32'h2545F491.
// The sizes (1024 chips of 10 bits, 0 dB and -5 dB) are the original design's;
// the generator is this design's stand-in for its noisy channel model.
module test_vector_rom #(
  parameter int unsigned SW = 10
) (
  input  logic                 clk,
  input  logic [9:0]           addr,
  output logic signed [SW-1:0] symbol,
  input  logic [3:0]           cw_addr,
  output logic [5:0]           sent
);
  function automatic logic [31:0] hash(input logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9E3779B9 + 32'h2545F491;
    for (int r = 0; r < 2; r++) begin
      h ^= h << 13;
      h ^= h >> 17;
      h ^= h << 5;
    end
    return h;
  endfunction

  function automatic logic [5:0] word_of(input int c);
    return 6'(hash(32'(1024 + c)));
  endfunction

  function automatic logic signed [SW-1:0] chip(input int a);
    logic [31:0] h;
    logic [5:0]  w;
    int          amp, noise, v;
    h     = hash(32'(a));
    w     = word_of(a / 64);
    amp   = (a >= 512) ? 42 : 74;
    noise = -256;
    for (int b = 0; b < 4; b++) noise += int'(h[8*b +: 7]);
    v     = (($countones(w & 6'(a)) % 2) != 0) ? noise - amp : noise + amp;
    return SW'(v);
  endfunction

  logic signed [SW-1:0] mem   [1024];
  logic [5:0]           words [16];

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = chip(i);
    for (int c = 0; c < 16; c++)   words[c] = word_of(c);
  end

  always_ff @(posedge clk) begin
    symbol <= mem[addr];
    sent   <= words[cw_addr];
  end
endmodule
