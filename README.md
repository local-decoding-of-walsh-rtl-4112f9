# Local decoding of Walsh codewords on an FPGA

In the IS-95 CDMA reverse link, each group of six bits is sent as one of 64
Walsh codewords of 64 chips. The usual receiver decodes it by correlating the
64 received chips with all 64 codewords, using a 64-point Fast Hadamard
Transform (FHT), and picking the largest correlation. *Local decoding* looks
at only part of the codeword instead. A small 8-point FHT, run on a
well-chosen set of 8 chips, already gives three of the six bits. Two such
FHTs (16 chips) give all six. More of them, up to eight, bring the error rate
down towards the full decoder's. Each unused FHT is held in reset and does
not switch, so in hardware the saved arithmetic becomes saved power. An
*adaptive* mode adds a feedback loop that uses as few FHTs as a target bit
error rate allows.

This repository holds SystemVerilog RTL for the whole demonstrator built
around that idea:

- a ROM of noisy test codewords at two SNRs;
- the local decoder (2 to 8 length-8 FHTs);
- the optimal decoder (one length-64 FHT);
- a bit-error counter and a proportional feedback controller;
- button handling;
- a 640x480 VGA screen that plots the error rate and shows gauges for
  errors, SNR and estimated power.

## The pipelined FHT (`fht`, `fht_stage`)

This is the part that takes the most care to understand. Every decoder is
built from it.

**Interface.** An N-point FHT (`LOG2N` = 3 or 6 here) takes two symbols per
cycle for N/2 cycles. On cycle k it takes symbol k on the upper terminal and
symbol k+N/2 on the lower one. Cycle 0 is the first cycle with `rst` low. On
cycle N/2-1+k, `out_u` carries correlation 2k and `out_l` correlation 2k+1.
Correlation j is the dot product of the input with row j of the Sylvester
Hadamard matrix, `H[j][n] = (-1)^popcount(j & n)`. So the length-8 FHT
delivers its first pair on cycle 3 and its last on cycle 6. The length-64 FHT
delivers on cycles 31 to 62. `out_valid` and `out_idx` (= k) mark the pairs.

**Structure.** The FHT is a chain of LOG2N-1 registered butterfly stages and a
final, unregistered adder/subtractor pair. The stages hold shift registers of
depth N/4, N/8, ..., 1 words. A single cycle counter drives them all. Counter
bit log2(D) is the `phase` of the stage whose depth is D. So the top bit
drives the first stage and bit 0 drives the last registered stage. The
register depths add up to N/2-1, which is exactly the latency.

**One stage of depth D** works in windows of 2D cycles. It forms
`sum = u + l` and `diff = u - l` and reorders them through two D-deep
registers:

| phase | upper register loads | lower register | out_u | out_l |
|---|---|---|---|---|
| 0 (first D cycles) | sum | loads diff, shifts | lower register output | upper register output |
| 1 (next D cycles) | diff | holds | upper register output | current sum |

In phase 1 the stage emits pairs of sums that lie D samples apart. In the
next phase 0 it emits the matching pairs of differences, which is what the
next stage needs. The output of a stage is combinational from its input in
phase 1. For that reason the first correlation pair appears in the same cycle
as the last input pair. The wiring reproduces the natural output order given
above. `tb_fht` checks this against a direct correlation, cycle by cycle.

Word growth is one bit per stage. With 10-bit symbols, the length-8 FHT
outputs 13 bits and the length-64 FHT outputs 16 bits, so nothing can
overflow. While `rst` is high, the counter and all registers are held at
zero.

## Local decoder (`suboptimal_decoder`)

**The idea.** Write the chip index as `n = {n_hi, n_lo}` and the codeword
index as `w = {w_hi, w_lo}`, each 3 bits. Then

    H64[w][n] = H8[w_hi][n_hi] * H8[w_lo][n_lo]

Two kinds of 8-chip subset follow from this:

- The 8 chips of a row `n_hi = m` (chips 8m..8m+7) form a length-8 Walsh word
  of `w_lo`, times the unknown sign `H8[w_hi][m]`.
- The 8 chips of a column `n_lo = m` (chips m, m+8, ..., m+56) form one of
  `w_hi`, times the unknown sign `H8[w_lo][m]`.

**The FHTs.** The decoder has eight length-8 FHTs. FHT 2m works on row m and
votes for `w_lo`. FHT 2m+1 works on column m and votes for `w_hi`. With
`num_fhts` = n, FHTs 0..n-1 run and the rest stay in reset. The input is
clamped to 2..8, so two FHTs (16 chips) is the minimum.

**Combining the votes.** The sign of each subset is unknown, so the decoder
adds the magnitudes of the correlations component-wise within each group.
The largest sum in each group gives its three bits. Ties go to the lower
index.

**Schedule,** counted from the first cycle after reset:

| cycles | action |
|---|---|
| 0-63 | store symbol k on cycle k in a 64-word buffer |
| 64-67 | feed each running FHT two chips per cycle (subset index c and c+4) |
| 67-70 | correlations leave the FHTs; sum and compare them |
| 71 | `bits = {w_hi, w_lo}` valid, `ready` high (held until reset) |

## Optimal decoder (`optimal_decoder`)

The optimal decoder uses the same buffer and one length-64 FHT. It feeds
chips c and c+32 on cycles 64-95. It compares the two correlations that arrive
on each of cycles 95-126 with the best so far, using the largest signed value.
It presents the 6-bit index on cycle 127.

## Algorithm selection and the adaptive loop

**`walsh_decoder`** holds one decoder of each kind. The three user-visible
algorithms are:

- **local**: the local decoder, with the FHT count from the left/right
  buttons;
- **optimal**: the optimal decoder;
- **adaptive**: the local decoder, with the FHT count from the feedback
  controller.

A `start` pulse latches the algorithm and the FHT count for the next
codeword. The decoder that is not selected stays in reset, as do both
decoders before the first start. Chip k must arrive on the (k+1)-th cycle
after `start`. `ready` pulses 73 cycles after `start` for the local modes and
129 cycles after it for the optimal mode.

**`ber_detector`** counts `sum_i decoded[i] xor sent[i]`, which gives 0..6
errors per codeword. The transmitted word is known only because this is a
test bench on a chip.

**`feedback_controller`** is a proportional controller:

    num_fhts <= clamp(num_fhts + errors - TARGET, 2, 8)

`TARGET` = 1 error per codeword and the gain is 1. The count starts at 8 after
reset. It is updated only by decodes made in adaptive mode.

**`algorithm_selector`** steps local → optimal → adaptive → local on each
press of the mode button.

## Test vectors (`test_vector_rom`, `vector_select`)

The ROM holds 1024 10-bit chips: 8 codewords at 0 dB chip SNR (addresses
0-511) and 8 at -5 dB (512-1023). It also holds the transmitted 6-bit word of
each codeword. Both ports have one cycle of latency. The contents are
computed at elaboration; there is no data file:

    hash(x)  = two rounds of xorshift32 (13, 17, 5) on x*0x9E3779B9 + 0x2545F491
    w(c)     = hash(1024 + c) mod 64                    for codeword c = 0..15
    chip(a)  = A * H64[w(a/64)][a mod 64] + noise(a)
    noise(a) = (sum of bits [6:0] of each byte of hash(a)) - 256
    A        = 74 (0 dB) or 42 (-5 dB)

`noise(a)` is roughly Gaussian with sigma ≈ 74. This is a stand-in for an
IS-95 channel simulation and is not a model of one.

**`vector_select`** forms the address `{vector, codeword, chip}` (1 + 3 + 6
bits):

- Each codeword tick advances the codeword and restarts the chip count, which
  then advances every clock.
- Up/down select the 0 dB or the -5 dB vector. The change takes effect at the
  next tick.

## The demonstrator shell (`walsh_labkit`)

`walsh_labkit` is the top module. `clk` is the 26.6 MHz pixel clock. The
codeword sequence runs like this:

1. `divider` makes a 5 Hz tick (`DIVISOR` = 5,320,000).
2. The tick restarts `vector_select`. The decoder is started one cycle later,
   so that with the ROM latency, chip k arrives on the decoder's cycle k.
3. The decoded bits go to `ber_detector`. Its count feeds the feedback
   controller (in adaptive mode only) and the display.

The five buttons pass through `debounce`: a two-flop synchronizer, then a
level that must hold for `DEBOUNCE` = 266,000 cycles (10 ms).

Screen:

- **Layout.** `vga` produces the standard 640x480/60 Hz timing (800x525
  clocks, negative syncs). `display` composes the title, a BER-versus-time
  plot and three gauge boxes labelled BER, SNR and Power, with a `Mode: ...`
  caption below them.
- **Shapes.** The drawing modules are `hline`, `vline`, `dot_graph` (the last
  32 error counts, newest at the left), `ber_gauge`, `snr_gauge` and
  `power_gauge`.
- **Gauge values.** The SNR gauge gets minus the SNR in dB (0 or 5; 0 is at
  the top). The power gauge gets 7 for the optimal decoder and `num_fhts/2`
  for the local ones, which is roughly the ratio of their butterfly
  additions: 192 for eight length-8 FHTs against 384 for one length-64 FHT.
- **Captions.** `char_string_display` draws a caption from an 8x16 font cell
  at an integer power-of-two scale.

Two parts are **not in the RTL** and attach through the top's ports:

- **The clock manager.** It makes 26.6 MHz from the board's 27 MHz clock; feed
  `clk` directly.
- **The font ROM.** Each of the seven captions has its own
  `font_addr[i]` = `{ascii[6:0], row[3:0]}` port, and expects that row's 8
  pixels (MSB leftmost) on `font_row[i]` one cycle later. Any 8x16 bitmap
  font will do. The testbenches use `tb/font_rom_model.sv`, which is a
  scrambled pattern and not a font.

Colour output is one cycle behind the VGA counters because of the font
lookup. The syncs and `vga_blank` are delayed by the same cycle. Black is
forced during blanking.

## Choices made here, and known departures

- **Subsets.** The original description says only that "different
  combinations" of chips go to the FHTs. The row/column subsets and the
  magnitude combining are this design's own.
- **Decoder structure.** Three algorithms are built from two decoders; the
  adaptive one is the local decoder plus the feedback loop.
- **Not specified in the original description:** the controller target and
  gain, the power estimate, the SNR encoding, the button-to-vector mapping,
  the debounce time, the VGA porches, all screen coordinates and colours, the
  font cell size, and the start/ready handshake.
- **FHT confidence.** The FHT's winning correlation could serve as a
  confidence value (a more realistic controller would use it instead of the
  true error count). It is not brought out.
- **Comparator.** The FHT has no built-in comparator, because the local
  decoder must add the correlations of several FHTs before comparing them.
- **Test vectors.** The contents are generated by the formula above, not
  taken from a channel simulation.

## Simulating

Every testbench in `tb/` is self-checking. (`-Wno-fatal` keeps width-lint warnings
in testbench code from stopping the build.) Each one ends with
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/walsh_pkg.sv tb/walsh_ref_pkg.sv tb/tb_walsh_labkit.sv \
        --top-module tb_walsh_labkit -o sim && ./obj_dir/sim

`tb/walsh_ref_pkg.sv` holds the reference models: the test-vector formula,
direct-correlation optimal decoding, and subset local decoding.

| testbench | what it shows |
|---|---|
| `tb_fht_stage`, `tb_fht` | stage reordering; length-8 and length-64 correlations and output cycles |
| `tb_suboptimal_decoder`, `tb_optimal_decoder` | every FHT count (and clamping), clean and noisy codewords, `ready` exactly on cycle 71 / 127 |
| `tb_walsh_decoder` | all three modes, latching of mode and count, idle decoder, ready latency |
| `tb_walsh_labkit` | whole design with a short tick: every decode and error count checked; requires each mode, both SNRs, errors, button changes, adaptive count rising and falling, video |
| `tb_walsh_labkit_full` | the top at its real parameters: one local and one optimal decode (about 10.6 M cycles, under a minute) |
| `tb_decoder_ber` | all 16 codewords with 2..8 FHTs and with the optimal decoder; prints the error table |
| the remaining `tb_*` | one per block: ROM, address generator, counters, debouncer, VGA timing, drawing modules |

The error table from `tb_decoder_ber`, in bit errors out of 48 bits per
vector:

| decoder | 0 dB | -5 dB |
|---|---|---|
| local, 2 FHTs | 5 | 15 |
| local, 3 / 4 / 5 FHTs | 3 / 4 / 1 | 13 / 13 / 11 |
| local, 6 / 7 / 8 FHTs | 0 / 0 / 0 | 6 / 6 / 8 |
| optimal | 0 | 0 |

The trend matches the design's purpose: a few FHTs are enough at good SNR,
and more are needed as the SNR drops. With only eight codewords per vector,
the small non-monotonic steps are noise.

All RTL is synthesizable. The ROM contents come from an `initial` loop over a
constant function, which FPGA flows accept as memory initialisation.
