# Meteor-M LRPT decoder back end in SystemVerilog

Meteor-M weather satellites broadcast images as an LRPT stream: an 80 kbit/s
OQPSK signal that carries CCSDS-style frames protected by three layers of
coding. This RTL is the digital back end of such a receiver. A host PC does the RF
and demodulation work and sends the demodulated soft symbols to the FPGA over a
UART. The FPGA then undoes every layer the satellite added:

1. a periodic unique word marks the frames, and the phase ambiguity of the
   carrier loop is undone;
2. a Forney convolutional interleaver is removed;
3. differential coding is removed;
4. a K=7, rate-1/2 convolutional code is decoded;
5. the frames (CADUs) are found again;
6. the pseudo-noise scrambling is removed;
7. four interleaved Reed-Solomon (255,223) code words are corrected.

The output is the corrected 892-byte VCDUs and the packets they carry.

The design follows the architecture of the *Flat Earth Project* report: a
Meteor-M LRPT decoder on a Spartan-7 board with a 100 MHz clock. Where the report
stops short, this RTL makes its own choices. Those choices are listed below,
block by block and in the opening comment of each source file.

## Signal chain

```
uart_rx ─► I/Q pairing ─► uw_sync ─► drop UW, serialise ─► forney_deinterleaver
   ─► diff_decoder ─► I/Q pairing ─► viterbi_decoder ─► cadu_sync ─► bit_packer
   ─► (drop 4-byte marker) descrambler ─► rs_deinterleaver ─► 4 × rs_decoder
   ─► rs_reinterleaver ─► VCDU out ─┬─► packet_parser ─► packets out
                                    └─► sync_fifo ─► uart_tx (VCDU echo to host)
```

These are the data formats along the chain:

| point | format |
|---|---|
| UART in | bytes, 8N1. Soft symbols alternate I, Q, starting with I after reset. Each is 8-bit two's complement; a positive value means bit 1. |
| after `uw_sync` | derotated (I,Q) pairs. Each 40-pair frame is 4 unique-word pairs followed by 36 data pairs. |
| deinterleaver | one soft symbol per valid. The 72 data symbols of a frame are fed I, Q, I, Q, …, and the frame's first symbol resets the commutator. |
| Viterbi in / out | one soft (I,Q) pair per trellis step in, one hard bit per step out. |
| CADU | 1024 bytes: the marker `1ACFFC1D` followed by a 1020-byte CVCDU. |
| CVCDU | 4 RS code words, interleaved byte by byte (A B C D A B …). |
| VCDU | 892 bytes: 6 header bytes (with a 24-bit frame counter), a 2-byte insert zone, a 2-byte M_PDU header whose low 11 bits are the first-header pointer, and an 882-byte data zone. |

The top level, `lrpt_top`, brings out status signals that the testbenches use
to watch each mechanism:

- `uw_locked` and `uw_rot`;
- `cadu_locked`;
- `vit_norm`, which pulses for each normalisation stall;
- `rs_corrected[3:0]` and `rs_failed[3:0]`, which pulse once per lane and code word;
- `pkt_resync`;
- `error_flag`, which is sticky and is set by any internal overrun.

## Serial link (`uart_baud_gen`, `uart_rx`, `uart_tx`)

The baud clock comes from a 17-bit phase accumulator. Dividing 100 MHz by
115200 gives 868.06, which a power of two approximates well: 2^17/151 = 868.03.
The accumulator adds 16·151 = 2416 per clock, and its carry is a tick at 16 times
the baud rate.

The receiver confirms the start bit at its centre (8 ticks), then samples
each bit every 16 ticks, LSB first. A low stop bit raises `frame_error`
instead of delivering a byte. The transmitter sends the bits 16 ticks apart.

`BAUD_INC` is a parameter, so simulations can run the link much faster.

## Unique-word sync and derotation (`uw_sync`)

Before interleaving, each 72-bit block is preceded by the 8-bit word 0x27. On
the air, therefore, every 80 bits (40 QPSK pairs) begin with the same four
pairs. The carrier loop on the host may lock at any multiple of 90°, so the
word can appear in any of four rotations.

How `uw_sync` finds the word:

- For each of the 40 pair positions and each of the 4 rotations, it keeps a
  running soft correlation score. The score is the sum of ±I/±Q over the four
  newest pairs against the word's bits.
- Scores are summed over a set of `N_FRAMES` frames. The report uses 32
  frames.
- At the end of a set, the best position and rotation are taken.

Incoming pairs are written into a ring buffer two sets long. They are read
back one set later, shifted by the chosen position and derotated. Derotation
maps (I,Q) to (−Q,I), once per 90° step.

The output runs in lockstep with the input, one pair out per pair in, so no
flow control is needed. `out_sof` marks the first unique-word pair and
`out_uw` marks all four. The top drops the four unique-word pairs and feeds
the 72 data symbols on.

## Forney deinterleaver (`forney_deinterleaver`)

The interleaver has 36 branches with an elementary delay of M = 2048. The
transmitter delays branch b by b·M branch visits. The deinterleaver delays
branch b by (35−b)·M, so every symbol sees the same total delay of 35·M·36
symbols and leaves in its original order.

Each branch is a circular buffer inside one memory, with its own pointer.
This avoids the large modulo address arithmetic a single-pointer scheme needs.
Branch b starts at M·Σ_{k<b}(35−k); the base is a constant function of b.
Branch 35 has zero delay and passes straight through.

At the default size the memory holds 2048·630 = 1,290,240 soft symbols of 8 bits
(10.3 Mbit). The report keeps this memory in external DDR3. Here it is a plain
array, which a synthesis flow must map to block RAM or to an external memory
controller.

The commutator returns to branch 0 at the first data symbol after each
unique word. Because 72 is a multiple of 36, this keeps it aligned even if a
symbol is lost. The branch number goes with each output symbol, and its
parity tells I from Q.

## Differential decoding (`diff_decoder`)

Each channel (I and Q) is decoded on its own. The decoded bit is the XOR of
the current and the previous received bit of that channel. On soft values this
is a sign flip of the current value whenever the previous value was
non-negative, which keeps the soft information for the Viterbi decoder. The
previous bit is 0 after reset.

## Viterbi decoder (`viterbi_bmu`, `viterbi_acs`, `viterbi_tbu`, `viterbi_decoder`)

This is the largest block and the one with the most design decisions.

**Code.** The code has K = 7, generators G1 = 1111001 (I) and G2 = 1011011 (Q),
and 64 states. A state holds the last six input bits, with s[5] the newest.
The predecessors of state s are {s[4:0],0} and {s[4:0],1}, and the transition
into s carries input bit s[5]. The constants and the encoder function
`conv_out` live in `lrpt_pkg`.

**Branch metrics (`viterbi_bmu`).** Soft values are moved to offset binary:
v + 128, from 0 to 255. For each of the four expected pairs {00, 01, 10, 11},
the metric is the squared Euclidean distance to (0 or 255, 0 or 255). The
metrics are 17 bits wide; the largest is 2·255².

**Add-compare-select (`viterbi_acs`).** There are 64 ACS units in parallel, so
the decoder takes one trellis step per clock. Each unit adds the two
predecessor metrics to their branch metrics and keeps the smaller. Its decision
bit records which predecessor won; ties go to predecessor 0.

**Normalisation.** State metrics are `SM_W` = 22 bits wide and would
eventually overflow. Because the spread between metrics is not bounded,
modulo arithmetic is not used. Instead, when every metric has its top bit
set, the decoder spends one stall cycle subtracting 2^(SM_W−1)−1 from all of
them. During that cycle `in_ready` is low and `norm_stall` is high. The test
on the top bits of all 64 metrics is a single AND tree; no comparator is
needed.

**Traceback (`viterbi_tbu`).** The survivor memory is S = 120 columns of 64
decision bits. A write pointer moves through it in decreasing address order.
Two traceback pointers run the other way, each in turn:

1. A pointer starts at the newest column.
2. It traces back X = 30 steps to reach a state shared by all survivors.
3. It then traces B = 30 more steps. It pushes those 30 decoded bits onto its
   own stack, because the bits come out newest first.
4. When that pass is done, its 30 bits are copied into an output shift
   register and leave one per clock, oldest first.

Since S = 2(X+B) and the two pointers are offset by X+B steps, each trellis
step also advances one pointer by one step. This gives a steady output of
one decoded bit per input pair. Output bit k corresponds to input pair k−59
in the stream, a fixed decoding delay.

Traceback starts from a fixed state rather than from the state with the best
metric, which relies on the merging of survivors over X steps. If the output
register is reloaded before it has drained, `tb_overflow` reports it; this
cannot happen at one step per clock or slower.

## CADU sync (`cadu_sync`, `bit_packer`)

`cadu_sync` finds the attached sync marker `1ACFFC1D` in the decoded bit stream
with the same set-based scheme as the unique-word block, but on hard bits:

- For each of the 8192 bit positions in a CADU it counts how many of the
  newest 32 bits match the marker.
- Counts are summed over a set of 8 CADUs (`N_FRAMES`) in a score memory,
  updated once per bit by read-modify-write.
- At the end of the set, the best position becomes the alignment.

A ring buffer two sets long again keeps input and output in lockstep.
Rotated or inverted markers are not searched, because the symbols were already
derotated. `bit_packer` turns the aligned bits into bytes, MSB first, with the
byte index inside the CADU.

## Descrambler (`pn_lfsr`, `descrambler`)

The noise sequence comes from a Fibonacci LFSR with h(x) = x⁸+x⁷+x⁵+x³+1,
seeded with all ones. `pn_lfsr` produces eight bits per step as one byte: FF 48
0E C0 9A 0D 70 BC …

The descrambler XORs each CVCDU byte with its noise byte. The sequence restarts
after every 255 bytes and at the first byte of each CVCDU. On a restart, the
byte uses the seed value FF directly while the LFSR loads the byte after it, so
no cycle is lost.

## Reed–Solomon decoding (`rs_*`)

The code is the CCSDS RS(255,223):

- GF(2⁸) with field polynomial x⁸+x⁷+x²+x+1 (0x187) and α = 2;
- generator roots β^(112+j), j = 0…31, with β = α¹¹;
- symbols in conventional (not dual) basis.

It corrects up to 16 symbol errors per code word. The code word symbol received
first is the coefficient of x²⁵⁴. The field helpers (`gf_mul`, `gf_inv`,
`gf_pow`, `gf_beta`) are in `lrpt_pkg`.

**Lanes.** `rs_deinterleaver` sends CVCDU byte i to lane i mod 4. Four
identical `rs_decoder` instances run in parallel, and `rs_reinterleaver`
merges their 223-byte message words back into the 892-byte VCDU.

**Inside one `rs_decoder`:**

- **Syndromes (`rs_syndrome`).** Thirty-two cells evaluate the received
  polynomial at β^(112+j) by Horner's rule, one symbol per valid.
- **Berlekamp–Massey (`rs_berlekamp_massey`).** This FSM spends two clocks
  per syndrome: one forms the discrepancy, the next updates Λ(x) and, when
  needed, lengthens the register. Λ(x) and its degree are ready 65 clocks
  after start.
- **Evaluator (`rs_omega`).** Ω(x) = Λ(x)·S(x) mod x¹⁶ is a combinational
  network of GF multipliers, one XOR tree per coefficient.
- **Chien search and Forney (`rs_chien_forney`).** The search steps through
  the 255 positions in reception order, one per clock. A register for each
  coefficient is multiplied by its power of β⁻¹ each step.

  Forney's formula Y = X^(1−112)·Ω(X⁻¹)/Λ′(X⁻¹) simplifies in GF(2⁸). With
  x = X⁻¹, x·Λ′(x) equals the sum of the odd-power terms of Λ, so the
  formula becomes Y = x¹¹²·Ω(x)/Λ_odd(x). Λ_odd is a by-product of
  evaluating Λ, so each step yields its error value at once.
- **Failure test.** A word is declared uncorrectable when deg Λ > 16 or the
  number of roots found differs from deg Λ. Such a word passes through
  unchanged with `out_fail` set.
- **Buffering.** A ping-pong buffer takes the next code word while the
  previous one is being corrected. In the worst case a word takes about
  255 + 65 + 256 + 223 clocks. The lanes get a symbol only every 4 clocks, so
  one decoder per lane keeps up. `overrun` would report otherwise.

`rs_reinterleaver` has two banks, so the next VCDU can be written while the
current one is read out. Readout starts when all four lanes have delivered
their word. The VCDU is flagged `out_fail` if any lane failed.

## Packet parser (`packet_parser`)

Packets (the M_PDU contents) run back to back through the 882-byte data zones
and may cross from one VCDU into the next. Each packet has a 6-byte header;
bytes 4–5 hold its length minus 7. The first-header pointer gives the
offset of the first packet header that starts in a zone, or 0x7FF if none
does.

The parser copies packet bytes out, counting down the length taken from each
header. `out_sop` and `out_eop` frame a packet, and `out_split` (with `out_eop`)
marks packets that crossed a VCDU boundary.

The parser starts, or restarts, only where a pointer says a header begins.
It does so after reset, after a VCDU flagged uncorrectable, and when the
pointer disagrees with its running count. In each case it drops the partial
packet and pulses `resync`.

The image decoding that would follow (Huffman decoding of the 8×8 MCUs,
dequantisation, IDCT, colour conversion) and the display output are not part of
this RTL. The packet stream is brought out at the top instead.

## Parameters

| parameter | default | where |
|---|---|---|
| `BAUD_INC` | 2416 (16·151) | `lrpt_top`, `uart_baud_gen` (`INC`) |
| `UW_FRAMES` / `N_FRAMES` | 32 frames of 40 pairs | `lrpt_top`, `uw_sync` |
| `FORNEY_M` / `M`, `BRANCHES` | 2048, 36 | `lrpt_top`, `forney_deinterleaver` |
| `SM_W`, `BM_W` | 22, 17 bits | `viterbi_decoder`, `viterbi_acs`, `viterbi_bmu` |
| `S`, `X`, `B` | 120, 30, 30 | `viterbi_decoder`, `viterbi_tbu` |
| `CADU_FRAMES` / `N_FRAMES`, `FRAME_LEN` | 8, 8192 bits | `lrpt_top`, `cadu_sync` |
| `DEPTH`, `K` | 4, 223 | `rs_deinterleaver`, `rs_reinterleaver` |
| `VCDU_LEN`, `HDR_LEN` | 892, 10 | `packet_parser` |

All of these are the reference design's numbers except three, which are this
design's own choices: `SM_W`, `BM_W` and `HDR_LEN`. `HDR_LEN` follows the
Meteor-M frame layout.

## Departures from the reference design

- **Deinterleaver memory.** It is an on-chip array, not DDR3 behind a memory
  controller, so there is no clock-domain crossing.
- **Viterbi ACS.** There are 64 ACS units in parallel; the reference block
  diagram shows a single ACS unit.
- **Traceback.** It starts from a fixed state, not from the best-metric state.
- **Packet output.** Packets are output as byte streams; they are not split
  into MCUs.
- **UART traffic.** The host-to-FPGA byte format (I then Q, two's complement)
  and the echo of corrected VCDUs back to the host are this design's choices.
- **Real-time rate.** At 115200 baud the serial link carries about 11.5
  kbyte/s. A live 80 kbit/s stream as 8-bit soft symbols needs about seven
  times that, so recorded symbols must be replayed slower than real time. The
  logic itself keeps up with the live rate with a wide margin.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Shared reference models are
in `tb/lrpt_tb_pkg.sv`:

- a GF(2⁸) table model;
- an RS encoder and syndromes;
- a convolutional encoder;
- the PN sequence.

| testbench | what it checks |
|---|---|
| `tb_uart_baud_gen` | tick count and spacing against the accumulator formula |
| `tb_uart_rx`, `tb_uart_tx` | random bytes, bit timing, frame error on a bad stop bit |
| `tb_uw_sync` | several offsets and all rotations with noise: lock, rotation and aligned output (4 frames per set) |
| `tb_forney_deinterleaver` | against a behavioural interleaver, M=2 |
| `tb_diff_decoder` | per-channel soft XOR against a model |
| `tb_viterbi_bmu`, `tb_viterbi_acs` | random inputs against models |
| `tb_viterbi_tbu` | traceback of known decision columns, output count |
| `tb_viterbi_decoder` | noisy encoded stream at default widths, including normalisation stalls |
| `tb_cadu_sync` | marker at random offsets (256-bit frames, 2 per set) |
| `tb_pn_lfsr`, `tb_descrambler` | the PN sequence and restarts |
| `tb_rs_syndrome`, `tb_rs_berlekamp_massey`, `tb_rs_omega`, `tb_rs_chien_forney` | each step against reference computations |
| `tb_rs_decoder` | 0–16 random errors corrected, over-capacity words flagged, back-to-back words without overrun |
| `tb_rs_reinterleaver` | staggered lanes, byte order, fail flag |
| `tb_packet_parser` | random packet stream across 20 VCDUs with one bad VCDU |
| `tb_lrpt_top` | end to end, see below |

`tb_lrpt_top` acts as the transmitter and the host. It builds a packet stream,
VCDUs, RS code words with injected errors, scrambling, markers, convolutional
and differential coding, Forney interleaving, unique words, a 90° rotation,
noise and occasional hard symbol flips. It sends the result over the serial
line.

The testbench then checks the following:

- every VCDU comes out exactly;
- the deliberately uncorrectable one is flagged;
- the packets come out intact;
- the serial echo matches.

It also counts each mechanism and fails if one never occurs: unique-word lock
with the right rotation, Viterbi normalisation stall, CADU lock, RS correction,
RS failure, a packet split across VCDUs, and a packet resync.

It runs at reduced sizes:

- a unique-word set of 4 frames;
- M = 1;
- a CADU set of 2 frames;
- a serial bit of 16 clocks.

A run at the default sizes is out of reach for simulation. The deinterleaver
alone needs about 2.6 million symbols to fill at M = 2048, and each symbol
takes thousands of clocks at the real baud rate. The largest sizes simulated
are these:

- the full chain at the reduced sizes above;
- the Viterbi decoder and all RS blocks at their default sizes;
- the deinterleaver at M = 2 with 36 branches;
- the unique-word sync at 40-pair frames with 4-frame sets;
- the CADU sync at 256-bit frames with 2-frame sets.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -I. rtl/lrpt_pkg.sv tb/lrpt_tb_pkg.sv \
    $(ls rtl/*.sv | grep -v lrpt_pkg) tb/tb_lrpt_top.sv --top-module tb_lrpt_top -o sim
obj_dir/sim
```

Any other testbench runs the same way with its own name.
