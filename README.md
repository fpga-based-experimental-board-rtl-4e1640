# Error-control coding laboratory in SystemVerilog

A teaching laboratory for error-control codes: one board plays the transmitter of a digital link,
the other the receiver, and a trainee sets the code, the noise level and deliberate errors from
switches and watches what the decoder makes of it. The transmitter draws 4-bit messages from a
pseudo-random source, protects them with a systematic (7,4) Hamming code whose coefficient matrix
is set on twelve switches, attaches a 3-bit CRC, maps the bits to ±1 and adds Gaussian noise at a
chosen Eb/N0 between 0 and 15 dB. The receiver decodes each frame either with a hard-decision
syndrome decoder or a soft-decision maximum-likelihood (ML) decoder, checks the result with the
CRC, and counts bit and frame errors so that BER and FER curves can be measured. Uncoded 4-bit
frames can be sent too, as the baseline against which coding gain is seen.

This RTL is a reconstruction of the laboratory boards of the paper "FPGA-based experimental board
for error control codes", written from its description. The original boards were built from
high-level-synthesis IP cores around a soft processor. Here every coding and channel block is
plain synthesizable SystemVerilog, and the processor side is left outside (see *What is not here*).

## The code and its switch-set matrix

Bit numbering is used the same way throughout: `msg_t` bit j−1 is message bit Mj,
`cw_t` bit i−1 is codeword bit Ci, and `pmat_t p[i-1][j-1]` is P(i,j). All three types are in
`rtl/ecc_pkg.sv`.

* **Generator.** `G = [I4 Pᵀ]`, so C1..C4 = M1..M4 and C(4+i) = XORⱼ Mj·P(i,j).
  The helper is `hamming_encode` in `ecc_pkg`.
* **Parity check.** `H = [P I3]`, so the syndrome is S(i) = XORⱼ Rj·P(i,j) ⊕ R(4+i).
  The helper is `hamming_syndrome`.
* **Any P is allowed.** The matrix is a switch setting, so all 4096 code sets can be tried.
  The code is a true single-error-correcting Hamming code only when the four columns of P are
  distinct and each has weight ≥ 2. A matrix such as `P1 = 0111, P2 = 1110, P3 = 1011` qualifies.
  With any other P, some syndromes match no column of H, and the decoder reports this on its
  failure LED. Some single errors also become invisible. With P = 0, for example, an error in a
  message bit leaves the syndrome at zero. Showing this is part of the lesson.
* **Both boards must hold the same P.** The receiver has its own twelve P switches. Nothing checks
  that they agree with the transmitter's.

**Syndrome decoder** (`syndrome_decoder`). It computes S and compares it with all seven columns of
H:
* S = 0: the word is accepted.
* S equals column i: bit i is inverted.
* S is non-zero and matches no column: `fail` is raised and the word is passed on unchanged.

If a degenerate P makes several columns equal, the lowest-numbered bit is corrected. The decoder
has one register stage.

**ML decoder** (`ml_decoder`) regenerates all 16 codewords from P on every clock. It correlates the
seven soft samples with each codeword in bipolar form, Cor_i = Σⱼ (2·Cij − 1)·Rj, which takes one
add or subtract per sample. The codeword with the largest correlation wins; because the code is
systematic, the winner's index is the decoded message. The decoder is a two-stage pipeline:
* Stage 1 registers the 16 correlations, 11 bits each.
* Stage 2 registers the result of a four-level comparison tree. On a tie the lower index wins.

A new word can enter on every clock.

**CRC** (`crc_encoder`, `crc_decoder`). The generator is g(X) = 1 + X + X³.
* The message polynomial is M(X) = M1 + M2·X + M3·X² + M4·X³.
* The encoder is the classic three-stage division register. The message enters at the high end,
  M4 first, and after four shifts the register holds B(X) = X³M(X) mod g(X) as CRC1..CRC3.
* The checker shifts r(X) = CRC1 + CRC2·X + CRC3·X² + C̃1·X³ + … + C̃4·X⁶ into a second division
  register, r6 first. Here C̃1..C̃4 are the decoded message bits.
* After seven shifts the register holds S(X) = r(X) mod g(X). The CRC LED lights when S ≠ 0.

Note a limit of this CRC: only three check bits protect a four-bit message. A wrong decoded
message whose difference from the true one is a multiple of g(X) (for example 1 + X + X³) passes
the check. In the end-to-end run at 3 dB with hard decoding, the CRC LED lit for 50 of the 50 wrong
frames, but not every error pattern is caught in general.

## Channel and noise

`awgn_channel` turns each code bit C into X = 2C − 1 and adds zero-mean Gaussian noise of variance
σ² = N0/2. Soft samples are 8-bit signed numbers with 4 fractional bits, so ±1 is ±16 and the range
is about ±8. Results outside that range saturate.

The noise level comes from a 4-bit Eb/N0 switch (0..15 dB). The symbol energy is 1, and a coded
symbol carries Rc = 4/7 of an information bit, so

    σ = sqrt( 1 / (2 · Rc · 10^(EbN0/10)) ),   Rc = 4/7 coded, 1 uncoded.

The module holds round(1024·σ) for all 32 combinations in two small tables. Coded and uncoded
frames sent at the same switch setting therefore carry the same energy per information bit, and
their BER curves can be compared directly.

The Gaussian source is `gauss_clt`, which relies on the central limit theorem:
* Three 32-bit xorshift generators give twelve uniform bytes per sample.
* Their sum minus 1530 has zero mean and a standard deviation of 256.
* A plain sum of twelve uniforms has thin tails. At 3.5 standard deviations it gives only about half
  the Gaussian probability, so the uncoded BER near 8 dB would come out at about half of Q(√(2Eb/N0)).
  A cubic correction, z = x + (x³ − 3x)/240 with x in standard deviations, fixes most of this. It
  brings the tail to within about 12 % of the Gaussian out to 3.5 standard deviations.
* The result is scaled by σ and rounded to the nearest value. Plain truncation would add a bias of
  half an LSB.

The corrected output never exceeds about 6.8 standard deviations. That is irrelevant above a BER of
about 10⁻⁸, but the generator cannot reproduce error rates far below that. Each step gives one
sample, so consecutive samples of a frame are independent.

Measured in simulation, σ is within 2 % of the formula at every tested setting. The uncoded
hard-decision BER is 0.0784 at 0 dB (theory: Q(√2) = 0.0786) and 0.00065 at 7 dB (theory 0.00077).

## Frame flow and timing

```
 tx_board                                              rx_board
 ┌───────────────────────────── producer ─┐  sender   ┌────────────────────────────────────────┐
 │ lfsr_source ─► hamming_encoder ─┐      │           │ frame  ─► e1..e7 ─► syndrome_decoder ─┐│
 │ (4 shifts)  ─► crc_encoder ─────┴► buf ─► awgn ─── sym ─► asm      sign   ml_decoder ───────┼► crc_decoder ─► ber_fer_counter
 └────────────────────────────────────────┘  channel  │        flips    (uncoded: signs) ─────┘│
                       frm_crc, frm_msg ──────────────────────────────────────────────────────►│
```

**Transmitter** (`tx_board`). The transmitter is a two-stage pipeline.
* The producer runs one source session: four LFSR shifts, 5 clocks including the hand-off.
* It then runs the Hamming and CRC encoders, 6 clocks, which fill a one-frame buffer.
* The sender empties the buffer into the channel at one symbol per clock: seven symbols coded,
  four uncoded.
* The next frame is produced while the current one is being sent.
* With `run` held, a frame leaves every 11 clocks in either mode.

The pseudo-random source is a 31-bit Fibonacci LFSR with Gp(X) = X³¹ + X²² + X² + X + 1, so its
bits obey a(n+31) = a(n+22) ⊕ a(n+2) ⊕ a(n+1) ⊕ a(n). Its seed is the parameter `SEED`.

**Link.** Besides the soft samples (`sym_vld`, `sym_sof`, `sym`), the link carries two noise-free
signals: `frm_crc`, the frame's three CRC bits, and `frm_msg`, the frame's message. They are held
from a frame's first symbol to the next frame. The receiver uses the CRC bits to check the decoded
message and the message to count errors.

**Receiver** (`rx_board`). The receiver processes a frame in these steps:
* It assembles seven (or four) samples into a frame.
* The error switches e1..e7 invert the sign of the chosen samples. This flips the hard decision
  and also acts on the ML decoder.
* The frame is decoded. A sample ≥ 0 counts as a one.
* The decoded message goes through the 7-clock CRC check.
* The four statistics counters are updated: frames, message bit errors, frame errors and
  CRC-flagged frames.

Latency from the last symbol of a frame to the counters:
* 1 clock of assembly,
* 1 clock of decoding (syndrome or uncoded) or 2 clocks (ML),
* 7 clocks of CRC check,
* 1 clock of counting.

Frames must end at least 8 clocks apart, and an assertion in `rx_board` watches this. The processor
forms BER = bit_errs / (4·frames) and FER = frame_errs / frames.

## Control panels

Each board has one shared 8-bit bus. The switch groups and the LED groups each sit behind their
own 74HC245 transceiver. `panel_bus_scanner` enables the transceivers one at a time:
* First come the three switch groups, with DIR from panel to FPGA. The FPGA samples the bus in the
  slot's last clock.
* Then come the two LED groups, with DIR from FPGA to panel, while the FPGA drives the bus.
* Each slot is `SLOT` = 4 clocks long. Its first clock enables no transceiver and leaves the bus
  undriven, so two drivers never meet.
* The LEDs are time multiplexed.
* The transmitter starts sending only after its switches have been read once.

The tri-state pad is split into `bus_i`, `bus_o` and `bus_oe`.

| bus group | transmitter | receiver |
|---|---|---|
| 0 (switches) | P row 1 [3:0], P row 2 [7:4] | P row 1 [3:0], P row 2 [7:4] |
| 1 (switches) | P row 3 [3:0], Eb/N0 dB [7:4] | P row 3 [3:0], soft [4], coded [5], clear counters [6] |
| 2 (switches) | user ID [3:0], coded [4], noise on [5], run [6] | e1..e7 [6:0] |
| 3 (LEDs) | M1..M4 [3:0], CRC1..3 [6:4] | decoded C1..C4 [3:0], syndrome [6:4], decoding failure [7] |
| 4 (LEDs) | C1..C7 [6:0], busy [7] | decoded C1..C7 [6:0], CRC error [7] |

The top level, `ecc_lab_top`, brings out several other signals:
* the oscilloscope test points: the LFSR bit stream, the unipolar code bit, the noise-free bipolar
  symbol and the noisy received sample;
* the decoded message;
* the trainee ID;
* the four counters.

## Files

| file | contents |
|---|---|
| `rtl/ecc_pkg.sv` | sizes, types (`msg_t`, `cw_t`, `pmat_t`, `soft_t`, panel setting structs), encode/syndrome functions |
| `rtl/lfsr_source.sv` | 31-bit LFSR message source |
| `rtl/hamming_encoder.sv`, `rtl/syndrome_decoder.sv`, `rtl/ml_decoder.sv` | (7,4) code with switch-set P |
| `rtl/crc_encoder.sv`, `rtl/crc_decoder.sv` | serial g(X) = 1 + X + X³ division registers |
| `rtl/gauss_clt.sv`, `rtl/awgn_channel.sv` | Gaussian noise and BPSK channel |
| `rtl/ber_fer_counter.sv` | error statistics |
| `rtl/panel_bus_scanner.sv` | shared panel bus |
| `rtl/tx_board.sv`, `rtl/rx_board.sv`, `rtl/ecc_lab_top.sv` | boards and top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example, the
end-to-end run of the top level at its default parameters (about 7 s to build, under a second to
run):

```
verilator --binary --timing --assert -Irtl rtl/ecc_pkg.sv rtl/*.sv tb/tb_ecc_lab_top.sv \
          --top-module tb_ecc_lab_top -Mdir obj_top
./obj_top/Vtb_ecc_lab_top
```

Any other block works the same way: replace the testbench and the top-module name.
`rtl/ecc_pkg.sv` must come first. The simulator starts with all state at random values, so every
register that is read has a reset.

`tb_ecc_lab_top` models both panels behind their buses and runs 600 frames in each of seven
settings. It checks the following:

| setting | result (BER / FER) | check |
|---|---|---|
| clean channel | 0 / 0 | no errors |
| error switch e3 | 0 / 0 | the single error is corrected and the syndrome LEDs light |
| e1 + e2 | every frame wrong | the CRC LED lights |
| 3 dB, syndrome decoding | 0.039 / 0.083 | none of its own; it is the reference for the next setting |
| 3 dB, ML decoding | 0.016 / 0.033 | below 0.75 × the syndrome decoding BER |
| 3 dB, uncoded | 0.027 | must lie between 0.016 and 0.030; theory is 0.0229 |
| P = 0 with e5 + e6 | — | the decoding-failure LED lights |

At 3 dB the ranking is ML, then uncoded, then syndrome decoding. Hard-decision (7,4) decoding
overtakes uncoded transmission only at higher Eb/N0 (about 5 dB). ML decoding is ahead from about
1 dB upwards. The
testbench also counts these mechanisms, and fails if one never occurs:
* counter clears,
* Eb/N0 changes,
* single-error corrections,
* transmitter pipeline overlap,
* bus conflicts, which must stay at zero.

`tb_ber_sweep` measures the BER/FER curves. It runs the transmitter, channel and receiver for
20 000 frames at each Eb/N0 from 0 to 15 dB, with uncoded, syndrome and ML decoding, and prints a
table. It checks the following:
* The uncoded BER agrees with Q(√(2Eb/N0)) where enough errors occur.
* Every curve falls as Eb/N0 rises.
* ML decoding beats syndrome decoding wherever the latter makes at least 30 bit errors. It beats
  uncoded transmission from 3 dB upwards.
* High Eb/N0 settings are error-free.

It takes about 12 s. The curves agree with Q(√(2Eb/N0)) to within about 20 % down to a BER of
10⁻⁴:

| Eb/N0 | uncoded | syndrome | ML | theory, uncoded |
|---|---|---|---|---|
| 0 dB | 0.0784 | 0.117 | 0.083 | 0.0787 |
| 3 dB | 0.0221 | 0.033 | 0.0136 | 0.0229 |
| 5 dB | 0.0061 | 0.0061 | 0.0016 | 0.0060 |
| 7 dB | 0.00065 | 0.00069 | 0.00011 | 0.00077 |

The block testbenches compare against models written independently of the RTL:
* long division for the CRCs,
* the LFSR recurrence,
* explicit G and H matrices,
* nearest-codeword search for hard decoding,
* exhaustive correlation for soft decoding,
* floating-point σ and Gaussian tail rates for the channel.

Each block was also checked against a copy with one deliberate fault, for example a wrong LFSR tap
or a missing XOR in a division register. Its testbench caught every such fault.

## Choices made here

The published description fixes the codes, the polynomials, the decoding rules, the 0–15 dB
switch range and the use of a shared transceiver bus. The following are choices of this
implementation:
* the number formats;
* the noise generator;
* all timing, handshakes and pipelining;
* the LFSR seed;
* the tie and degenerate-P rules of the decoders;
* the panel bit map and scan timing;
* how CRC bits and the reference message reach the receiver.

Both boards run from one clock here. On real hardware with two FPGAs, the link would need a
synchronizer or a common clock, and the reference message would have to be regenerated at the
receiver, for example from a shared LFSR seed, instead of being sent.

## What is not here

These parts of the original laboratory are not in this RTL:
* the soft processor that reads the counters, divides and prints "Frame# … BER= … FER= …";
* the AXI fabric and the memory controller;
* the UART to the PC, the SPI flash and the clocking IP;
* the OLED display;
* the 74HC245 chips and the panel hardware (a behavioural model lives inside `tb_ecc_lab_top`);
* the wireless alternative to the wire link.

The outputs of `ecc_lab_top` are where a processor bus interface would attach. The original
boards' latency and resource figures came from high-level synthesis of C++ cores and do not
describe this RTL.
