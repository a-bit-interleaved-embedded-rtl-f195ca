# Bit-interleaved embedded Hamming scrubbing for SRAM FPGA configuration memory

Radiation can flip bits of an SRAM-based FPGA's configuration memory. A
readback scrubber repairs them, but it needs to know what each frame should
contain, either from a golden copy or from error-correcting codes kept in
another memory. This design keeps the codes **inside the configuration frames**.
It uses the *non-essential* bits: bits that the user design does not use and
whose value therefore does not matter. In typical designs most frames are less
than half used, so there are plenty of them.

Two ideas make this work:

* **Embedded Hamming code.** The non-essential bits of a group of bits are not
  appended check bits. Instead they are chosen so that the whole group,
  essential bits included, is a valid Hamming codeword. Nothing is added to the
  frame and nothing is stored elsewhere.
* **Bit interleaving.** Each frame is dealt round-robin into 13 *sub frames*,
  and each sub frame carries its own code. Neighbouring bits of a frame then
  fall into different sub frames. A burst of up to 13 adjacent upsets (a
  multi-bit upset) becomes 13 single errors, one per sub frame, and each one
  can be corrected.

The RTL has two halves:

* `embed_unit` prepares a frame before it is configured into the device.
* `scrubber` reads frames back at runtime, corrects them and writes them back.

`bieh_top` places the two side by side.

## Frame layout

The default sizes are those of a Virtex-6 XC6VLX240T: 28,464 frames of 81
32-bit words, i.e. KAPPA = 2,592 bits per frame, and PHI = 13 sub frames.

| item | rule (defaults) |
|---|---|
| frame bit `k` | word `k / 32`, bit `k % 32` |
| tracking field | 13 bits starting at `TRACK_LSB` = 1280 (word 40, bits 0..12) |
| payload bits | the other 2,579 bits, numbered `p = 0..2578` in frame order |
| sub frame of payload bit `p` | `p % 13` |
| Hamming index of payload bit `p` | `ix = p / 13 + 1` (1-based) |
| sub frame sizes | 199 bits for sub frames 0..4, 198 bits for 5..12 |

Bit `j` of the tracking field is 1 when sub frame `j` could **not** be made a
codeword, because it had too few non-essential bits. The scrubber leaves such
sub frames alone. These 13 bits sit where the vendor's own per-frame ECC bits
would be, which this scheme does not use. The exact position is a parameter.

## The code

The check matrix column for index `ix` is just the binary value of `ix`. For a
15-bit group the four rows are the familiar p1..p4 pattern. So:

* the **syndrome** of a sub frame is the XOR of the indices of its 1 bits
  (8 bits wide for 199-bit sub frames);
* a sub frame is a codeword when its syndrome is 0;
* after a single upset the syndrome *equals the index of the flipped bit*.

Correction therefore needs no table: `p = (syndrome - 1) * 13 + j`, skip over
the tracking field, flip that bit.

The number of check bits is the smallest `d` with `d + size + 1 <= 2^d`, which
gives 8 for 199 bits. For a 15-bit group this rule gives 5 rather than 4. The
extra syndrome bit is then always 0, so the rule is safe to apply everywhere.

Limits of the code, as built:

* A syndrome larger than the sub frame size (200..255) cannot come from one
  upset. It is counted as **uncorrectable** and the sub frame is left as it is.
* Two upsets in one sub frame whose indices XOR to a valid index are
  **miscorrected**. A third bit gets flipped. This is inherent in a plain
  (distance-3) Hamming code.
* Upsets in the tracking field are not detected. A flipped tracking bit makes
  the scrubber skip, or wrongly check, that sub frame.
* Only one error per sub frame can be repaired per pass.

## Embedding engine (`embed_unit`)

Inputs are a 2,592-bit frame and a mask of the same width, where 1 marks an
essential bit. For each sub frame the engine has to pick the non-essential bits
so that the sub frame's syndrome is 0. Let `b` be the XOR of the indices of the
essential 1 bits. The engine must then find a set of non-essential indices whose
XOR is `b`. This is a linear system over GF(2) with 8 equations. The engine
works in three phases per sub frame:

1. **SCAN**, one payload bit per cycle. Essential bits update `b`.
   Non-essential indices go into an echelon basis. Row `l` has its leading 1 at
   bit `l`, and it remembers which indices were XORed to form it, as a 199-bit
   set. The insertion logic reduces the new index by the existing rows from the
   top bit down. It stores the remainder in the first empty row it reaches.
2. **SOLVE**, one cycle. `b` is reduced the same way, and the index sets of the
   rows used are XORed together into the solution. If `b` does not reach 0, the
   sub frame cannot be embedded and its tracking bit is set.
3. **WRITE**, one payload bit per cycle. Non-essential bits in the solution
   become 1 and all others become 0. In a sub frame that cannot be embedded,
   every non-essential bit becomes 0.

Essential bits are never changed.

Timing: `start` for one cycle loads the frame. `done` pulses after exactly
`2 * (KAPPA - PHI) + PHI + 1` = 5,172 cycles at the defaults, and `frame_out` /
`not_embedded` then hold the result until the next start.

Worked example, checked by the testbench: a 15-bit group, written with index 1
first, with

```
frame 100011000010010
mask  101011001010010
```

The essential 1 bits sit at indices 1, 5, 6, 11 and 14, which XOR to 7. The
engine sets only the non-essential bit at index 7:

```
out   100011100010010
```

In the scheme this step is an offline pass over the bitstream, after the
bitstream is generated. Here it is given as hardware, which makes it usable by
an on-chip loader and lets the end-to-end test produce real embedded frames.

## Scrubber (`scrubber`)

While `scrub_en` is high, the scrubber visits frames 0 .. NFRAMES-1 in order
and then starts again. `pass_done` pulses after the last frame. For each frame
it does the following:

1. **Read.** It issues a read command and receives 81 words. Each word is
   written into `frame_buffer`, an 81 x 32 memory, and also fed to
   `syndrome_unit`. That unit holds a running (sub frame, index) pair, so 32
   bits per cycle are dealt to their sub frames without any division. It
   accumulates 13 syndromes and captures the tracking bits.
2. **Check.** It examines one sub frame per cycle through the shared
   `error_locator`:
   - if the tracking bit is set, it counts a skip;
   - if the syndrome is 0, nothing happens;
   - if the syndrome is in range, it does a read-modify-write of one buffer
     word, which costs one extra cycle;
   - otherwise it counts an uncorrectable sub frame.
3. **Write back.** This happens only if something was corrected: a write
   command, then the 81 buffer words, at 2 cycles per word.

Cycle cost per frame without port stalls:

* clean frame: 1 + 81 + 13 + 1 = 96 cycles;
* frame with corrections: 96 cycles + 1 per corrected bit + 1 + 2 x 81 for the
  write-back.

A full clean pass of the device takes about 2.7 M cycles.

### Configuration port

The configuration memory and its access port belong to the device and are not
part of the RTL. The scrubber uses this frame-level protocol:

| signals | rule |
|---|---|
| `cmd_valid`, `cmd_ready`, `cmd_write`, `cmd_frame` | one command per frame transfer, taken when valid and ready are both high |
| `rvalid`, `rdata` | after a read command, exactly 81 words in order; gaps are allowed and there is no back-pressure |
| `wvalid`, `wready`, `wdata` | after a write command, 81 words; a word is taken when valid and ready are both high, and `wdata` holds until it is taken |

The scrubber asserts these rules with SVA. A bridge to a real device port (for
example a 32-bit configuration access port with its command sequence) has to
be added for a real device.

### Status outputs

* `cnt_corrected`: bits corrected.
* `cnt_uncorrectable`: sub frames found uncorrectable.
* `cnt_skipped`: sub frames skipped because they were not embedded.
* `cnt_writeback`: frames written back.
* `cnt_frames`: frames scanned.
* `fix_valid` / `fix_frame` / `fix_word` / `fix_bit`: one report per corrected
  bit.

## Files and parameters

| file | contents |
|---|---|
| `rtl/bieh_pkg.sv` | default sizes and the constant functions `sub_size`, `calc_delta`, `pay_to_frame` |
| `rtl/bieh_top.sv` | top: `embed_unit` and `scrubber` side by side |
| `rtl/embed_unit.sv` | embedding engine |
| `rtl/scrubber.sv` | scrub controller; instantiates the three blocks below |
| `rtl/syndrome_unit.sv` | word-serial de-interleaver and syndrome accumulator |
| `rtl/error_locator.sv` | syndrome to word/bit, correctable or not (combinational) |
| `rtl/frame_buffer.sv` | 81 x 32 simple dual-port memory, registered read |

All modules take `WORD_W` (32), `FRAME_WORDS` (81), `PHI` (13) and
`TRACK_LSB` (1280). `bieh_top` and `scrubber` also take `NFRAMES` (28,464).
Everything else is derived: the frame width, the sub frame sizes, the syndrome
width, and the address widths. All modules reset asynchronously on `rst_n` low.
The frame buffer has no reset.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog.

* `tb/tb_ref_pkg.sv` is a reference model. It walks the frame bit by bit to
  build the (sub frame, index) to bit table, and it has a generator of compliant
  frames.
* `tb/cfg_mem_model.sv` is a behavioural configuration memory. It adds random
  stalls on all three port channels.

| testbench | what it shows |
|---|---|
| `tb_error_locator` | every sub frame x syndrome x tracking value against the table |
| `tb_syndrome_unit` | random, compliant and single-upset frames, with input gaps |
| `tb_frame_buffer` | random reads and writes against a reference array |
| `tb_embed_unit` | the worked example above; random frames with 50/90/97 % essential bits, where embeddability is decided independently by enumerating reachable syndromes; exact latency |
| `tb_scrubber` | 8 frames covering a clean frame, one upset, 4- and 13-bit bursts, a burst across the tracking field, an uncorrectable pair, a non-embedded sub frame and the last word; exact memory image and counters |
| `tb_bieh_top` | whole design at default sizes: embeds 4 frames, places them in a 28,464-frame memory, injects faults, runs one full pass, compares the whole memory, and requires every mechanism to occur |
| `tb_error_campaign` | full device of random compliant frames: 5,000 random single upsets, then 2,000 random 4-bit bursts, one pass each; the memory must match an independent prediction bit for bit |

In the campaigns, 97.7 % of single upsets and 96.8 % of burst bits were
repaired in one pass. What remains are upsets that share a sub frame with
another upset in the same frame.

In `tb_embed_unit`, every sub frame of the random frames with 50 % and 90 %
essential bits could be embedded. With 97 % essential bits, only about six
non-essential bits are left per 199-bit sub frame, fewer than the 8 check bits,
and more than half of the sub frames (29 of 52) could not be embedded.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/*.sv tb/tb_ref_pkg.sv tb/cfg_mem_model.sv \
  tb/tb_bieh_top.sv --top-module tb_bieh_top -Mdir obj
./obj/Vtb_bieh_top
```

For another testbench, change the top module. Files it does not use do no
harm. All of them finish in seconds.

## What is design choice rather than scheme

* **Round-robin interleaving.** The scheme asks for sub frame bits spread
  evenly along the frame, and for equal sub frames. 2,579 bits do not divide
  by 13, so sizes differ by one.
* **The tracking field.** Its position, its polarity (1 = not embedded), and
  keeping it outside the sub frames are this design's choices.
* **No write-back for clean frames.** A frame with nothing corrected is not
  written back. An uncorrectable sub frame is counted and left unchanged.
* **Embedding in hardware.** The embedding step is given as hardware, using a
  sequential echelon solver; the scheme does it in software. Free
  non-essential bits are set to 0, as the scheme does.
* **Own interfaces.** The port protocol, the counters, and the word-serial,
  one-word-per-cycle datapath are all this design's own.
* **Not built.** Two things are left out:
  - the optional backup memory that would hold codes for sub frames that
    cannot be embedded;
  - the generation of the essential-bit mask, which comes from the FPGA
    vendor's tools.
* **Parity variant not built.** A simpler embedded-parity variant, which
  detects only and has one parity bit per frame, appears only as a
  stepping-stone to the Hamming scheme and is not built.
