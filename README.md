# Self-checking RS(255,239) decoder and its fault-injection platform

Reed-Solomon codes protect memories against single event upsets (SEUs). The
decoder is logic too, though, and an upset inside it can corrupt a word
that arrived intact. This design makes the decoder check itself. The checks
do not depend on how the decoder is built. They use two facts that always
hold for a fault-free decoder:

1. **Property 1:** its output is always a codeword. Every syndrome of the
   output word is zero.
2. **Property 2:** its output differs from the received word in at most
   t = 8 symbols. The error polynomial e(x) = r(x) + c(x) has Hamming
   weight ≤ t.

If an internal fault changes the output, one of the two properties breaks.
The output is then either not a codeword, or a wrong codeword. A wrong
codeword differs from the right one in at least 2t+1 = 17 symbols, so it
lies more than t symbols from the received word.

The RTL also includes the FPGA side of a fault-injection system built to
measure this:

- a **timing unit** that runs the unit under test (UUT) up to a chosen
  clock cycle and stops it there;
- a **UUT wrapper** that streams test patterns into the self-checking
  decoder and records everything it produces.

Both sit on an OPB bus. The processor that runs the campaign and the
configuration port it uses to flip flip-flops are not part of the RTL. The
testbench plays their role.

```
                 received r(x), highest degree first
   in_data ──────────┬───────────────────────────────┐
                     v                               v
              ┌─────────────┐   c(x)        ┌──────────────────┐
              │ rs_decoder  ├──────┬───────>│ XOR  <── shift   │ error_poly_recovery
              │ (255,239)   │      │        │        register  │ (circular buffer)
              └─────────────┘      │        └────────┬─────────┘
                                   │                 │ e(x)
                                   v                 v
                        ┌──────────────────┐ ┌────────────────────────┐
                        │ codeword_checker │ │ hamming_weight_counter │
                        │ 16 syndrome cells│ │  weight(e) > t ?       │
                        └────────┬─────────┘ └───────────┬────────────┘
                                 └──────────┬────────────┘
                                            v
                                   ┌─────────────────┐
                                   │ error_detection │──> fault / property 1 / property 2
                                   └─────────────────┘
```

## Code conventions

| item | choice |
|---|---|
| field | GF(2^8), primitive polynomial x^8+x^4+x^3+x^2+1 (0x11D), α = 0x02 |
| code | RS(255,239), t = 8, 2t = 16 check symbols |
| generator | g(x) = ∏_{j=0}^{15} (x + α^{FCR+j}), FCR = 0 by default |
| syndromes | S_j = r(α^{FCR+j}), j = 0..15, named S0..S15 |
| symbol order | highest degree first: the first symbol of a word is the coefficient of x^254 |

The source says only that α is primitive. The polynomial 0x11D and FCR = 0
are this design's choices, and the usual ones for this code. Both live in
`gf256_pkg` and as a parameter, so either can be changed in one place.

## The syndrome cell

Everything that tests whether a word is a codeword is built from one small
block, `syndrome_cell`. It holds an adder, a register D, and a constant
multiplier by α^{FCR+j} on the feedback. With the highest-degree symbol
first, Horner's rule needs one XOR and one constant multiply per symbol:

    D <= D·α^{FCR+j} + c_k

After the last symbol, D holds S_j. `clear` starts a new word, and the
syndrome appears the cycle after the last symbol. The constant multiplier
is a fixed XOR network.

## The decoder (`rs_decoder`)

The source specifies the decoder by its function alone. This
implementation is a plain three-stage pipeline that sustains one symbol
per clock:

| stage | work | cycles per word |
|---|---|---|
| A input | writes the word into a two-word buffer (2 × 256 bytes); 16 syndrome cells run on the stream | N = 255 |
| B key equation | Berlekamp–Massey, one iteration per cycle, gives Λ(x) (degree ≤ 8); the same discrepancy datapath then computes Ω(x) = S(x)Λ(x) mod x^8, one coefficient per cycle | 1 + 16 + 8 + 1 |
| C correction | Chien search from position 254 down to 0, Forney's formula, buffered symbol read back and corrected | N |

Some details of the datapath:

- **Berlekamp–Massey stage.** The discrepancy is d_r = Σ_i Λ_i·S_{r−i},
  made by nine multipliers and an XOR tree. The iteration keeps x^m·B(x)
  ready-shifted, so each cycle does two things. It updates
  Λ ← Λ + (d/b)·x^m B. It then either shifts x^m B by one, or loads x·Λ
  when the length L changes (2L ≤ r). The division d/b is b^254, built as
  a chain of squarings.
- **Chien search.** Registers hold Λ_i·X^{−i} and Ω_i·X^{−i}, with X the
  position being tested. Each cycle multiplies them by constants α^i. At
  the start of a word they are loaded with Λ_i·α^{−i(N−1)}. This also
  makes shortened codes (N < 255) work.
- **Forney's formula.** With FCR = 0 the error value at a root is
  e = Ω(X^{−1}) / Λ_odd(X^{−1}), where Λ_odd is the sum of the odd terms
  of Λ. One inverse and one multiply per cycle give it. For FCR ≠ 0 a
  third register supplies the extra factor X^{−FCR}.
- **Failure flag.** `out_fail` is set with `out_last` when the decoder
  gives up on a word. That happens when L > t, or when the number of roots
  found differs from L. Such a word had more than t channel errors, and
  its output symbols are not reliable.

### Timing

- `in_valid`/`in_ready` handshake; every N accepted symbols form one word.
  No frame marker is needed.
- The output has no back-pressure. A word comes out as N consecutive
  cycles of `out_valid`, marked by `out_first` and `out_last`. Each cycle
  carries `out_data = r ⊕ e` and `out_err = e`.
- Latency: the first corrected symbol appears **28 cycles** after the last
  received symbol.
- Stage C of the next word may start in the same cycle that stage C of the
  current word ends, so back-to-back words flow without gaps.
- `in_ready` drops only on the last symbol of a word, and only while stage
  B still holds the previous word. At N = 255 this never happens. It does
  happen for strongly shortened codes: RS(21,5) stalls on most words, as
  `tb_rs_decoder_short` shows.
- Buffer safety: word w+2 reuses word w's buffer. It cannot start before
  stage C has begun reading word w, and both go in the same address order
  at one symbol per cycle, so reads stay ahead of writes.

## The checkers

**`codeword_checker`** runs a second set of 16 syndrome cells on the
decoder *output*. Any non-zero syndrome means property 1 is violated.
Alongside the verdict it reports each syndrome and its non-zero flag, so
one can see which syndrome element caught a fault.

`SYN_MASK` selects the cells to build:

- `16'hFFFF` (default) builds all 16.
- `16'h000A` builds S1 and S3 only, the reduced checker. In the source's
  campaign, S1 alone caught 92 % of the activated faults and S1 with S3
  caught all of them.

Cells outside the mask are not generated and read as 0.

**`error_poly_recovery`** rebuilds e(x) outside the decoder, so that a
fault in the decoder's own e(x) output cannot hide itself. Each symbol that
enters the decoder is pushed into a shift register. Each output symbol pops
the oldest entry and XORs it with that output.

The register is a circular buffer (2N+64 entries inside `sc_rs_decoder`),
not a fixed delay line. It therefore stays aligned whatever the decoder's
latency or stalls. Sticky overflow/underflow flags, checked by an
assertion, would show a misalignment.

**`hamming_weight_counter`** counts the non-zero symbols of e(x) over a
word. A weight above t means property 2 is violated.

**`error_detection`** ORs the two results into `fault_detected`. It
classifies the word as follows:

- *property 1* when the output is not a codeword;
- *property 2* when the output is a codeword that is too far from the
  received word.

It also keeps a count of flagged words.

**`sc_rs_decoder`** wires all of the above together. Its parameters give
three configurations:

| configuration | SYN_MASK | USE_HAMMING | USE_RECOVERY |
|---|---|---|---|
| full scheme (default) | 16'hFFFF | 1 | 1 |
| reduced scheme | 16'h000A | 0 | – |
| trust the decoder's e(x) | any | 1 | 0 |

`det_valid` pulses two cycles after `out_last`. In that cycle the verdict,
the held syndrome vector, the non-zero flags and the weight all belong to
the word that just ended.

Coverage of the reduced scheme: it detects every fault whose output is not
a codeword with S1 or S3 non-zero. It cannot see a wrong codeword. A change
by a whole codeword keeps every syndrome zero, and the Hamming counter is
gone. The source found this case rare: it left about 0.0026 % of activated
faults uncovered.

An uncorrectable channel word (more than t errors) normally also leaves the
decoder as a non-codeword, so the checker flags it. The decoder's
`out_fail` tells these words apart from internal faults.

## Fault-injection platform

### Timing unit (`timing_unit`, OPB base 0x4000_0000)

| offset | register | meaning |
|---|---|---|
| 0x0 | CTRL | bit0: hold UUT in reset (also clears CYCLE); bit1: run freely; bit2: run while CYCLE < FT, then stop (clears itself) |
| 0x4 | FT | fault injection time, in UUT clock cycles |
| 0x8 | CYCLE (RO) | UUT clock edges delivered since the UUT reset |
| 0xC | STATUS (RO) | bit0: UUT clock running; bit1: FT reached |

- **UUT clock.** `uut_clk = clk AND en`, with `en` re-timed on the falling
  edge of `clk`. The clock is glitch-free and its edges are `clk`'s own
  edges.
- **UUT reset.** `uut_rst_n` is low while the system reset is low or CTRL
  bit 0 is set. Out of system reset the UUT is held in reset.
- **Stopping at a cycle.** "Run to FT, flip a bit, run to the end" is two
  run-to-FT commands. The second one resumes exactly where the first one
  stopped.

### UUT wrapper (`uut_wrapper`, OPB base 0x4001_0000)

A processor cannot feed a symbol per clock over the bus. The wrapper
therefore keeps a pattern memory and capture memories, and the UUT runs at
full speed between bus accesses.

| offset | content |
|---|---|
| 0x0000 | IN_LEN: number of pattern symbols streamed per run |
| 0x0004 / 0x0008 / 0x000C / 0x0010 | OUT_CNT, DET_CNT, FED, FLAGGED counters (read only; FLAGGED = words flagged as faulty) |
| 0x4000 + 4i | pattern symbol i (1024 deep) |
| 0x8000 + 4i | output symbol i: bits 7:0 corrected symbol, 15:8 error value (1024 deep) |
| 0xC000 + 4i | verdict of word i (8 deep): bit0 fault, bit1 property 1, bit2 property 2, bit3 decoder failure, 19:4 non-zero syndromes S15..S0, 27:20 weight |

Clock domains:

- Everything that talks to the decoder runs on `uut_clk` and is reset by
  `uut_rst_n`. The bus side runs on `clk`.
- Software writes the pattern memory and reads the capture memories only
  while the UUT clock is stopped.

### Top (`fi_fpga_top`)

The top instantiates the timing unit and the wrapper and connects them to
one OPB master port: `OPB_select`, `OPB_RNW`, `OPB_ABus`, `OPB_DBus` in;
`Sl_xferAck`, `Sl_DBus` out.

- Each slave acknowledges one cycle after `select`.
- Each slave drives zeros when it is not addressed, so the top simply ORs
  the two responses.
- `uut_clk`, `uut_rst_n`, the UUT cycle count and the per-word verdict
  come out for monitoring.

A campaign, as the top-level testbench runs it:

1. Load the pattern and set IN_LEN.
2. Golden run: reset the UUT, run to the end, read outputs and verdicts.
3. For each fault:
   1. Reset the UUT and run to FT.
   2. Read one UUT flip-flop and write back its opposite value. On the
      FPGA this goes through the configuration port.
   3. Run to the end and read back.
   4. Classify the run as *silent* (outputs equal the golden run) or
      *wrong answer*, and note whether the self-checking decoder flagged
      it.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| rs_decoder, sc_rs_decoder | N, K, T, FCR | 255, 239, 8, 0 | N ≤ 255; N−K even; shortened codes work |
| codeword_checker, sc_rs_decoder | SYN_MASK | 16'hFFFF | 16'h000A = S1 + S3 |
| sc_rs_decoder | USE_HAMMING, USE_RECOVERY | 1, 1 | |
| error_poly_recovery | DEPTH | 512 | 2N+64 when used inside sc_rs_decoder |
| timing_unit | ADDR_BASE, CNT_W | 0x4000_0000, 32 | |
| uut_wrapper | ADDR_BASE, IN_DEPTH, OUT_DEPTH, DET_DEPTH | 0x4001_0000, 1024, 1024, 8 | |

Sizes after generic synthesis of the default top: about 2,700 word-level
cells, 1,060 flip-flops, and 33 kbit of memory. Most of the memory is the
wrapper's pattern and capture memories; the self-checking decoder alone
needs 8.7 kbit.

## Files

`rtl/`:

- `gf256_pkg.sv` – field arithmetic: multiply, α^e, inverse.
- `syndrome_cell.sv`, `codeword_checker.sv`, `rs_decoder.sv`.
- `error_poly_recovery.sv`, `hamming_weight_counter.sv`,
  `error_detection.sv`, `sc_rs_decoder.sv`.
- `opb_if.sv` – slave side of the bus, shared by the two slaves.
- `timing_unit.sv`, `uut_wrapper.sv`, `fi_fpga_top.sv`.

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`.
- `tb_rs_decoder_short.sv`.
- `tb_seu_campaign.sv` – a random SEU campaign on the self-checking decoder
  (see below).
- `tb_rs_pkg.sv` – the reference model: table-based GF arithmetic, a
  systematic encoder, direct syndrome sums and error injection. It is
  written independently of the RTL.

## Simulation

The testbenches need Verilator 5 with timing support. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself, or a watchdog stops
it. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/gf256_pkg.sv tb/tb_rs_pkg.sv rtl/opb_if.sv \
    rtl/syndrome_cell.sv rtl/rs_decoder.sv rtl/codeword_checker.sv \
    rtl/error_poly_recovery.sv rtl/hamming_weight_counter.sv \
    rtl/error_detection.sv rtl/sc_rs_decoder.sv rtl/timing_unit.sv \
    rtl/uut_wrapper.sv rtl/fi_fpga_top.sv tb/tb_fi_fpga_top.sv \
    --top-module tb_fi_fpga_top
./obj_dir/Vtb_fi_fpga_top
```

For another testbench, swap the last file and the top module name. Extra
files on the command line do no harm.

| testbench | what it shows |
|---|---|
| tb_syndrome_cell | S1 and S3 of random words against direct sums, with gaps |
| tb_codeword_checker | codewords and corrupted words; full and S1+S3 checkers; every syndrome and flag |
| tb_rs_decoder | 24 words with 0..8 errors, plus two with 12 errors that must be flagged; every symbol and error value; 28-cycle latency; one symbol per cycle |
| tb_rs_decoder_short | the same on RS(21,5), where the input stalls; no symbol is lost across stalls |
| tb_error_poly_recovery | alignment under random input/output gaps |
| tb_hamming_weight_counter | weights 0..255 around the limit t |
| tb_error_detection | truth table of the verdict, with and without the Hamming counter |
| tb_sc_rs_decoder | flips a bit in the decoder's word buffer (property 1) and changes a stored word by a codeword (property 2); full vs. reduced scheme; fault-free words are never flagged |
| tb_timing_unit | exact stop at FT, resume, free run, reset, glitch-free gated clock |
| tb_uut_wrapper | pattern load, full-rate run, read-back of every output and verdict |
| tb_fi_fpga_top | a complete campaign at default parameters: golden run, 14 random SEUs in decoder registers and buffer, 2 aimed faults; every wrong answer must be flagged and every silent run must not be |
| tb_seu_campaign | 1,500 random SEUs in the decoder's data flip-flops; every activated fault must be flagged by the full scheme and no correct word may be flagged; reports per-element detection |

In the campaign testbench most random SEUs are silent. A flip lands in a
buffer half that is no longer read, or in a register about to be reloaded.
Every wrong answer is detected.

## Measured detection

`tb_seu_campaign` decodes the same two received words (5 and 8 channel
errors) 1,500 times. In each run it flips one random bit, at a random cycle,
in one of these data flip-flops of the decoder:

- the word buffer;
- the syndrome, locator, evaluator and Chien registers;
- the output register.

Control flip-flops (counters, state) are left alone, because flipping them
can break the word framing, which neither property covers. One run of the
test gave:

| check | activated faults detected |
|---|---|
| full scheme (16 syndromes + Hamming counter) | 446 of 446 (100 %) |
| S1 alone | 440 (98.7 %) |
| S1 and S3 | 443 (99.3 %) |
| Hamming counter alone | 111 (25 %) |
| least effective single element, S0 | 435 (97.5 %) |

All activated faults in this campaign left a non-codeword (property 1).
None produced a wrong codeword, so the Hamming counter added nothing. This
agrees with the source's first run. There, the syndromes alone caught
99.9974 % of activated faults, so the counter can be dropped.

The share caught by each syndrome element is much flatter here than the
source's per-element table. There, S1 caught 92 % and S15 0.1 %. The share
depends on the decoder's internal architecture, which differs between the
two. A decoder with a different structure should be re-measured before
choosing a reduced syndrome set.

## What follows the source and what does not

From the source:

- the two properties and the scheme of checkers around the decoder;
- the Horner syndrome cell;
- the shift-register-and-XOR recovery of e(x);
- the RS(255,239) code with 16 syndromes S0..S15;
- the reduced S1 + S3 checker without the Hamming counter;
- the timing unit's job of driving the UUT clock and reset and stopping
  at a fault time;
- a wrapper that links the UUT to the OPB.

This design's own choices:

- the decoder architecture (the source leaves it open);
- the field polynomial, the first root and the symbol order;
- all handshakes, latencies and reset behaviour;
- the circular-buffer form of the shift register;
- the OR that combines the two checks;
- the clock gate;
- the register maps, the pattern and capture memories, and the subset of
  OPB signals.

Not included:

- the OPB arbiter and master side;
- the embedded processor and its memory;
- the configuration access port used to read and flip flip-flops. These
  are vendor blocks. The top-level testbench takes the processor's and the
  port's place.

The published generator formula lists 2t+1 factors; this design follows
the 16 = 2t syndromes used everywhere else.

Limits:

- The decoder has no output back-pressure.
- The wrapper's capture memory holds four words of output. Longer
  patterns need larger `IN_DEPTH`/`OUT_DEPTH`/`DET_DEPTH`.
