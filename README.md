# Viterbi scoring board for isolated-word HMM recognition

This is the scoring engine of an isolated-word speech recogniser. Every 10 ms a front end turns
the speech into one vector-quantisation (VQ) index. The board's job is to advance the Viterbi
recursion of every word model in the vocabulary by one frame, for each such index. When the
utterance ends, it reports the word whose final state has the best score. One processing
element updates one HMM state per clock. At 10 MHz that is about 100,000 states per frame,
for example 2,000 words of 50 states each.

The recursion, in the log/integer form used throughout:

```
S_1(1) = b_1(O_1),            S_1(j) = -inf for j > 1
S_t(j) = max_i { S_(t-1)(i) + a_ij + b_j(O_t) }      over the predecessors i of j
P      = S_T(N)               the word with the largest P is recognised
```

`a` (transition) and `b` (output) metrics are 8-bit unsigned integers. State metrics are 16-bit
unsigned. In every case, larger means more probable. The host makes the 8-bit metrics from
probabilities p with `round(C*log10(p)) + 255`, clipped to 0..255. A value of about C = 51 spreads
typical models over the full range.

With several codebooks (parameter `NCB`, default 1), each frame brings one VQ index per
codebook. The output probability is the product of the codebook probabilities. Under the metric
mapping above, that product becomes `b = sum of the codebook metrics - (NCB-1)*255`, clipped at
0. The metric unit forms this sum from `NCB` B_Memory banks read in parallel.

## The main idea: a passing list instead of a transition matrix

Word HMMs are left-to-right and sparse: a state has at most a few predecessors, and they lie
just before it. So the processing element (PE) needs no full metric memory of the word. Metrics
of the previous frame are streamed in, state 1 first. A small **passing list** holds only those
states that some later state still needs.

The passing list is the **elastic storage** (`elastic_storage.sv`). It is a chain of four
registers, each behind a 2:1 multiplexer, and each has one control bit:

* `shift[k]=1`: register k loads from register k-1 (register 0 loads the incoming metric).
* `shift[k]=0`: register k keeps (recirculates) its value.

If register k-1 loads while register k keeps its value, the old contents of k-1 are dropped:
that state leaves the passing list. If register 3 keeps a value while newer states stream
through registers 0..2, an old state stays available for a long time. An example is a jump from
state 1 to every later state. The 4-bit control word for each state therefore encodes the
topology. A per-state mask says which of the four registers hold predecessors of the state
being computed.

Example, topology 3 (the Bakis model plus a jump from state 1), state by state:

| state j | shift (3..0) | registers after the shift (3,2,1,0) | predecessors used |
|---|---|---|---|
| 1 | 0001 | -, -, -, S1 | S1 |
| 2 | 0011 | -, -, S1, S2 | S1 S2 |
| 3 | 0111 | -, S1, S2, S3 | S1 S2 S3 |
| 4 | 1111 | S1, S2, S3, S4 | all four |
| 5 | 0111 | S1, S3, S4, S5 | S1 S3 S4 S5 (S2 dropped) |
| 6 | 0111 | S1, S4, S5, S6 | S1 S4 S5 S6 |

After the shift, the **ACS** (`acs_unit.sv`) forms `slot + a + b` for the four registers with
eight adders. Three maximizers in a tree pick the largest. The result is the new metric of state
j. A slot that is masked off, or holds minus infinity, takes no part.

## Topologies (topology ROM)

`topology_rom.sv` holds `{shift, valid}` for each (topology, state index). The contents are
computed at elaboration from these rules:

| topo | model | predecessors of state j |
|---|---|---|
| 0 | left-to-right | j, j-1 |
| 1 | Bakis | j, j-1, j-2 |
| 2 | Bakis, skips of one and two | j .. j-3 |
| 3 | Bakis plus a jump from state 1 | j, j-1, j-2, 1 |

The transition metric in slot k of a state's A_Memory word belongs to the predecessor held in
register k. That predecessor is j-k, except slot 3 of topology 3, which holds state 1. A word
has 2 to 64 states.

## Metric encoding and normalisation

* A state metric of **0 means minus infinity**. Real metrics are always at least 1. The first
  frame therefore sets `S_1(1) = b_1(O_1) + 1`. The same +1 applies to every word, so rankings
  are unchanged.
* Metrics grow by up to 510 per frame, so 16 bits would overflow after about 130 frames. The
  **normaliser** (`normalizer.sv`, inside the PE) watches the largest metric written in each
  frame. If that maximum reached 2^15, every metric read in the next frame is reduced by 2^14.
  Values saturate at 1, so a real metric never turns into minus infinity. The whole frame,
  every word included, is reduced by the same amount, so comparisons between words stay exact.
  Metrics stay below 2^15 + 510.

## Board organisation

The partition mirrors a board built from three FPGAs, four memories and a clock source:

| part | modules | role |
|---|---|---|
| host side (FPGA1) | `isa_slave`, `host_interface`, `scoring_controller` | register ports, parameter download, frame sequencing, LUT and S_Memory addresses |
| metric side (FPGA2) | `metric_unit`, `topology_rom` | A/B_Memory addresses, topology lookup, output-metric generation (several codebooks) and distribution |
| PE (FPGA3) | `processing_element` = `normalizer` + `elastic_storage` + `acs_unit` | one state per clock |
| memories | `board_ram` x4 | A: 4 transition metrics per state (2^17 x 32). B: output metric per (state, VQ index), one bank per codebook (NCB x 2^25 x 8). S: state metrics, two banks (2^18 x 16). LUT: per-word entry (2^11 x 32). |
| result | `word_selector` | best final-state metric per frame, published on End |
| top | `viterbi_board` | wiring |

A LUT entry (`lut_entry_t` in `vs_pkg.sv`) gives a word's first state address, its number of
states and its topology. Words may sit anywhere in the state address space.

### Pipeline and timing

```
clock c     controller issues state j of word w (global address g)
clock c+1   S_Memory[prev bank][g], A_Memory[g], B_Memory[{g,vq}], ROM[{topo,j}] arrive;
            metric normalised and pushed into the elastic storage
clock c+2   ACS on the four registers; result registered
clock c+3   result written to S_Memory[other bank][g]; final states go to the word selector
```

The controller prefetches the next word's LUT entry, so words follow each other with no gap.
A frame of T states takes exactly **T + 7 clocks** from its start to its end. For 100,000
states that is 100,007 clocks, or 10.0007 ms at 10 MHz. Strictly, 99,993 states fit in 10 ms.

S_Memory is read from one bank and written to the other, and the banks swap each frame. Writing
a state's new metric therefore never disturbs an old value that a later state still needs.

## Host programming model

The board is an I/O slave on the PC's ISA bus. It occupies eight 16-bit ports at even addresses
from `BASE_ADDR` (0x300 by default): register n is at 0x300 + 2n. `isa_slave.sv` synchronises
IOW# and IOR# to the board clock with two flip-flops. It captures address and data when the
synchronised IOW# falls, and issues a one-clock write strobe. Cycles with AEN high (DMA) are
ignored. For reads, the data driver enable `sd_oe` is decoded directly from the address and
IOR#. A bus cycle must last at least three board clocks, 300 ns at 10 MHz.

| addr | name | access | content |
|---|---|---|---|
| 0 | CTLPORT | R/W | bit0 Download, bit1 Start, bit2 FrameSync, bit3 End; all 0 at reset |
| 1 | VQ | W | bits 7:0 VQ index (0..255) for the next frame, bits 15:8 codebook number (reads return codebook 0) |
| 2 | ADDR_LO | R/W | download address 15:0 |
| 3 | ADDR_HI | R/W | download address 27:16 in bits 11:0; target memory in 15:14 (0 A, 1 B, 2 LUT) |
| 4 | DATA | W | download data; the address increments after each write (only while Download=1) |
| 5 | NWORDS | R/W | number of vocabulary words (1..2048) |
| 6 | STATUS | R | bit0 busy, bit1 result valid, bit2 next frame starts an utterance |
| 7 | RESULT | R | bit15 valid, bits 10:0 recognised word |

Download address formats:
* A: byte address `{state, slot}`.
* B: byte address `{codebook, state, vq}`, where the codebook is in address bits 27:25.
* LUT: halfword address `{word, half}`, low half first.

Recognition sequence:
1. Set Download, stream A, B and LUT data, then clear Download. Write NWORDS.
2. Set Start. The next frame initialises the utterance.
3. For each frame: write VQ (once per codebook), then write CTLPORT = Start|FrameSync. Poll CTLPORT until the board
   clears FrameSync (T + 7 clocks).
4. Write CTLPORT = Start|End. When the board clears End, read RESULT. That is the best word of
   the last frame. `valid` is 0 if no word has reached its final state yet.
5. Set Start again for the next utterance. After End, the next frame is again an
   initialisation frame.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M` line. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/vs_pkg.sv tb/tb_viterbi_board.sv --top-module tb_viterbi_board -o sim
./obj_dir/sim
```

Unit testbenches cover each module. Each one compares the module with a model written
separately in the testbench. `tb_viterbi_board` and `tb_viterbi_full` use `tb/viterbi_env.sv`.
This environment plays the host over the register ports. A reference Viterbi model in it is
built from predecessor sets, not from passing-list mechanics. It checks every metric written
to S_Memory, the T + 7 frame length and the recognised word. It also counts the mechanisms
(initialisation frames, normalised frames, recirculations, drops, word changes, End, downloads)
and fails if any never happened.

* `tb_viterbi_board`: two codebooks, 6 words of 3 to 12 states, all four topologies, and two
  utterances of 150 frames.
* `tb_viterbi_full`: the full real-time load at the default parameters. It uses 2,000 words of 50 states (100,000 states)
  and one 90-frame utterance, long enough to need normalisation. It takes a few seconds.

## What this design decides itself

These points are not fixed by the board description the design follows. They are choices made
here:

* **Pipeline:** the pipeline depth, the two-bank S_Memory, the LUT prefetch and the rule that
  every word has at least two states.
* **Metric encoding:** 0 means minus infinity, and the first metric carries a +1 offset.
* **Normalisation:** the scheme itself, subtracting 2^14 from the whole frame after a frame whose
  maximum reached 2^15.
* **Topology ROM:** the four topologies and the 64-state limit.
* **Memories:** the sizes and layouts, and the 256-entry codebook.
* **Host bus:** the I/O base address, the register map, the self-clearing FrameSync and End
  bits, and the address auto-increment.
* **Output metrics:** one output metric per state, b_j(O_t), is stored and copied to all four
  ACS inputs. The general form b_ij, one value per transition, would need four B bytes per
  state.
* **Several codebooks:** metrics are combined with the product rule given above. `NCB` defaults
  to 1.
* **End with no winner:** the best word of the last frame is reported. The result is marked
  invalid when every word's final state is still unreachable.

## Not included

* **Outside the board:** the front end, the host computer, FPGA configuration and the clock
  oscillator. The front end covers A/D, endpoint detection, LPC cepstrum and VQ. The testbench
  plays the role of the host and supplies VQ indices directly.
* **Best path:** there is no traceback. Only the best score is kept, which is all isolated-word
  recognition needs.
