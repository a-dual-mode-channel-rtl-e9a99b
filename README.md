# Dual-mode turbo / Viterbi channel decoder for 3GPP2 (cdma2000)

A cdma2000 terminal has to decode two kinds of forward-error-correction code:

- the **rate-1/5 turbo code**, with two 8-state recursive systematic encoders and an interleaver, for blocks of 378 to 20,730 bits;
- the **constraint-length-9 convolutional codes** of rates 1/2, 1/3, 1/4 and 1/6, with 256 states.

Both are decoded on a trellis with add-compare-select (ACS) recursions. This design puts both decoders behind one top module, `dual_mode_decoder`, and lets them share the ACS hardware. There are 24 dual-mode ACS cells, each selecting the maximum for the Max-Log-MAP turbo recursions or the minimum for the Viterbi algorithm. In Viterbi mode, 16 of them do the Viterbi decoder's work.

The turbo side has these features:

- one soft-in/soft-out MAP decoder, used twice per iteration;
- a sliding-window schedule with sub-blocks of 20 steps, so the forward metrics of only one sub-block are ever stored;
- a 60-word input cache, so each received symbol is fetched once per half-iteration, although three recursions read it;
- a single extrinsic memory that serves as both interleaver and de-interleaver;
- an interleaver address generator computed on the fly and duplicated, so it never stalls.

The Viterbi side uses 16 ACS cells over 16 cycles per trellis step, and a six-bank survivor memory traced back with a three-pointer scheme. It decodes one bit every 19 cycles.

Default parameters:

| parameter | value | meaning |
|---|---|---|
| `MAX_N` | 20730 | largest turbo block |
| `ITER` | 6 | turbo iterations |
| `L` | 20 | MAP sub-block length |
| `TL` | 48 | Viterbi truncation length |

```
              mode --> clock_gate x2 (one gated clock per core)
               |
   t_* ----> turbo_decoder --------------------------------------------+
              |  turbo_interleaver x2 (read side, write side)          |
              |  sram_1r1w: systematic memory, extrinsic memory        |
              |  map_decoder                                           |
              |    input_cache (3 sub-blocks)                          |
              |    turbo_tmu x3 -> turbo_acs_block x3 (alpha, beta1,   |
              |                    beta2; 8 acs_unit each)             |
              |    lifo (alpha store) -> llr_unit -> lifo (reorder)    |
              |          ^ 16 cells of alpha + beta1 lent out          |
              |          | (acs_ext_*, Viterbi mode)                   |
   v_* ----> viterbi_decoder                                           |
                 vit_tmu -> ACS operands / results -> PM banks, PMU    |
                 vit_smu (6-bank survivor memory, 3 pointers, LIFO)    |
```

## Turbo mode

### One MAP decoder, two phases per iteration

One iteration runs the same `map_decoder` twice.

- **Phase 1** (first constituent code) reads, in natural order:
  - the systematic LLR x[k];
  - the parities y0[k] and y1[k];
  - the a-priori value Le[k].

  It writes its extrinsic output back to Le[k].
- **Phase 2** (second constituent code) reads x[π(k)], the second encoder's parities y0'[k] and y1'[k], and Le[π(k)]. It writes its extrinsic output back to Le[π(k)].

Every location is read before it is rewritten, so one extrinsic memory of `MAX_N` words is enough: phase 2 works entirely in interleaved addresses, and phase 1 in natural ones. The a-priori input is 0 in the first phase of the first iteration.

The systematic LLRs are copied into a second `MAX_N`-word memory during the very first phase, so that phase 2 can read them in interleaved order. The parities are read again from the caller's symbol buffer in every phase.

Two copies of the address generator run in phase 2:

- one produces π(k) for the read side;
- the other produces the same sequence, delayed by the decoder's latency, for the write side.

After the last phase 2, the sign of each a-posteriori LLR is the hard decision. It leaves on `t_dec_valid` / `t_dec_addr` / `t_dec_bit`, with the natural-order address, in interleaved order.

### Sliding-window schedule

`map_decoder` cuts the block into sub-blocks of L = 20 steps and runs three recursions side by side. In period p (L cycles):

| recursion | sub-block | start value | output |
|---|---|---|---|
| β1 (warm-up, backward) | p-1 | all states equal | its final metrics become β2's start for the next period |
| α (forward) | p-2 | state 0 at the block start, otherwise continues | pushed into a LIFO |
| β2 (backward) | p-3 | β1's result of the previous period | with the α LIFO, feeds the LLR unit |

Each recursion has its own TMU and its own block of 8 ACS cells, 24 cells in all. The idea is that a backward recursion started from "all states equal" has converged after one sub-block. β2 therefore starts from reliable metrics without a pass over the whole block.

The block is padded with zero-LLR steps up to a multiple of L, and the schedule runs four sub-blocks past the block end. Zero inputs leave the backward metrics equal, so the block end is treated as an unknown state: the tail symbols are not used.

Timing of one run:

- step k is fetched at cycle k-1 after `start`;
- its LLR leaves 4L+1 cycles after the fetch;
- one run takes (⌈N/L⌉+4)·L+2 cycles.

With one cycle of hand-over per phase, a whole block takes **12·((⌈N/20⌉+4)·20+3) cycles** in six iterations. That is 249,876 cycles, or 12.05 cycles per bit, for N = 20,730. The testbenches check this count exactly.

### Input cache

α, β1 and β2 each read every step of the block once, at different times. To avoid three reads of the big memories, `input_cache` holds three sub-blocks (3 × 20 words of 24 bits: x, y0, y1 and La at 6 bits each). It has three read ports and one write port.

While β2 reads the oldest sub-block backwards, the newest sub-block is written, word j into the place β2 has just read (entry L-1-j). A sub-block therefore sits in its slot either forwards or backwards. One direction bit per slot records which, and the readers give (slot, entry) pairs that the cache maps to physical addresses.

### Branch metrics, ACS and normalisation

`turbo_tmu` forms the eight branch metrics as

γ(u, c0, c1) = (x + La)·u + y0·c0 + y1·c1, with u, c0, c1 ∈ {0, 1}.

Dropping the terms that are multiplied by zero changes no difference between metrics, and the recursions use only differences. No channel-reliability scaling is applied: Max-Log-MAP does not need an SNR estimate.

Path metrics are 9 bits: an 8-bit 6.2 range plus one bit for modulo normalisation. They are allowed to wrap. `acs_unit` compares two candidates through the sign of their modulo difference, which is correct while the true spread stays below half the range. No metric is ever rescaled.

### LLR unit and re-ordering

`llr_unit` combines α (popped from the LIFO in reverse), β2 and γ.

- **A-posteriori LLR:** the largest α+γ+β over the branches with u = 1, minus the largest over u = 0. It is saturated to 10 bits (8.2).
- **Extrinsic value:** the a-posteriori LLR minus (x + La). It is saturated to the 6-bit 4.2 range, −8.00 … +7.75, which is the format stored in the extrinsic memory.

β2 runs backwards, so the LLRs of a sub-block come out in reverse. `lifo` reverses them again. It is one memory whose address counts up through one block and down through the next: each word is read just before its place is reused.

### Interleaver address generator

`turbo_interleaver` computes the cdma2000 turbo interleaver with no address table. A table for 20,730 15-bit addresses would hold 311 kbit.

For block size N, n is the smallest value with N ≤ 2^(n+5). The generator steps an (n+5)-bit counter c, and the tentative address is

```
{ bitrev5(c[4:0]),  ((c[n+4:5] + 1) * T_n[c[4:0]]) mod 2^n }
```

T_n is the standard's 32-entry table of odd multipliers for each n = 4 … 10; it is in `dmcd_pkg::il_table`.

Tentative addresses ≥ N are skipped. A second generator works on c+1 at the same time, and of any two successive counter values at least one gives a valid address. So one valid address comes out every cycle, and the MAP decoder never waits.

## Viterbi mode

### ACS schedule

The 256-state trellis is updated 16 states per cycle over 16 cycles, on the ACS cells of the turbo core's α and β1 blocks (see below). In cycle g the ACS cell i computes state s' = 16g + i from its two predecessors p = (2s' mod 256) + b, for b ∈ {0, 1}. The input bit of that transition is s'[7].

`vit_tmu` gives each cell the two branch metrics: the sum over the code symbols of |soft − expected|. Soft values are 4 bits (0 = sure '0', 15 = sure '1'), so at rate 1/6 a branch metric can reach 90, which fits in 7 bits. The expected code symbols come from the standard's generator polynomials:

| rate | generators (octal) |
|---|---|
| 1/2 | 753, 561 |
| 1/3 | 557, 663, 711 |
| 1/4 | 765, 671, 513, 473 |
| 1/6 | 457, 755, 511, 637, 625, 727 |

The third rate-1/6 generator is 511 here. Some editions of the standard list 551; check it against the one in use. It is one constant in `dmcd_pkg::conv_poly`.

Path metrics are 11 bits: 10 bits plus the modulo bit, compared as in turbo mode but keeping the minimum. They live in two banks of 256, which swap roles each step.

While a step's metrics are produced, the path-metric unit keeps the state with the smallest one. That state starts the next trace-back.

### Sharing the ACS cells

The ACS cells are built 11 bits wide. In turbo mode a cell runs the 9-bit turbo metrics: it takes the sign of the low 9 bits of the difference, and its consumers keep the low 9 bits of the survivor. The low bits of a sum do not depend on the high bits, so this is exact.

Each `turbo_acs_block` has an operand multiplexer in front of its cells and an `ext_*` port. While `acs_ext_en` is high, the cells take their operands from that port, select the minimum and return survivors and decision bits. The top raises it in Viterbi mode; `map_decoder` lends out the α and β1 blocks (cells 0–7 and 8–15), and β2's cells stay private.

`viterbi_decoder` keeps its metric banks, branch metrics and operand routing, and sends the 16 operand sets out through `acs_*` when its parameter `EXT_ACS` = 1, which is what the top uses. With `EXT_ACS` = 0 it builds its own 16 cells and runs stand-alone; its unit testbench uses that.

### Survivor memory: six banks, three pointers

`vit_smu` stores the 16 decision bits of each ACS cycle as one word. A trellis step is therefore one column of 16 words. The memory holds 3·TL columns in six banks of TL/2 columns.

Each step takes 19 single-port accesses:

| cycle | operation | what it does |
|---|---|---|
| 0–15 | WR | write the step's 16 decision words |
| 16 | TB1 | one trace-back step through the bank written last; it starts from the best state of its newest column |
| 17 | TB2 | one trace-back step three banks back, continuing the path TB1 ended in the previous bank period |
| 18 | DC | one step five banks back, continuing TB2's path, emitting the input bit of each state it passes |

A trace-back step reads the decision bit D of state S and moves to S = (S << 1) | D. A bank is therefore decoded only after at least TL steps of trace-back. DC walks backwards, so its bits go through a TL/2-deep LIFO and leave in order.

At 19 cycles per bit, the decoder gives 5.26 Mb/s at 100 MHz.

Decoded bits appear on `v_out_valid` / `v_out_bit` about 3·TL steps after their own step. The decoder runs as a continuous stream. To push out the last bits of a frame, encode 3·TL extra zero bits after it and send their symbols.

## Number formats

| quantity | bits | format |
|---|---|---|
| received turbo LLR (x, y0, y1, y0', y1') | 6 | 3.3 signed |
| a-priori / extrinsic value | 6 | 4.2 signed, saturated to −8 … +7.75 |
| turbo branch metric | 8 | 6.2 |
| turbo path metric | 9 | 6.2 + modulo bit |
| a-posteriori LLR | 10 | 8.2, saturated |
| Viterbi soft input | 4 | 0 … 15 |
| Viterbi branch metric | 7 | 0 … 90 |
| Viterbi path metric | 11 | 10 bits + modulo bit |

The channel LLRs are brought to the 2-bit fraction of the metrics by dropping one LSB. The a-posteriori LLR could in principle reach ±136. It is kept to an 8-bit integer part because larger values are extremely rare and only the sign and the extrinsic value (already clipped) are used.

## Interfaces and timing of `dual_mode_decoder`

All ports are synchronous to `clk`; `rst_n` is an asynchronous, active-low reset.

`mode` (`MODE_TURBO` / `MODE_VITERBI`) selects the core. Each core has its own clock gate, and the unselected core's clock is stopped; it also receives no start pulse and no data. Because the gate samples its enable on the falling edge, `mode` must be set at least one cycle before the start pulse. `mode` may change only while the turbo core is idle; an assertion checks this. Viterbi state, including survivor memory contents, is kept while its clock is stopped, but every stream starts afresh with `v_start`.

**Turbo core:**

1. Pulse `t_start` with `t_blk_len` = N. N must be one of the 18 standard block sizes.
2. The decoder fetches received symbols through `t_sym_rd_en` / `t_sym_rd_addr`. It expects `t_sym_rd_data` = {x, y0, y1, y0', y1'} of that step one cycle later; the address is always natural order.
3. During the final phase, decisions leave on `t_dec_valid` / `t_dec_addr` / `t_dec_bit`, then `t_done` pulses.

Status outputs: `t_busy`, `t_iter` (iteration number), `t_phase2`, and `t_il_dup`, which marks cycles where the duplicated interleaver generator supplied the address.

**Viterbi core:**

1. Pulse `v_start` with `v_rate`; all paths then start in state 0.
2. Present one trellis step per `v_sym_valid` / `v_sym_ready` handshake. `v_sym[0..5]` are soft symbols; entries beyond the rate's symbol count are ignored. `v_sym_ready` is high once every 19 cycles while a stream runs.
3. Decoded bits leave on `v_out_valid` / `v_out_bit`.

## Departures from the fabricated chip

- **Clocks and memories.** The chip clocks its memories at twice the datapath rate, so that single-port SRAMs can serve a read and a write per datapath cycle. Here every memory is a one-read-one-write array (`sram_1r1w`, read-first) clocked with the datapath, and the datapath takes one trellis step per clock. A block therefore takes 12.05 clocks per bit at N = 20,730. With a 50 MHz datapath that would be 4.15 Mb/s; the chip reports 4.52 Mb/s, for a schedule that is not described in enough detail to reproduce. At a single 100 MHz clock this design gives 8.3 Mb/s.
- **Clock gating.** Each core runs on its own gated clock (`clock_gate`: a falling-edge enable flip-flop and an AND gate), so the unselected core's clock stops, as in the chip. The turbo core's half-rate datapath clock, also derived by gating in the chip, is not built (see above).
- **Survivor memory.** The chip keeps the Viterbi survivor bits in the turbo interleaver memory. Here `vit_smu` has its own small memory (6 × 24 × 16 bits); the ACS cells, in contrast, are shared as in the chip.
- **Truncation length.** The Viterbi truncation length is not stated as a number. `TL = 48` is this design's choice: at least five times the constraint length of 9, and even, so that each of the six banks holds TL/2 = 24 columns.
- **Tail symbols.** The turbo tail symbols are ignored, and the block end is treated as an unknown state.
- **Pointer details.** The exact assignment of the trace-back pointers to banks and cycles, the initial Viterbi metrics (0 for state 0, 400 for the others) and the α start (0 for state 0, −32 for the others) are this design's choices.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line. Reference models (3GPP2 turbo encoder, interleaver sequence, Gaussian channel) are in `tb/turbo_ref_pkg.sv`. The Viterbi testbenches carry their own convolutional encoder.

| testbench | what it checks |
|---|---|
| `tb_clock_gate` | gated clock follows the enable without glitches when the enable changes at random times |
| `tb_acs_unit` | max/min selection across metric wrap-around, against integer arithmetic |
| `tb_turbo_tmu`, `tb_turbo_acs_block`, `tb_llr_unit` | exhaustive or random comparison with reference formulas on the trellis; the ACS block also in lent-out (min) mode |
| `tb_lifo`, `tb_sram_1r1w`, `tb_input_cache` | ordering and read-before-write behaviour |
| `tb_turbo_interleaver` | the address sequence of all 18 block sizes against a reference permutation |
| `tb_map_decoder` | LLRs bit-exact against an integer model of the windowed schedule (N = 378 and 1146); erasure runs; latency 4L+3 |
| `tb_turbo_decoder` | noisy blocks decoded error-free; every address decided once; exact cycle count; duplicated generator used |
| `tb_turbo_block_sizes` | every standard block size, 378 to 20,730, at default parameters and about 20 % raw bit errors; exact cycle counts |
| `tb_vit_tmu`, `tb_vit_smu` | branch metrics for all rates; trace-back on synthetic decision patterns |
| `tb_viterbi_decoder` | all four rates through a noisy channel; 19-cycle output spacing |
| `tb_dual_mode_decoder` | the top at default parameters: a 20,730-bit turbo block, Viterbi streams at rates 1/6 and 1/2, a 378-bit turbo block. It counts mode switches, duplicated interleaver addresses, extrinsic clipping, α metric wrap, Viterbi metric wrap, phase-2 starts, cycles in which the turbo ACS cells work for the Viterbi core, and cycles in which each core's clock is stopped, and fails if any never happens. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/dmcd_pkg.sv tb/turbo_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v dmcd_pkg) tb/tb_dual_mode_decoder.sv \
    --top-module tb_dual_mode_decoder -Mdir obj -o sim
./obj/sim
```

Replace the last testbench file and the top-module name for any other testbench. All of them finish in a few seconds; the full-size top test simulates about 280,000 cycles.

## Files

| file | contents |
|---|---|
| `rtl/dmcd_pkg.sv` | widths, types, encoder and generator functions, interleaver tables |
| `rtl/dual_mode_decoder.sv` | top level |
| `rtl/clock_gate.sv` | clock gate that stops the unselected core |
| `rtl/turbo_decoder.sv`, `rtl/map_decoder.sv`, `rtl/input_cache.sv`, `rtl/turbo_tmu.sv`, `rtl/turbo_acs_block.sv`, `rtl/llr_unit.sv`, `rtl/lifo.sv`, `rtl/turbo_interleaver.sv`, `rtl/sram_1r1w.sv` | turbo core |
| `rtl/viterbi_decoder.sv`, `rtl/vit_tmu.sv`, `rtl/vit_smu.sv` | Viterbi core |
| `rtl/acs_unit.sv` | the dual-mode ACS cell, shared by both decoders |
| `tb/` | testbenches and `turbo_ref_pkg` |
