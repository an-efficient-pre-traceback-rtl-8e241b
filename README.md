# Viterbi decoder with a pre-traceback survivor memory

A Viterbi decoder spends much of its area and energy in the survivor memory unit
(SMU), the store of decision bits from which the decoded path is traced back. A
conventional traceback SMU reads every decision bit twice: once by a *traceback*
pass that only looks for a reliable starting state, and once by the *decode* pass
that actually produces bits. That takes four memory banks of L columns and a
latency of 4L.

This design removes the traceback pass. While the decision vectors are being
written, a set of **pointer registers**, one per trellis state, is updated in the
forward direction so that each register always knows which state, at the start of
the current block of L steps, its survivor path came from. At the end of a block
the start state for decoding is simply read out of a register. Each decision bit is
then read only once, three banks of L columns are enough, and the decoded bits leave
3L steps after they entered instead of 4L.

The RTL is a complete rate-1/2, 3-bit soft-decision decoder: branch metric unit,
add-compare-select unit and the pre-traceback SMU, by default for constraint length
K = 7 (64 states) with a block (truncation) length L = 64.

## Trellis conventions

Everything hinges on one numbering of the states, shared by all blocks
(`viterbi_pkg`):

* A state is the last K-1 information bits, **newest bit in bit 0**. Input `u`
  moves state `s` to `{s[K-3:0], u}`.
* Backwards, the predecessor of state `s` with decision bit `d` is
  `{d, s >> 1}`. The ACS sets `d = 1` when predecessor `{1, s>>1}` won.
* The decoded bit of a state is its bit 0.
* The branch into `s` from `{d, s>>1}` covers the information bits
  `s[0]` (newest) ... `s[K-2]`, `d` (oldest). A coded bit is the parity of these bits
  masked by a generator polynomial, written in the usual octal form whose most
  significant bit taps the newest bit. Defaults: 133 and 171 octal for K = 7; for
  K = 9 use 561 and 753 octal.

## The pointer registers

Register `S[i]` (K-1 bits) exists for every state `i`. With `p = {d_i, i >> 1}`
the predecessor that the ACS just chose for state `i`:

| step                       | update                 |
|----------------------------|------------------------|
| first column of a block    | `S[i] <= p`            |
| every other column         | `S[i] <= S[p]`         |

The first line is the general rule with every register restarted at `S[j] = j`,
which lets one set of registers serve consecutive blocks without overlap. The second
line is a multiplexer per state: the survivor of `i` came through `p`, so it started
where `p`'s survivor started. After the last column of a block, `S[i]` is the state
at the beginning of the block that `i` descends from. Survivors merge within a block
of L = 64 steps, so all registers then hold the same value in practice (the end-to-end
test counts this). The decoder reads register 0 (`SEL`), an arbitrary choice, into
the **DC start register**.

Example for K = 3 (states 0..3): if a block's first two decision vectors give
predecessor tables `(0,2,1,3)` and then `(0,2,3,3)`, the registers hold `(0,2,1,3)`
after the first column and `(S[0],S[2],S[3],S[3]) = (0,1,3,3)` after the second.

## Memory schedule

The survivor memory (`survivor_mem`) holds three banks of L columns; a column is
the decision vector of one step. Each step does one write and one read:

| block period | bank 0 | bank 1 | bank 2 |
|--------------|--------|--------|--------|
| t            | WR     | DC     | idle   |
| t+1          | idle   | WR     | DC     |
| t+2          | DC     | idle   | WR     |

* **WR** writes columns 0..L-1 of the write bank and updates the pointer registers
  in the same step.
* At the last WR step of a block the pointer register gives the state at the end of
  the block written *before* it; it goes into the DC start register.
* **DC** walks that earlier block during the next period, columns L-1 down to 0,
  from the DC start register: emit bit 0 of the state, read the state's decision bit
  from the column, step to `{d, S >> 1}` (`dc_unit`).
* The bits come out newest first. A two-stack **LIFO** (`lifo`) puts them back in
  order: DC pushes one stack while the other, filled in the period before, is
  popped. The stacks swap every block.

So block j is written in period j, its end state is found during period j+1, it
is decoded in period j+2 and it leaves the LIFO in period j+3. The bit of step n
leaves at step n + 3L. WR and DC advance together, one column per step, so there is
a single clock and no faster read clock.

The memory read port is registered. `smu_ctrl` therefore presents the DC address of
the *next* step, and the read issued with the current step delivers it in time. That
address is never in the bank being written.

## Data path and interface

`viterbi_decoder` = `bmu` -> `acs` -> `smu`.

| port        | dir | width            | meaning |
|-------------|-----|------------------|---------|
| `clk`       | in  | 1                | clock, rising edge |
| `rst_n`     | in  | 1                | synchronous active-low reset |
| `in_valid`  | in  | 1                | a soft symbol pair is present |
| `in_sym`    | in  | `[1:0][SOFT_W-1:0]` | levels of coded bits c0 (`[0]`) and c1 (`[1]`); 0 = confident 0, 7 = confident 1 |
| `out_valid` | out | 1                | a decoded bit is present |
| `out_bit`   | out | 1                | decoded bit, in stream order |

* **Input:** one pair is accepted per clock. There is no back-pressure. When
  `in_valid` is low every stage holds.
* **Output:** the bit coded by pair n leaves 3 clocks after pair n + 3L is accepted.
  The 3 clocks are the BMU register, the ACS register and the LIFO output register.
  The first 3L pairs produce no output. To flush the last 3L bits of a stream, feed
  3L further pairs.
* **BMU:** the metric of label `{c1,c0}` is the sum of the distances of the two
  levels to the label bits: `r` for a 0, `7-r` for a 1. It is registered.
* **ACS:** all 2^(K-1) states in parallel, one step per clock. Path metrics are
  `PM_W = 9`-bit wrap-around numbers compared through the sign of their difference.
  This is exact because their spread stays below (K-1)·14 < 256 for K <= 9. Ties go
  to predecessor `{0, s>>1}`. Reset starts state 0 at 0 and the others at 64.

| parameter | default | meaning |
|-----------|---------|---------|
| `K`       | 7       | constraint length (2^(K-1) states) |
| `L`       | 64      | block / truncation length; memory 3L columns, latency 3L |
| `SOFT_W`  | 3       | soft input bits (8 levels) |
| `G0`,`G1` | 'o133, 'o171 | generator polynomials |
| `PM_W`    | 9       | path metric width |

At the defaults the survivor memory is 3 x 64 x 64 = 12288 bits, with 64 pointer
registers of 6 bits. For K = 9 it is 3 x 64 x 256 = 49152 bits.

## What is this design's own choice

The SMU structure follows the published pre-traceback architecture:
* three banks of L columns;
* the forward pointer update with restart per block;
* the DC start register;
* the backward decode-read;
* the two-stack LIFO;
* the 3L latency.

These parts are this design's own choices:
* the BMU and ACS internals, which the architecture only names;
* the code polynomials;
* the soft-level coding;
* metric normalisation, tie-breaking and reset values;
* the valid-strobe interface;
* the read prefetch;
* state 0 as the "arbitrary" state read from the pointer registers.

Each is the simplest option that does the job. The area, energy and 10 MHz power
figures quoted for the original implementation are not reproduced here.

Known limits:
* Decoding depth is at least L for the last bit of a block and 2L for its first.
  With L too short for the code, the pointer registers may not agree, and state 0's
  pick may not be the best one.
* Decoding does not start from the best-metric state.
* There is no frame termination or tail handling; the decoder streams.

## Files

| file | content |
|------|---------|
| `rtl/viterbi_pkg.sv` | state/branch-label conventions |
| `rtl/viterbi_decoder.sv` | top level |
| `rtl/bmu.sv`, `rtl/acs.sv` | branch metrics, add-compare-select |
| `rtl/smu.sv` | survivor memory unit, wires the five below |
| `rtl/smu_ctrl.sv` | column/bank rotation, read prefetch, LIFO select |
| `rtl/survivor_mem.sv` | 3 x L x 2^(K-1) decision memory |
| `rtl/pretraceback_ptr.sv` | pointer registers |
| `rtl/dc_unit.sv` | DC start register and decode-read |
| `rtl/lifo.sv` | two-stack bit reversal |

## Verification

Every module has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each one
compares the module against an independent reference model:

| testbench | reference |
|-----------|-----------|
| `acs_tb` | a full-width integer trellis |
| `pretraceback_ptr_tb` | a conventional backward traceback through the stored columns |
| `smu_tb` | a complete conventional traceback decoder over random decision vectors; also checks output order and timing |
| `viterbi_decoder_tb` | encodes 10^4 random bits at the default size (K = 7, L = 64), adds soft-level noise, one confident wrong level every 41 pairs and random input stalls; checks every decoded bit and its exact latency |
| `viterbi_k9_tb` | the same test for K = 9 (561/753 octal) |

The end-to-end testbenches also count how often each mechanism fired:
* input stalls;
* corrected channel errors;
* pointer restarts;
* DC start register loads;
* LIFO swaps;
* path-metric wrap;
* writes to each bank;
* blocks where all pointer registers agreed.

A mechanism that never fires counts as a failure. All testbenches print
`TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/viterbi_pkg.sv \
    tb/viterbi_decoder_tb.sv --top-module viterbi_decoder_tb -o sim
./obj_dir/sim
```

The full-size test runs in a few seconds.
