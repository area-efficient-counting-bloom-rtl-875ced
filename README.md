# Area-efficient counting Bloom filter (A-CBF) for signature pre-filtering

A network intrusion detection system has to compare traffic against a large
database of attack signatures. Searching that database, kept in SRAM, for every
packet costs long bit-line and word-line accesses. A counting Bloom filter
placed in front of the SRAM answers most queries on its own. If the filter
says "zero", the key is certainly not a stored signature and the SRAM is never
touched. Only when the filter says "non-zero" is the exact SRAM search started.
Some of those searches are false positives; none of the zero answers are false
negatives.

This RTL implements such a filter. Its counters are small 3-bit up/down LFSRs
(linear feedback shift registers) rather than binary counters. Each counter is
followed by an OR zero detector and an output buffer that is enabled only while
probing. That single-clock counter-plus-buffer entry is the area-saving idea of
the design. It replaces an earlier entry that used two-phase, non-overlapping
clocked flip-flops.

```
key ─┬─ hash 0 ─ decoder ─ 256 partitions ─ local/global mux ─┐
     ├─ hash 1 ─ decoder ─ 256 partitions ─ local/global mux ─┼─ zero test ─┬─ not_intrusion
     └─ hash 2 ─ decoder ─ 256 partitions ─ local/global mux ─┘             └─ sram_search + sram_key
```

## Operations

`op` (type `acbf_pkg::op_e`) selects one of four operations per clock:

| op       | code | effect                                                                 |
|----------|------|------------------------------------------------------------------------|
| OP_IDLE  | 00   | nothing                                                                |
| OP_INC   | 01   | add the key: each addressed counter steps up (saturates at 6)          |
| OP_DEC   | 10   | delete the key: each addressed counter steps down (saturates at 0)     |
| OP_PROBE | 11   | membership test; result one cycle later                                |

An update takes effect at the rising edge of the cycle in which it is
presented. A probe in cycle *t* sees every update of earlier cycles. In cycle
*t+1* it gives `result_valid = 1` and exactly one of the two verdicts:

* `not_intrusion = 1`: at least one addressed counter is zero, so the key is
  not in the set.
* `sram_search = 1`: all addressed counters are non-zero. `sram_key` holds the
  key for the exact search.

`rst` is synchronous and active-high. It clears every counter.

## The LFSR counter (the hardest part to read)

Each counter is a 3-bit shift register. A 2:1 multiplexer in front of every
flip-flop chooses the shift direction.

* Up (increment) uses the polynomial 1 + X² + X³. The bits shift towards the
  MSB, and bit 0 receives XNOR(q2, q1).
* Down (decrement) uses the reciprocal polynomial 1 + X + X³. The bits shift
  towards the LSB, and bit 2 receives XNOR(q0, q2). This is the exact inverse
  of the up step.

With XNOR feedback the all-zero state lies on the 7-state cycle. That makes
"000" mean "count 0", and a plain 3-input OR detects a non-zero count. The
all-ones state is the lock-up state and is never entered; an assertion checks
this. Counting up from reset visits:

| count | 0   | 1   | 2   | 3   | 4   | 5   | 6   |
|-------|-----|-----|-----|-----|-----|-----|-----|
| state | 000 | 001 | 011 | 110 | 101 | 010 | 100 |

The next up step from 100 would wrap to 000, and the entry would then falsely
read as empty. To prevent this, the counter holds at count 6 on increment and
at count 0 on decrement. As a result, more than six insertions into the same
counter make later deletions inexact.

## Partition entry

`acbf_partition` is one filter entry. It contains:

* The counter, which steps only when `update & dec_en`. In the original
  circuit this condition gates the counter clock. Here it is a clock enable,
  which synthesis can turn back into an integrated clock gate.
* The OR zero detector.
* The probe-enabled output. A tri-state buffer drives a shared line only while
  `probe` is 1. In this RTL the buffer is a data bit (`zd_out`) plus a drive
  flag (`zd_drive = probe`), so there are no Hi-Z nets.

## Hash, decoder and multiplexer

* `acbf_hash` is a universal hash. The 48-bit key is split into six 8-bit
  fields X1..X6. Hash *i* is h_i = (d_i1 & X1) ^ … ^ (d_i6 & X6), where the
  d_ij are fixed 8-bit constants. The constants come from
  `acbf_pkg::hash_const(i, j)`, a fixed xorshift32 function. Hash *i* uses
  `HASH_IDX = i`, so every bank gets its own constants.
* `acbf_hier_decoder` is the hierarchical 8-to-256 decoder. Four 2:4
  predecoders, on bits 1:0, 3:2, 5:4 and 7:6, have active-low (NAND-style)
  outputs. A NOR gate per output line takes one predecoded line from each
  group. `acbf_predec2to4` is one predecoder.
* `acbf_hier_mux` is the output multiplexer. Sixteen local 16:1 multiplexers
  select on the hash LSBs, and one global 16:1 multiplexer selects on the
  MSBs.
* `acbf_bank` contains the decoder, the 256 partitions and the multiplexer for
  one hash function.
* `acbf_decision` is the registered zero test across all banks.

## Parameters of `acbf_top`

| parameter  | default | meaning                                                          |
|------------|---------|------------------------------------------------------------------|
| NUM_HASH   | 3       | hash functions = counter banks; 1 gives a single-hash filter     |
| KEY_FIELDS | 6       | key fields X1..X6                                                |
| HASH_W     | 8       | field width and hash width; each bank has 2^HASH_W counters      |
| LOCAL_W    | 4       | address bits resolved by the local multiplexers                  |

At the defaults the filter has 3 × 256 counters (2,304 counter flip-flops) plus
the 48-bit result key register.

## How far the RTL follows the original circuit

The following parts follow the original design:

* the hash formula, the six key fields and the 8-bit hash
* the four-predecoder NOR decoder with 256 outputs
* the 3-bit XNOR up/down LFSR and its two polynomials
* the OR zero detector and the probe-enabled output
* the local/global multiplexer
* the zero test that either ends the query or starts the SRAM search

The following are choices made for this RTL, because the original circuit
does not specify them:

* the number of hash functions (3) and one bank per hash function
* the width of the key fields and the hash constants
* the operation encoding
* counter saturation
* clock enables in place of gated clocks
* data-plus-drive-flag in place of tri-state nets
* the local/global split of the multiplexer
* synchronous reset and the registered one-cycle result

The original circuit is described both as "8-bit count per entry" and as a
3-bit LFSR counter. This RTL uses the 3-bit counter, and the 8 bits are the
hash address.

These parts are not included:

* the signature SRAM and its exact search: only the request and key leave
  the design
* packet parsing, which produces the key
* the earlier two-phase-clock counter, which this design replaces

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/acbf_ref_pkg.sv` holds reference models
written independently of the RTL: the counter state table and the hash. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/acbf_pkg.sv tb/acbf_ref_pkg.sv \
    --top-module tb_acbf_top tb/tb_acbf_top.sv
./obj_dir/Vtb_acbf_top
```

* `tb_acbf_top` runs the whole filter at its default parameters:
  * it inserts a signature set, probes members and random non-members, and
    saturates one key
  * it deletes part of the set, deletes keys that were never inserted, mixes
    in idle cycles, and resets
  * it compares every verdict with a model and checks the one-cycle latency
  * it counts each of these mechanisms and fails if any never occurs:
    increment, decrement, probe, idle, both verdicts, false positive,
    saturation, delete-at-zero and reset
* `tb_acbf_single_hash` runs the same test with `NUM_HASH = 1`.
* The unit testbenches (`tb_acbf_lfsr_counter`, `tb_acbf_partition`,
  `tb_acbf_hier_decoder`, `tb_acbf_hier_mux`, `tb_acbf_hash`, `tb_acbf_bank`,
  `tb_acbf_decision`) check each block on its own. The decoder test is
  exhaustive.

All testbenches finish in well under a second of simulation time.
