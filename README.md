# Two-stage scan test-data decompressor (9C-AFDER / 9C-RLHC)

Scan test sets are mostly don't-care bits. This design is the on-chip half of
a two-stage compression scheme that makes use of this. Off-chip, the test
set is compressed twice:

1. **9C (nine-coded) compression.** The test data are cut into K-bit blocks
   (K = 8 here). Each half of a block is all-0, all-1 or "mismatched" (u).
   Nine codewords cover the combinations. Mismatched halves travel
   uncompressed, right after their codeword, with their don't-cares filled by
   repeating the previous bit.
2. **A second pass over the 9C stream.** The 9C stream is now fully
   specified, and it is made of long runs of equal bits that often have the
   same length. It is compressed again with one of two codes:
   * **AFDER**: an alternating run-length code with a 2-bit code for "same
     length as the previous run";
   * **RLHC**: run-length patterns coded with a one-sided Huffman code.

On chip, `mdc_decoder` reverses both passes. It takes one compressed bit
per tester clock and shifts one scan bit per system clock into a single
scan chain. The tester can run much slower than the scan clock, because
each tester bit expands to many scan bits.

## Dataflow

```
             ACK_H
tester  <-----------+
data_in ---> FSM1: afder_fsm | rlhc_fsm ---> sync_block ---> FSM2: c9_fsm
(1 bit per          (chosen by scheme_sel)    (16-bit FIFO)    |  Sel1/Sel0     Cnt_en/INC/Done
 phi clocks)                                       |           v                      ^
                                                   +--u bits-> scan_mux --> data_out  |
                                                                            sc_en  half_counter
```

| module          | role |
|-----------------|------|
| `mdc_decoder`   | top: wires the two stages together and selects the first-stage code |
| `afder_fsm`     | first stage, AFDER decoder: codeword to run of 0s or 1s |
| `rlhc_fsm`      | first stage, RLHC decoder: codeword to pattern `0..01` or `0000` |
| `sync_block`    | bit FIFO between the stages, so both decode at the same time |
| `c9_fsm`        | second stage, 9C decoder: codeword to K scan bits |
| `half_counter`  | counts the K/2 bits of each half block and raises Done |
| `scan_mux`      | 3-to-1 MUX: constant 0, constant 1, or a bit from the stream |
| `mdc_pkg`       | 9C symbols, MUX select code, per-symbol half table |

All logic runs on one clock, the system/scan clock. The slower tester clock
is treated as a data strobe: `data_in_valid` is high when the tester presents
a bit, and the bit is taken in a cycle where `ack_h` is also high. The
tester must hold the bit until it is taken. A tester at f_SYS/phi therefore
offers a bit every phi clocks.

## The 9C code (second stage)

| case | codeword | left half | right half | bits after the codeword |
|------|----------|-----------|------------|-------------------------|
| C1 | `0`     | 0 | 0 | — |
| C2 | `10`    | 1 | 1 | — |
| C3 | `11000` | 0 | 1 | — |
| C4 | `11001` | 1 | 0 | — |
| C5 | `11010` | 1 | u | K/2 |
| C6 | `11011` | u | 1 | K/2 |
| C7 | `11100` | 0 | u | K/2 |
| C8 | `11101` | u | 0 | K/2 |
| C9 | `1111`  | u | u | K |

`c9_fsm` detects codewords with a six-state tree: S1 is the root, S2 is after
`1`, S3 after `11`, S4 after `110`, S5 after `111`, and S6 waits for the last
bit. It then emits the two halves. For each half it drives the MUX select
and holds `Cnt_en`. `half_counter` counts `INC` pulses and raises `Done` in
the cycle of the K/2-th bit. In a u half, each scan bit is taken from the
FIFO through the MUX, so the mismatched bits are never stored in the FSM. If
the FIFO runs dry during a u half, `sc_en` drops for that cycle and the
scan chain does not shift. After the second `Done`, `ack` pulses and the FSM
goes back to S1. The left half is shifted first.

With the stream always available, a block takes |C| + K clocks. Here |C| is
the codeword length without the mismatched bits: 1, 2, 4 or 5.

## AFDER (first-stage option 1)

The 9C stream is viewed as runs that alternate between 0s and 1s. A run of
length r is sent as:

| group | run lengths | codeword |
|-------|-------------|----------|
| repeat | same as the previous run | `01` |
| A1 | 1–2    | `00` + 1 tail bit |
| A2 | 3–6    | `10` + 2 tail bits |
| A3 | 7–14   | `110` + 3 tail bits |
| A4 | 15–30  | `1110` + 4 tail bits |
| Ak | 2^k−1 … 2^(k+1)−2 | (k−1) ones, `0`, k tail bits; r = 2^k − 1 + tail |

Because runs alternate, the decoder only needs the value of the first run.
This design sends that value as a single header bit at the start of every
compressed set, after reset or a `restart` pulse. The "repeat" code gives a
run of the same length as the previous one, with the opposite value.

`afder_fsm` reads the prefix, counts the ones, and reads the tail. It then
writes the run into the FIFO, one bit per clock. While it writes a run,
`ack_h` is low, so the tester waits. There are `MAX_GROUP` = 6 groups,
which makes the longest run L_max = 126. Runs longer than that cannot be
coded. A longer prefix, or a repeat code before the first run, sets the
sticky `err` output. Raise `MAX_GROUP` if your 9C streams have longer runs.
The run counter is MAX_GROUP+1 bits wide.

## RLHC (first-stage option 2)

With group size MH (default 4), the 9C stream is cut into MH+1 patterns:
L_i = i zeros followed by a one (i < MH), and L_MH = MH zeros. The patterns
are ranked by how often they occur in the test set. The Huffman tree grows
on one side only, so the pattern ranked r gets r ones followed by a zero,
and the last-ranked pattern gets MH ones:

```
rank 0: 0    rank 1: 10    rank 2: 110    rank 3: 1110    rank 4: 1111   (MH = 4)
```

`rlhc_fsm` counts leading ones up to MH, looks up the pattern in the
`rlhc_table` input (rank → pattern index), and writes the pattern into the
FIFO. The ranking belongs to each test set, so here it is a table input
that the test program loads, not logic fixed into the FSM. A compressed set
must end on a pattern boundary. An encoder can ensure this by appending
all-0 blocks: each adds one `0` to the 9C stream.

## Synchronization block

The first stage writes bursts of up to 126 bits. The second stage reads one
bit per clock while it reads a codeword, and much more slowly while it
expands a constant half. `sync_block` lets both stages work at once. It is
a 16-bit FIFO made of a bit memory, write and read pointer registers, a
read multiplexer, and an XOR compare of the two pointers. The XOR is zero
when the FIFO is empty; only the wrap bit differs when it is full. When the
FIFO is full, FSM1 stalls. When it is empty, FSM2 stalls, and its `rd_valid`
output serves as the 9C enable.

## Test application time

Each pass of the end-to-end testbench checks this bound on the clock count
for N blocks, a compressed size |T_E| and a 9C size |T_E1|:

    max(phi·|T_E|, K·N)  <=  clocks  <=  phi·|T_E| + K·N + |T_E1|

With phi = 4 and random sets of 24,000 test bits, about 73–79% of the data
is removed. Decoding takes about 1.4–1.6 clocks per scan bit.

## Interfaces of the top (`mdc_decoder`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | system clock; synchronous active-low reset |
| `restart` | in | start of a new compressed set (FSM1 re-arms, AFDER re-reads its polarity bit) |
| `scheme_sel` | in | `SCHEME_AFDER` or `SCHEME_RLHC`; change it only between sets, together with `restart` |
| `rlhc_table[0..MH]` | in | RLHC rank → pattern index |
| `data_in`, `data_in_valid` / `ack_h` | in / out | tester bit with valid/ready handshake |
| `data_out`, `sc_en` | out | scan bit, and shift enable for the scan chain |
| `ack` | out | one pulse per decoded K-bit block |
| `dec_en`, `cmp` | out | FSM1 is expanding a codeword / wrote the last bit of a run or pattern |
| `c9_sym`, `fsm1_code_done`, `afder_group`, `rlhc_rank`, `sync_full`, `sync_empty`, `err` | out | status for test and debug |

Parameters: `K` = 8 (even), `M_H` = 4, `MAX_GROUP` = 6, `FIFO_DEPTH` = 16
(a power of two).

## Where this design departs from the original description, or fills gaps

* There is one clock domain. The tester clock becomes a valid strobe with
  ACK_H as the ready signal. There is no separate ATE clock.
* Both first-stage decoders are built and chosen at run time. The original
  architecture has one of them, fixed.
* The synchronization block is described only by its parts: memory,
  register, MUX, XOR gates and control. Here it is read as a FIFO whose XOR
  gates compare pointers. Codeword detection stays in the 9C FSM.
* `CMP` is a pulse per run or pattern rather than a level. `Sc_en` is a
  per-clock shift enable, not a level that spans a whole block.
* The AFDER first-run polarity is a leading header bit. Six AFDER groups
  are assumed.
* The RLHC rank-to-pattern map is a run-time table.
* 9C timing: the mismatched bits pass through while they are being shifted
  out. A block therefore costs |C| + K clocks instead of the codeword plus
  mismatched bits plus K.
* The parts outside the decoder are not modelled as RTL: the tester and the
  scan chain of the circuit under test. The testbenches act as both.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference
encoders (9C with fill, AFDER, RLHC with frequency ranking) are in
`tb/tb_mdc_pkg.sv`. They are written separately from the RTL.

* `tb_scan_mux` checks every select code exhaustively.
* `tb_half_counter` checks Done and count against a model.
* `tb_sync_block` checks random traffic against a queue model, and that
  both full and empty occur.
* `tb_c9_fsm` runs all nine cases and checks the |C| + K clock count. It
  also checks a stream that runs dry at random.
* `tb_afder_fsm` checks the code-table entries by hand, including repeats.
  It then checks 600 random runs that reach every group up to 126, and the
  error flag.
* `tb_rlhc_fsm` checks a hand-decoded 24-bit sequence, then a random
  frequency-ranked stream. It also checks that codeword length equals tester
  bits.
* `tb_mdc_decoder` runs the top at default parameters through 9C-AFDER,
  then 9C-RLHC, then 9C-AFDER again (24,000 + 24,000 + 6,000 test bits). It
  compares every scan bit and checks the clock-count bounds. It also
  requires every mechanism to occur: all nine codewords, all AFDER groups
  and the repeat code, all RLHC ranks, FIFO full, FIFO empty, tester waits,
  and the scheme switch.
* `tb_iscas_workloads` runs synthetic test sets with the sizes of six
  ISCAS'89 benchmark test sets, through 9C-AFDER and through 9C-RLHC. For
  RLHC it uses the group size that best suits each circuit: M_H = 5, 6, 8,
  8, 5 and 5. Twelve decoder instances run in parallel. The table below
  lists one run.

| set (bits)       | 9C-AFDER: compressed bits / clocks | 9C-RLHC: M_H, compressed bits / clocks |
|------------------|--------------------------|-------------------------------|
| s5378 (23,760)   | 5,948 / 38,452           | 5, 5,848 / 34,005              |
| s9234 (39,280)   | 9,765 / 62,544           | 6, 7,917 / 52,564              |
| s13207 (165,200) | 41,123 / 262,941         | 8, 34,431 / 229,088            |
| s15850 (76,992)  | 19,321 / 123,098         | 8, 16,265 / 107,778            |
| s38417 (164,736) | 43,781 / 269,079         | 5, 37,486 / 228,083            |
| s38584 (199,104) | 51,525 / 322,495         | 5, 47,310 / 280,354            |

These are random stand-in sets of the right size and a high share of
don't-cares. The real ATPG cubes would give different ratios. What the
runs show is that the decoder reproduces every scan bit of sets this
large, with the tester at one quarter of the system clock.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mdc_pkg.sv tb/tb_mdc_pkg.sv tb/tb_mdc_decoder.sv --top-module tb_mdc_decoder
./obj_dir/Vtb_mdc_decoder
```

The testbenches are two-state and set their inputs at the falling clock
edge. They use `$urandom` with the simulator's default seed.

## Limits

* Runs longer than L_max = 2^(MAX_GROUP+1) − 2 cannot be coded in AFDER.
* Only a single scan chain is driven.
* The reported compression ratios come from random synthetic test sets. The
  original benchmark test cubes are not part of this repository, so these
  numbers are not comparable with published results.
