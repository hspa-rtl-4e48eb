# HSPA: high-throughput sparse polynomial multipliers for HQC and BIKE

The code-based key-encapsulation schemes HQC and BIKE spend much of their
time on one operation: multiplying a dense binary polynomial `D` by a
sparse one `B` in the ring GF(2)[x]/(x^n + 1).

- `n` is a prime of 12,323 to 57,637 bits.
- `B` has only `omega` ones, between 71 and 149 of them.

Written as a matrix product, `W = B*D` is the XOR of `omega` columns of the
circulant matrix `rot(D)`. Column `p` is `D` rotated downwards by `p`
positions, so every column is a copy of `D`. The hardware never multiplies
anything: it produces the `omega` columns chosen by the nonzero indices
`P[i]` of `B` and adds them up.

This repository holds two accelerators that do this in constant time. Both
compute `W = B*D mod (x^n + 1)` from `D` and the list of indices `P[0..omega-1]`.

**Accelerator-I: parallel segment-based accumulation (PSA).** This one is
memory based and small:

- `t` column-executor cores each keep a copy of `D` in a RAM.
- Each core reads one column of `rot(D)` at a time as a stream of
  `N_mem`-bit segments.
- An accumulator XORs the `t` segments into the product held in a RAM.

`ceil(omega/t)` rounds of `ceil(n/N_mem)+2` cycles, plus five cycles of
start-up and drain, complete the product. At hqc-128 that is 1,415 cycles
with `t = 8` and `N_mem = 128`.

**Accelerator-II: permutation with powers (PWP).** This one is
register-only and wide:

- One `n`-bit register holds the current column.
- It moves from column `P[i-1]` to column `P[i]` by circular shifts of
  fixed sizes `v^j`.
- A second `n`-bit register accumulates the columns.

Every shift distance is a constant, so shifting is plain wiring. Each index
costs exactly `(v-1)*ceil(log_v n)` cycles, whatever its value: 1,800
cycles for hqc-128 with `v = 4`.

The two designs are alternatives that trade area against time. `hspa_top`
places them side by side, sharing only the clock and reset.

## Contents

- [The column view of the product](#the-column-view-of-the-product)
- [Accelerator-I (PSA)](#accelerator-i-psa)
  - [Memory layout](#memory-layout)
  - [Sub-control cell: where a column starts](#sub-control-cell-where-a-column-starts)
  - [Column former and its fixed two-word lag](#column-former-and-its-fixed-two-word-lag)
  - [Accumulation component](#accumulation-component)
  - [Control unit and timing](#control-unit-and-timing)
- [Accelerator-II (PWP)](#accelerator-ii-pwp)
  - [LS component: load and shift](#ls-component-load-and-shift)
  - [The constant-time stage scheme](#the-constant-time-stage-scheme)
  - [AO component](#ao-component)
  - [Control unit and timing](#control-unit-and-timing-1)
- [Top level](#top-level)
- [Parameter sets](#parameter-sets)
- [Where this RTL departs from the original description](#where-this-rtl-departs-from-the-original-description)
- [Verification](#verification)
- [Simulating with Verilator](#simulating-with-verilator)
- [Files](#files)

## The column view of the product

Write `D = d[0] + d[1] x + ... + d[n-1] x^(n-1)`. Multiplying by `x^p` modulo
`x^n + 1` rotates the coefficient vector: coefficient `j` of `x^p * D` is
`d[(j - p) mod n]`. The product is

    W = XOR over i of  x^P[i] * D

In the matrix picture, `x^P[i] * D` is column `P[i]` of `rot(D)`.

Read upwards from coefficient 0, that column is the stream

    d[q], d[q+1], ..., d[n-1], d[0], ..., d[q-1]     with q = (n - P[i]) mod n

Both accelerators are built around this fact:

- Accelerator-I reads the stream out of memory, starting at `q`.
- Accelerator-II never starts over. It turns column `P[i-1]` into column
  `P[i]` by rotating by the difference.

Throughout, bit `j` of an `n`-bit vector is the coefficient of `x^j`. A
`W`-bit word `a` of a polynomial in memory holds coefficients
`a*W .. a*W+W-1`. The last word is short: it holds `n mod W` coefficients,
or a full word if `n` is a multiple of `W`.

## Accelerator-I (PSA)

```
            start                 done/busy
              |                      ^
        +-----v----------------------+-----+
 P ---->| RAM_P --> control unit (acc1_cu) |
        +--+---------+-------------------+-+
    idx[j],|clr_i[j] |slot, slot_valid   |
           v         v                   |
        +--------------------------------+-+     +-------------------------+
 D ---->| ce_component: t x ce_core        |---->| accumulation_component  |---> W
        |  ce_subctrl -> RAM_D copy ->     | t   |  pointwise_adder (XOR)  |
        |  column_former                   | seg |  RAM_W read/modify/write|
        +----------------------------------+     +-------------------------+
```

The work is split into rounds of `t` indices (Algorithm 3 of the design).
In a round:

1. The control unit reads `t` indices from RAM_P and gives one to each core.
2. It issues `S+1` read slots, where `S = ceil(n/N_mem)`.
3. Every core walks its copy of `D` from its own start position.
4. Its column former cuts the stream into `S` segments of `N_mem` bits.
5. All cores deliver segment `s` in the same cycle.
6. The accumulation component XORs the `t` segments with word `s` of `W`
   and writes the result back.

After `ceil(omega/t)` rounds, RAM_W holds the product.

In the last round only `omega mod t` cores get an index. The others are
switched off through `clr_i` and contribute zero segments.

### Memory layout

- **RAM_D.** Each of the `t` cores has its own RAM_D (`sdp_ram`, one write
  port and one registered read port). It holds `S` words of `N_mem` bits.
  All copies share one write port, so the host loads `D` once.
- **RAM_P.** This holds the indices, `N_mem/16` of 16 bits per word.
  `P[i]` sits in word `i / (N_mem/16)` at bits `16*(i mod N_mem/16)`.
  With `t = 8` and `N_mem = 128`, one word is one round.
- **RAM_W.** This has the layout of RAM_D and receives the product.

### Sub-control cell: where a column starts

For its index `p`, `ce_subctrl` computes `q = (n - p) mod n`, then:

- the start word `a0 = q / N_mem`;
- the bit offset `off = q mod N_mem`.

During the `S+1` slots it requests words `a0, a0+1, ..., S-1, 0, 1, ...`.
Each request carries a tag with the range `[lo, hi)` of bits in the word
that belong to the column:

| slot              | word read                 | useful bits                |
|-------------------|---------------------------|----------------------------|
| 0                 | `a0`                      | `[off, hi)`                |
| 1 .. S-1          | next word, wrapping to 0  | `[0, hi)`                  |
| S                 | `a0` again                | `[0, off)`                 |

`hi` is `N_mem` for a full word and `n mod N_mem` for the short last word.

The last slot revisits the first word because the column ends with the
coefficients below the offset, `d[a0*N_mem .. q-1]`.

The bits in all `S+1` slots add up to exactly `n`.

### Column former and its fixed two-word lag

This is the subtle part of Accelerator-I. The column former receives, one
word per cycle, a variable number of useful bits. It must output `N_mem`-bit
segments of the column, and all `t` cores must output segment `s` in the
same cycle, or the point-wise adder would add mismatched segments.

The number of useful bits per word differs between cores:

- The first word gives `N_mem - off` bits, which depends on the index.
- The short last word of `D` appears at a different slot in each core,
  because the cores start at different addresses.

A core whose start offset is small could complete segment 0 after two
words. A core with a large offset that hits the short word early needs three.

The column former removes this variation with a fixed lag:

- **Segment `s` is taken at slot `s+2`.** This is always late enough. After
  slots `0..s+2` the former has received `(s+3)*N_mem` bits minus at most
  `off <= N_mem-1` missing from the first word and at most `N_mem-1` missing
  from the short word. That is at least `(s+1)*N_mem + 2` bits, more than the
  `(s+1)*N_mem` that segments `0..s` need.
- **Buffer size.** At slot `s+2` at most `(s+3)*N_mem` bits have arrived and
  `s*N_mem` have left, so the buffer is `3*N_mem` bits.
- **Last segment.** Segment `S-1` is only `n mod N_mem` bits long (or full).
  It is taken one cycle after slot `S`, the last slot, because slot `S+1`
  does not exist.

The merge itself is plain:

1. Shift the useful bits down to bit 0.
2. OR them into the buffer above the bits already held.
3. On an emit cycle, output the bottom `N_mem` bits and shift the rest down.

At slot 0 the buffer restarts empty. The outputs are registered and forced
to zero when the core is inactive.

Pipeline timing of one core, relative to slot `k`:

```
cycle   k        k+1               k+2
        request  RAM data + tag    segment registered (seg_valid)
                 merged / emitted
```

So segment `s` appears two cycles after slot `s+2`, and the last segment
three cycles after slot `S`.

A consequence of the lag: the first segment of a round is only ready two
slots into the round. The last segment leaves after the round's slots are
over, while the next round's index read is already under way. Rounds
therefore overlap by a few cycles, and the lag costs nothing per round. It
costs only the 4-cycle drain at the very end.

`ce_component` asserts that all cores raise `seg_valid` in the same cycles,
with the same segment index (property `a_lockstep`).

### Accumulation component

`accumulation_component` is a two-stage pipeline around RAM_W:

- **Stage 1.** Register the `t` segments and their index `s`. Read word `s`
  of RAM_W.
- **Stage 2.** `pointwise_adder` XORs the `t` segments and the old word. The
  result goes back to word `s`.

In the first round the old word is taken as zero instead of what RAM_W
holds. RAM_W therefore never needs clearing, and a new multiplication can
start right after the previous one.

Consecutive segments have consecutive addresses, and the same address
returns only a full round later. The read of word `s+1` and the write of
word `s` never clash, and no forwarding is needed.

After `done`, the host reads RAM_W through `w_re/w_raddr/w_rdata`, with data
one cycle after the request. Host reads are ignored while `busy` is high.

### Control unit and timing

`acc1_cu` is a state machine:

```
A1_RESET -> A1_RD_IDX -> A1_FULL ----+--> A1_RD_IDX (next round)
                |                    |
                +------> A1_LAST ----+--> A1_DRAIN (4) -> A1_DONE
```

| State        | Cycles                           | What happens |
|--------------|----------------------------------|--------------|
| `A1_RESET`   | 1                                | entered on `start` |
| `A1_RD_IDX`  | `RDC = t/(N_mem/16)` (1 at `t = 8`) | read the round's indices from RAM_P |
| `A1_FULL`    | `S+1` slots                      | a round in which all `t` cores work |
| `A1_LAST`    | `S+1` slots                      | the final `omega mod t` indices, with `clr_i` raised for the idle cores; skipped when `t` divides `omega` |
| `A1_DRAIN`   | 4                                | let the last segments reach RAM_W |
| `A1_DONE`    | until the next `start`           | `done` high |

The latency from the `start` pulse to `done` is

    1 + R*(RDC + S + 1) + 4,   R = ceil(omega/t)

It depends only on the sizes. For hqc-128 (`n = 17,669`, `omega = 75`,
`t = 8`): `S = 139`, `R = 10`, and the latency is 1,415 cycles.

## Accelerator-II (PWP)

```
           din (len_load/cycle)                dout (len_load/cycle)
                |                                   ^
         +------v---------------+  dnext   +--------+-------------+
         | ls_component         |--------->| ao_component         |
         | n-bit D' register,   |          | n-bit W register,    |
         | k fixed rotations    |          | XOR accumulate,      |
         +------^---------------+          | shift out            |
                | load, en, count          +--------^-------------+
         +------+------------------------------------+--+
 idx --->| acc2_cu: Idle/Reset/Load/Calculate/Output/Done |---> done
         +------------------------------------------------+
```

### LS component: load and shift

`ls_component` holds the current column `D'` in an `n`-bit register. The
`k = ceil(log_v n)` shift distances are `v^(k-1), ..., v, 1`. Rotating by
`p` is the fixed wiring `{D'[n-1-p:0], D'[n-1 -: p]}`. A multiplexer chosen
by `count` picks one of the `k` rotated copies, and a second multiplexer
picks between shifting and loading.

| Input         | Effect on `D'` |
|---------------|----------------|
| `load`        | moves up by `len_load` bits, with `din` entering at the bottom; after `ceil(n/len_load)` words the first word sent is at the top, so the host sends `D` most significant word first |
| `en`          | rotated once by `v^(k-1-count)` |
| neither       | holds |

The component also outputs `dnext`, the value the register takes at the
next edge. This lets the accumulator add a column in the same cycle as the
last shift that completes it.

### The constant-time stage scheme

This is the part of Accelerator-II that needs care. Moving from column
`P[i-1]` to column `P[i]` means rotating by

    delta' = (P[i] - P[i-1]) mod n,     with P[-1] = 0 (so delta' = P[0] first)

The rotation is split into `k` stages. Stage `j` rotates by `v^(k-1-j)` as
many times as the base-`v` digit

    eta_j = floor(delta' / v^(k-1-j)) mod v

says, between 0 and `v-1` times. Because `v` is a power of two, each digit
is simply a bit field of `delta'`.

A direct implementation would spend `sum(eta_j)` cycles per index, and the
total time would depend on the secret indices. Instead, every stage always
lasts `v-1` cycles:

- in cycle `c` of stage `j` (`c = 0..v-2`), `en = (c < eta_j)`;
- the register shifts in the first `eta_j` cycles and holds in the rest.

Each index therefore takes exactly `k*(v-1)` cycles, and the whole
Calculate phase lasts

    omega * (v-1) * k   cycles

This is 1,800 for hqc-128 with `v = 4` (`k = 8`). The power and timing
profile does not depend on the indices beyond which cycles have `en` set.
`en` only gates a register's enable, and the multiplexer select `count`
follows the fixed stage order.

The window of index `i` looks like this (`v = 4`, `k = 3`, `delta' = 0b10_01_11`):

```
stage  count  cycles  eta  en
  0      0    0 1 2    2   1 1 0
  1      1    3 4 5    1   1 0 0
  2      2    6 7 8    3   1 1 1   <- last cycle: acc (W ^= dnext)
```

On the last cycle of a window the AO component adds `dnext`, the finished
column, to `W`. The next window then starts from that column.

Indices enter through a one-word port: `idx` must carry `P[a]` one cycle
after `idx_addr = a`, as a synchronous RAM or a FIFO gives. The control
unit asks for `P[0]` during Load and for `P[i+1]` during the window of
index `i`, so the next `delta'` is ready when a window ends.

### AO component

`ao_component` holds `W` in an `n`-bit register:

- **`clr`** zeroes it.
- **`acc`** XORs in the column.
- **`csh_out`** moves it up by `len_load` bits, so the top `len_load` bits
  are `dout`. The product comes out most significant word first, the same
  order in which `D` goes in.

After the `ceil(n/len_load)` output cycles the register is empty, which the
top of Accelerator-II asserts.

### Control unit and timing

`acc2_cu`:

| State        | Cycles                       | Outputs |
|--------------|------------------------------|---------|
| `A2_IDLE`    | after reset, until `start`   | |
| `A2_RESET`   | 1                            | `clr` |
| `A2_LOAD`    | `L = ceil(n/len_load)`       | `load` (`d_req`): host drives one word of `D` per cycle |
| `A2_CALC`    | `omega*(v-1)*k`              | `en`, `count`, `acc` |
| `A2_OUTPUT`  | `L`                          | `csh_out` (`dout_valid`): one word of `W` per cycle |
| `A2_DONE`    | until the next `start`       | `done` |

For hqc-128 with `v = 4`, the load and output phases take 139 cycles each.

## Top level

`hspa_top` has parameters `N`, `OMEGA`, `T`, `NMEM`, `V` and `LEN_LOAD`. The
defaults are hqc-128: 17,669, 75, 8, 128, 4 and 128.

| Ports | Module | Meaning |
|-------|--------|---------|
| `a1_d_we/a1_d_waddr/a1_d_wdata` | `hspa_acc1` | write `D` |
| `a1_p_we/a1_p_waddr/a1_p_wdata` | `hspa_acc1` | write the indices |
| `a1_start`, `a1_busy`, `a1_done` | `hspa_acc1` | control |
| `a1_w_re/a1_w_raddr/a1_w_rdata` | `hspa_acc1` | read `W` |
| `a2_start`, `a2_done` | `hspa_acc2` | control |
| `a2_d_req/a2_din` | `hspa_acc2` | load `D` |
| `a2_idx_addr/a2_idx` | `hspa_acc2` | index port |
| `a2_dout_valid/a2_dout` | `hspa_acc2` | product out |

Reset (`rst_n`) is asynchronous and active low. The nonzero indices of `B`
come from the host: the accelerators do not sample them. Any source of
distinct indices below `n` works; they need not be sorted.

The index width is 16 bits, set by `IDX_W` in `hspa_pkg`, so `n < 65,536`.
`NMEM` must be a power of two, and `t` a multiple of `NMEM/16`. `V` must be a
power of two, at least 2.

Synthesis of the default top gives about 41,000 flip-flops and 161,000 RAM
bits. The RAM bits are eight copies of `D`, plus `W` and the indices. The
two 17,669-bit registers dominate the flip-flops.

## Parameter sets

`omega` below is the weight of the sparse factor in one multiplication. For
BIKE that is half the scheme's `w`, because each product uses one half of
the secret key.

| Set     | `n`    | weight | Acc-I cycles (`t` = 8) | Acc-II Calculate cycles, `v` = 16 / 8 |
|---------|--------|--------|------------------------|---------------------------------------|
| hqc-128 | 17,669 | 75     | 1,415                  | 4,500 / 2,625 (and 1,800 at `v` = 4, 1,125 at `v` = 2) |
| hqc-192 | 35,581 | 114    | 4,205                  | 6,840 / 4,788 |
| hqc-256 | 57,637 | 149    | 8,612                  | 8,940 / 6,258 |
| BIKE-1  | 12,323 | 71     | 896                    | 4,260 / 2,485 |
| BIKE-3  | 24,659 | 103    | 2,540                  | 6,180 / 3,605 |
| BIKE-5  | 40,973 | 137    | 5,819                  | 8,220 / 5,754 |

The sizes are elaboration parameters. The default build is hqc-128 with
`v = 4`; any other set needs `N`, `OMEGA` and (for Accelerator-II) `V`
overridden. All of these configurations are simulated by `tb_workloads`.

## Where this RTL departs from the original description

**Accelerator-I**

- **Latency.** The original quotes `ceil(omega/t)*(ceil(n/N_mem)+2)` cycles,
  1,410 for hqc-128. This RTL takes five more: one cycle in Reset and four
  in a Drain state that the original state diagram does not have. The Drain
  state waits for the last segments to pass the column former's two-word
  lag and the two-stage accumulator. The index read (`RDC` cycles per round)
  is not hidden, so at `t = 16` a round costs `S+3` cycles rather than
  `S+2`.
- **Published latencies that do not fit.** Two of the original latency
  values, for hqc-256 (9,508) and BIKE level 5 (5,653), are not a whole
  number of rounds of its own formula. This RTL gives 8,612 and 5,819.
- **Clearing RAM_W.** The original clears RAM_W in its Reset state. Here the
  first round ignores the stored `W` instead, so there is no clearing pass.
- **Column former.** The fixed two-word lag and the `3*N_mem`-bit buffer
  are this design's choices. The original only says that the former keeps
  the surplus bits for the next segment, and it counts `2*t*N_mem` bits of
  registers in total.
- **Fixed `t`.** The original names `t` an input ("speed choice"). Here it
  is a parameter.
- **Host interface.** `start` plays the role of the original external
  `clr`. The host write ports for RAM_D and RAM_P, and the read port for
  RAM_W, are this design's.

**Accelerator-II**

- **Stage timing.** The original says the stage select `count` advances
  every `2^ceil(log2 k)` cycles, but also that every stage lasts `v-1`
  cycles so that Calculate takes `omega*(v-1)*k`. This RTL follows the
  second statement, which matches all the published cycle counts.
- **Idle state.** An Idle state after reset waits for `start`. The original
  lists five states, starting with Reset.
- **Index port and word order.** The index port, the word order of load and
  output (most significant word first), and the `acc` strobe on the last
  cycle of each window are this design's choices. The original does not
  specify them.

**Not built**

- The sampler that produces the nonzero indices lies outside both
  accelerators.
- The fully parallel baseline multiplier that the original compares against
  is not part of this design.

## Verification

Every module has its own self-checking testbench in `tb/`:

- Each compares against an independent bit-level model, counts checks and
  failures, and has a watchdog.
- Each ends with a line `TB_RESULT checks=<n> failures=<m>`.
- Where a cycle count is defined, the testbench checks it.

Two host modules, `acc1_host` and `acc2_host`, drive an accelerator with
random `D` and random distinct indices. They compare every output bit with
a reference built by rotating `D` and XORing, and they check the latency
formulas above.

| Testbench                  | What it covers | Checks |
|----------------------------|----------------|--------|
| `tb_sdp_ram`               | random traffic against an array model, read latency, hold, old data on a read of the word being written | 2,000 |
| `tb_ce_subctrl`            | start word and offset, wrap, short last word, bit total = `n`, for every index at `n` = 521 | 6,773 |
| `tb_column_former`         | random word streams; segment contents and the fixed emit slots | 5,700 |
| `tb_ce_core`               | whole columns for random indices at two sizes; inactive cores | 8,442 |
| `tb_ce_component`          | `t` cores in lockstep with `clr_i` | 721 |
| `tb_pointwise_adder`       | XOR tree | 500 |
| `tb_accumulation_component`| first-round zeroing over random RAM_W contents, read-modify-write over several rounds, host read-back | 24 |
| `tb_acc1_cu`               | RAM_P addresses, slot sequence, indices per core, `clr_i` and `round_first` per round, states, latency, restart | 136 |
| `tb_hspa_acc1`             | full products at three reduced configurations: two RAM_P words per round with a partial last round, `omega` a multiple of `t`, and `t` = 8 with `N_mem` = 128 | 40 |
| `tb_ls_component`          | loading, every rotation distance, hold | 802 |
| `tb_ao_component`          | clear, accumulate, shift-out | 141 |
| `tb_acc2_cu`               | cycle-by-cycle phases, `count`, `en` equal to the digit pattern, `acc` on the last window cycle | 1,059 |
| `tb_hspa_acc2`             | full products for `v` = 2, 4, 8, 16 | 66 |
| `tb_hspa_top`              | both accelerators at full default size (hqc-128) | 14 |
| `tb_workloads`             | every parameter set above, both accelerators, `v` = 16 and 8 (plus 4 and 2 for hqc-128) | 108 |

`tb_hspa_top` also counts the mechanisms each product exercises, and fails
if any of them never happens:

- a partial last round;
- columns that wrap around the end of `D`;
- Accelerator-II stages that shift, and stages that idle.

The full-size end-to-end test runs in well under a second of simulation.
Building it takes about 10 seconds; `tb_workloads` takes about 40 seconds
to build and 10 to run.

## Simulating with Verilator

Verilator 5 with `--timing` is enough. From the repository root, for any
testbench `tb_<name>`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hspa_pkg.sv tb/tb_hspa_top.sv --top-module tb_hspa_top -Mdir obj_top -o sim
./obj_top/sim
```

The package must come first on the command line. The other modules are
found through `-y`. To try another size, change the parameters of the
`acc1_host`/`hspa_acc1` or `acc2_host`/`hspa_acc2` pairs in a testbench; the
hosts adapt their reference and expected latencies.

The testbenches pick random data with `$urandom`, and their seeds are
parameters.

## Files

`rtl/`:

| File | Contents |
|------|----------|
| `hspa_pkg.sv` | sizes (`IDX_W`), helper functions (`ceil_div`, `num_stages`, `ipow`), state enums |
| `sdp_ram.sv` | simple dual-port RAM, registered read |
| `ce_subctrl.sv` | start word, offset and read slots of a column |
| `column_former.sv` | segment assembly with the fixed lag |
| `ce_core.sv` | sub-control cell, RAM_D copy, column former |
| `ce_component.sv` | `t` cores |
| `pointwise_adder.sv` | `t+1`-input XOR |
| `accumulation_component.sv` | RAM_W and its read-modify-write pipeline |
| `acc1_cu.sv` | control unit of Accelerator-I |
| `hspa_acc1.sv` | Accelerator-I |
| `ls_component.sv` | load/shift register of Accelerator-II |
| `ao_component.sv` | accumulate/output register |
| `acc2_cu.sv` | control unit of Accelerator-II |
| `hspa_acc2.sv` | Accelerator-II |
| `hspa_top.sv` | both accelerators |

`tb/`:

- one `tb_<module>.sv` per module, plus `tb_workloads.sv`;
- the reusable hosts `acc1_host.sv` and `acc2_host.sv`.
