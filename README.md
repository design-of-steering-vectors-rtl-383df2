# Steering vectors for a dynamically reconfigurable slot array

A reconfigurable processor that swaps functional units at run time needs a way
to get configuration bits into its reconfigurable fabric quickly. This design
implements the loading side of such a machine. The fabric is cut into **N
slots**. The bits that can go into the slots are arranged as **K steering
vectors**. Each vector has N elements, and element *i* holds one slot's worth
of configuration for slot *i*. Every slot has its own **K x 1 bus** (a
W-bit multiplexer), so each slot picks its element from any of the K vectors,
independently of the other slots. With K = 2 and N = 5, only five select lines
reach many more configurations than the two vectors alone.

The main configuration follows a published case study: a superscalar-style
processor with N = 5 slots, K = 2 vectors, and four unit types:

| unit | meaning                          | slots |
|------|----------------------------------|-------|
| IAL  | integer arithmetic/logic         | 1     |
| IMD  | integer multiply/divide          | 2     |
| FAL  | floating-point arithmetic/logic  | 2     |
| FMD  | floating-point multiply/divide   | 3     |

The two vectors are

    s1 = (FAL_1, FAL_2, IMD_1, IMD_2, IAL_1)      slot 0 .. slot 4
    s2 = (FMD_1, FMD_2, FMD_3, IAL_1, IAL_1)

`FAL_2` is the second slot's worth of a FAL unit. A unit that spans several
slots works only when all of its parts sit in adjacent slots in order.

## How a configuration is formed

In the usual notation, each vector k has a 0/1 control vector `c_k` of
length N. For every slot, exactly one of the `c_k` holds a 1. The slots then
receive

    l = c_1 o s_1 + ... + c_K o s_K        (o = element-wise product)

The hardware does not carry the `c_k`. Each slot gets a binary select
`sel[i]` of `log2 K` bits instead, which makes every setting a legal set of
control vectors. For example, with s1 and s2 above:

| sel (slot 0..4) | slots hold                          | complete units     |
|-----------------|-------------------------------------|--------------------|
| 0 0 0 0 0       | FAL_1 FAL_2 IMD_1 IMD_2 IAL_1       | FAL, IMD, IAL      |
| 1 1 1 1 1       | FMD_1 FMD_2 FMD_3 IAL_1 IAL_1       | FMD, 2 x IAL       |
| 0 0 0 1 1       | FAL_1 FAL_2 IMD_1 IAL_1 IAL_1       | FAL, 2 x IAL       |

In the third row, slot 2 holds half of an IMD unit and does nothing useful.

Which vectors to build is a design-time decision. The designer lists the unit
mixes worth reaching and picks the smallest K, and the vectors, that reach
them. The vectors are therefore a **parameter** here (`SV_MAP`), not run-time
state. Only the configuration bits behind them are written at run time.

## Partitions are stored once

`IAL_1` appears in three elements of the case-study vectors. The memory
(`steering_vectors`) stores each distinct partition once: `N_PARTS` blocks of
`SLOT_BITS` bits each. The wiring fans each block out to every element that
names it. `SV_MAP[k][i]` is the number of the partition in element `i` of
vector `k+1`. The case-study numbering is in `steer_pkg`:

    IAL_1 0, IMD_1 1, IMD_2 2, FAL_1 3, FAL_2 4, FMD_1 5, FMD_2 6, FMD_3 7

To build other vectors, override `SV_MAP` (and `N_PARTS` if needed) on
`steering_top`. `tb/tb_fig_vectors.sv` and `tb/tb_example1_matrix.sv` show
how, including a map computed by a function from a generate index.

## Loading a slot

Slot *i* needs `WORDS = SLOT_BITS / W` bus cycles to load. A slot that is
loading has `ready` low. The other slots keep their bits and keep `ready`
high, so they can go on computing. A unit that spans several slots is loaded
by starting those slots in the same cycle.

    cycle      t        t+1      t+2  ...  t+WORDS   t+WORDS+1
    start[i]   1        0
    sel[i]     k        (don't care, latched at t)
    busy[i]    0        1        1    ...  1         0
    word       -        0        1    ...  WORDS-1
    ready[i]   prev     0        0    ...  0         1
    done[i]    0        0        0    ...  0         1 (one cycle)

Word `w` of the slot's configuration is taken from word `w` of partition
`SV_MAP[k][i]`. It crosses the bus in one cycle, because memory reads are
combinational. A `start` on a busy slot is ignored. Reset is synchronous and
active low. It clears every slot's bits and its `ready`.

## Modules

| file                    | role |
|-------------------------|------|
| `rtl/steer_pkg.sv`      | default sizes, partition numbering, case-study `DEF_SV_MAP` |
| `rtl/steering_vectors.sv` | partition memory, host write port, N x K read words through the `SV_MAP` fan-out |
| `rtl/bus_mux.sv`        | one K x 1, W-bit bus |
| `rtl/steering_network.sv` | N `bus_mux`, one per slot |
| `rtl/reconfig_slot.sv`  | per-slot load sequencer and `SLOT_BITS` configuration register |
| `rtl/steering_top.sv`   | the whole array; slot configurations come out on `slot_cfg` |

Top-level ports of `steering_top`:

| port | width | direction | use |
|------|-------|-----------|-----|
| `cfg_we`, `cfg_part`, `cfg_word`, `cfg_wdata` | 1, PW, AW, W | in | write one word of one partition |
| `start` | N | in | begin loading slot i |
| `sel` | N x log2 K | in | vector to load slot i from |
| `busy`, `ready`, `done` | N each | out | load in progress / configured / load finished |
| `slot_cfg` | N x SLOT_BITS | out | bits held by each slot |

Parameters and their defaults: `N = 5` and `K = 2`, from the case study.
`N_PARTS = 8` follows from the four unit types. `SV_MAP` is the case-study
pair above. `W = 64` and `SLOT_BITS = 1024` are this design's choices: the
framework leaves the bus width open, from 1 to many thousands of bits, and
does not size a slot. At the defaults a load takes 16 cycles. The design has
8 Kbit of vector memory and 5 x 1024 configuration flip-flops.

## What the case-study vectors reach

`tb/tb_susan_configs.sv` drives the default design through all 32 select
settings. It then checks which of 41 profiled unit mixes of an image
processing benchmark (Susan, from MiBench) it can serve. A mix is served when
some reachable configuration holds at least that many units of each type. It
finds these reachable maxima (FMD, FAL, IMD, IAL):

    (0,1,1,1)  (0,1,0,2)  (1,0,0,2)

They serve 12 of the 41 mixes: the three maxima above and every mix contained
in one of them. Weighted by profiled cycles, that is 42,389,731 of
44,663,007 cycles (94.9%). Mixes that need more than 5 slots can never be
served. Mixes such as 2 FAL, 3 IAL or IMD+2 IAL fit in 5 slots but are not on
these two vectors.

`tb/tb_example1_matrix.sv` runs a textbook-sized selection problem. There are
units A, B, C of 1, 2 and 3 slots, N = 4 and K = 2, giving seven candidate
vectors and 21 pairs. One `steering_top` is built per pair. For every pair the
testbench counts how many members of each equivalence class (same unit
counts) it reaches. The result is the pair-by-class matrix used to choose
vectors. For two pairs, (AABB, BBBB) and (ABBA, BBBB), the simulation finds
one member of the two-A-one-B class. The published matrix lists two. Mixing
these vectors slot by slot always splits a B unit, so the testbench expects
one.

## Not included

- **The functional units and the fabric of each slot.** Only unit names and
  slot counts are known, and the meaning of the configuration bits is
  unknown. `slot_cfg` is where they would connect.
- **The policy that drives `start`/`sel`.** This is the configuration
  steering logic of the host processor. It chooses which mix to load next.
- **The off-line vector-selection procedure.** It runs once at design time.
  Its output is `SV_MAP`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a cycle watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/steer_pkg.sv \
        tb/tb_steering_top.sv --top-module tb_steering_top -Mdir obj -o sim
    obj/sim

| testbench | what it covers |
|-----------|----------------|
| `tb_bus_mux` | random words and selects, K = 2 and K = 4 |
| `tb_steering_network` | l = c1 o s1 + c2 o s2 on a symbolic example, then random |
| `tb_steering_vectors` | every element of both vectors at random offsets; shared-partition rewrite |
| `tb_reconfig_slot` | latency, held select, busy/ready/done, start-while-busy, reset (W = 16, 64 bits) |
| `tb_steering_top` | default size, four loads; counts host writes, mixed selects, loads beside configured slots, ganged loads, shared partitions and ignored starts, and fails if any never happened |
| `tb_susan_configs` | default size, reachability of the 41 profiled mixes |
| `tb_fig_vectors` | two 5-slot E/F/G vector pairs: one cannot hold 2 F + 1 E, the other can |
| `tb_example1_matrix` | 21 instances, reachability matrix of the A/B/C example |

The memory and the slots assert their rules. A select must be below K, a host
write must address a stored word, and a load must last exactly `WORDS` cycles.
Run with `--assert` to check them.
