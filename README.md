# Summing a linked list: four datapaths for one algorithm

This is a small hardware design exercise worked out in full. A processor has to add up the
8-bit two's complement values stored in a linked list in memory. The same job is done by four
architectures, each a controller plus a datapath. Each one fixes a weakness of the one before.
The fourth overlaps three list elements at once, so that every clock cycle holds one memory read
and one addition that do not depend on each other. Two smaller register-transfer examples sit
beside the list processors: an accumulator datapath and a three-register datapath. Each is
driven by a short controller sequence.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. Every block has a
self-checking testbench in `tb/`.

## The list and the memory

The list lives in a 256-word by 8-bit memory (`list_mem`). The memory has one address port and
reads asynchronously: the word appears on `D` in the same cycle that its address is on `A`. A node
at address `p` takes two consecutive words:

| address | contents                                   |
|---------|--------------------------------------------|
| `p`     | address of the next node (0 ends the list) |
| `p+1`   | the value                                  |

The first node is always at address 0, and a list has at least one node. Nodes may start at odd
addresses. One example list is used throughout the tests: nodes at 0x00, 0x05, 0x0E and 0x0A,
where 0x0A holds the null pointer.

The sum is 8 bits wide and wraps modulo 256. A 256-word memory holds at most 128 nodes.

The processors only read the memory. To load a list, `list_mem` has a write path (`we`, `wa`,
`wd`) that takes over the single address port while `we` is high. That write path is this
design's own addition.

## The algorithm

In register-transfer notation (`;` separates clock cycles, `,` joins transfers that happen in the
same cycle):

```
START:  NEXT <- 0, SUM <- 0
loop:   SUM  <- SUM + Memory[NEXT+1];
        NEXT <- Memory[NEXT]
        until NEXT == 0
        R <- SUM, DONE <- 1
```

The memory serves one access per cycle, and every iteration makes two accesses: the value and the
pointer. So no architecture can go faster than two cycles per element. The architectures differ
in how much logic each cycle holds, and so in how short the clock can be. They also differ in
hardware cost.

## Architecture #1: direct implementation (`list_proc1`)

The datapath (`lp1_dp`) has two registers, `SUM` and `NEXT`, and two adders. One adder forms
`SUM + D`. The other forms the value address `NEXT + 1`. The multiplexer selects are:

| select     | 1                 | 0          |
|------------|-------------------|------------|
| `NEXT_SEL` | `NEXT <= D`       | `NEXT <= 0` |
| `SUM_SEL`  | `SUM <= SUM + D`  | `SUM <= 0` |
| `A_SEL`    | `A = NEXT + 1`    | `A = NEXT` |

`NEXT_ZERO` compares the output of the `NEXT` multiplexer with zero, not the register. In the
cycle that fetches a pointer, the controller therefore already knows whether that pointer is null.

### The controller (`lp_ctrl`)

The controller has four states, with one flip-flop per state:

| state       | outputs                                           | next state                          |
|-------------|---------------------------------------------------|-------------------------------------|
| START       | LD_SUM=1 SUM_SEL=0 LD_NEXT=1 NEXT_SEL=0           | COMPUTE_SUM                         |
| COMPUTE_SUM | A_SEL=1 LD_SUM=1 SUM_SEL=1 (ADD_SEL=1)            | GET_NEXT                            |
| GET_NEXT    | A_SEL=0 LD_NEXT=1 NEXT_SEL=1                      | DONE if NEXT_ZERO, else COMPUTE_SUM |
| DONE        | DONE=1                                            | DONE                                |

When `START` is high, the next state is START, whatever the current state is. `START` is
therefore also the processor's reset: none of the registers has a reset input. Outputs and state
are undefined until the first `START`. Outputs not listed in the table are 0.

The same controller drives architectures #2 and #3. Architecture #3 also uses its `ADD_SEL`
output.

## Architecture #2: the NUMA register (`list_proc2`)

In #1, the COMPUTE_SUM cycle holds an 8-bit add, a memory read and the sum add in series, while
GET_NEXT does little. Architecture #2 adds a register `NUMA` (the *number address*). It is loaded
in GET_NEXT with `Memory[NEXT] + 1`, at the same time as `NEXT` gets `Memory[NEXT]`:

```
START:  NEXT <- 0, SUM <- 0, NUMA <- 1
loop:   SUM  <- SUM + Memory[NUMA];
        NUMA <- Memory[NEXT] + 1, NEXT <- Memory[NEXT]
```

`NUMA` shares `LD_NEXT` and `NEXT_SEL` with `NEXT`. Select 1 gives `D + 1`, and select 0 gives
the constant 1. `A_SEL` now chooses between `NEXT` (0) and `NUMA` (1).

Each cycle now holds only one add. The unit delays of the original component library give a
critical path of about 23 ns, against 31 ns for #1.

## Architecture #3: one shared adder (`list_proc3`)

Each cycle of #2 uses only one of its two adders, so #3 keeps just one. The adder always adds the
memory word `D` to the output of the `ADD_SEL` multiplexer:

- `ADD_SEL = 1` gives `SUM + D`, used in COMPUTE_SUM.
- `ADD_SEL = 0` gives `1 + D`, used in GET_NEXT.

The adder's output feeds both the `SUM` multiplexer and the `NUMA` multiplexer. This saves one
adder for the cost of one multiplexer, and the clock period does not change.

## Architecture #4: software pipelining (`list_proc4`)

This is the part that takes the most thought. Even in #3, every cycle holds a memory read followed
by an add (`T = T_mem + T_add`). Architecture #4 adds a register `X` that holds a fetched value
until the next cycle. The loop then becomes:

```
1:  X    <- Memory[NUMA],  NUMA <- NEXT + 1
2:  NEXT <- Memory[NEXT],  SUM  <- SUM + X
```

In each step the memory access and the addition use different registers. The two can therefore
run in parallel, and the clock period is set by the slower of the two (`T = max(T_mem, T_add)`,
about 14 ns with the original component delays).

The price is that successive iterations overlap. Step 2 adds the value that step 1 fetched one
cycle earlier, and step 1 computes `NUMA` from a pointer that step 2 fetched one cycle earlier.
At any time, three list elements are in flight:

- a pointer being fetched
- a value being fetched
- a value being added

The rate stays at two cycles per element.

### Datapath (`lp4_dp`)

| select      | 1                           | 0                          |
|-------------|-----------------------------|----------------------------|
| `X_SEL`     | `X <= D`                    | `X <= 0`                   |
| `ADD_SEL1`  | adder input 1 = `SUM`       | constant 1                 |
| `ADD_SEL2`  | adder input 2 = `X`         | `NEXT`                     |
| `SUM_SEL`   | `SUM <= adder`              | `SUM <= 0`                 |
| `NEXT_SEL`  | `NEXT <= D`, `NUMA <= adder` | `NEXT <= 0`, `NUMA <= 1`  |
| `A_SEL`     | `A = NUMA`                  | `A = NEXT`                 |

Each of the four registers has its own load enable. In this architecture, `NEXT_ZERO` compares
the `NEXT` register, not the value being loaded.

### Controller (`lp4_ctrl`)

The loop needs two extra states, one before it and one after it:

| state     | transfers                                   | next state                    |
|-----------|---------------------------------------------|-------------------------------|
| S4_START  | `NEXT <- 0, SUM <- 0, NUMA <- 1, X <- 0`    | S4_NEXT                       |
| S4_NEXT   | `NEXT <- Memory[NEXT], SUM <- SUM + X`      | S4_X                          |
| S4_X      | `X <- Memory[NUMA], NUMA <- NEXT + 1`       | S4_FINISH if NEXT==0, else S4_NEXT |
| S4_FINISH | `SUM <- SUM + X`                            | S4_DONE                       |
| S4_DONE   | `DONE = 1`                                  | S4_DONE                       |

The first S4_NEXT after S4_START reads `Memory[0]` and adds `X = 0`. This reaches the loop's
starting point: `x = 0`, `numa = 1`, `sum = 0`, `next = Memory[0]`.

`NEXT == 0` is tested in S4_X. At that point, the value of the last node is still to be fetched
(by this S4_X) and added (by S4_FINISH). DONE therefore rises two cycles after `NEXT` becomes
zero.

A run of four nodes at addresses p0=0, p1, p2, p3, with values x0 to x3, goes like this:

```
state    START  NEXT   X      NEXT   X      NEXT   X      NEXT   X      FINISH DONE
memory          p1     x0     p2     x1     p3     x2     0      x3
adder                  p1+1   +x0    p2+1   +x1    p3+1   +x2    1      +x3
```

The state sequence and the adder operations follow the original description. The split of the
set-up into S4_START plus the first S4_NEXT, and the point where `NEXT_ZERO` is tested, are this
design's own choices.

## Timing of all four

Let n be the number of nodes. Count as edge 1 the first rising clock edge at which `START` is
sampled low. `DONE` is then high after:

| architecture | edges to DONE | adders | estimated period from unit delays |
|--------------|---------------|--------|-----------------------------------|
| #1           | 2n + 1        | 2      | 31 ns                             |
| #2           | 2n + 1        | 2      | 23 ns                             |
| #3           | 2n + 1        | 1      | 23 ns                             |
| #4           | 2n + 2        | 1      | 14 ns                             |

The periods come from the original example's component delays: 10 ns memory read, 1 ns
multiplexer, and `2 log2(n) + 2` ns for an n-bit adder. They are not properties of this RTL. The
cycle counts are checked by the testbenches. `DONE` and `R` hold until `START` rises again.

**Width of the sum.** The original timing analysis calls the sum adder a 15-bit adder, but the
problem statement makes every integer and `R` 8 bits wide. This design follows the 8-bit
statement. The width is one parameter (`lp_pkg::DATA_W`) if a wider sum is needed. Architectures
#3 and #4 share one adder between pointers and values, and assume that both have the same width.

## Register-transfer examples

### `rt_acc`: R0, R1 and ACC

This datapath (`rt_acc_dp`) has two registers, R0 and R1. Each sits behind a multiplexer: S0 for
R0 and S1 for R1. Select 1 holds the register, and select 0 loads it from a bus. S2 picks R0 or R1
as the operand that is added to ACC. S3 drives the bus with that operand (0) or with ACC (1). The
controller plays this three-cycle sequence:

```
ACC <- ACC + R0, R1 <- R0;
ACC <- ACC + R1, R0 <- R1;
R0  <- ACC
```

The following are this design's own additions:

- ACC has a load enable, so that ACC stays unchanged in the third cycle.
- `load` with `r0_init`, `r1_init` and `acc_init` sets the starting values.
- `go` starts the sequence, and `busy` is high for its three cycles.

### `rt_abc`: deducing a datapath from transfers

The sequence `regA <- IN; regB <- IN; regC <- regA + regB; regB <- regC` requires:

- IN fanned out to regA and regB
- an adder on regA and regB that feeds regC
- a multiplexer in front of regB that chooses IN (`B_SEL=0`) or regC (`B_SEL=1`)

All three are load-enable registers. The four-state controller, `go`/`busy` and `init` (which
returns the controller to idle, since there is no reset) are this design's own.

## Top level (`hld_top`)

The top places the four list processors side by side, each with its own `list_mem`. The four
processors share `lp_start` and the memory load port (`mem_we`, `mem_wa`, `mem_wd`), so one run
sums the same list in four ways. Bit k-1 of `lp_done` and entry k-1 of `lp_r` belong to
architecture #k. The two register-transfer examples bring out their own ports, prefixed `acc_`
and `abc_`. There is one clock and no reset.

To use a list processor:

1. Write the list with `mem_we`, one word per clock.
2. Hold `lp_start` high for at least one clock, then drop it.
3. Wait for `lp_done`, then read `lp_r`.

## Files

| file | contents |
|------|----------|
| `rtl/lp_pkg.sv` | widths, state encodings, control-word structs |
| `rtl/ld_reg.sv` | register with load enable, no reset |
| `rtl/list_mem.sv` | 256 x 8 single-port memory, asynchronous read, load port |
| `rtl/lp_ctrl.sv` | controller for #1 to #3 |
| `rtl/lp1_dp.sv`, `lp2_dp.sv`, `lp3_dp.sv`, `lp4_dp.sv` | datapaths |
| `rtl/lp4_ctrl.sv` | controller for #4 |
| `rtl/list_proc1.sv` to `list_proc4.sv` | controller plus datapath, one per architecture |
| `rtl/rt_acc_dp.sv`, `rt_acc.sv`, `rt_abc.sv` | register-transfer examples |
| `rtl/hld_top.sv` | top level |
| `tb/tb_*.sv` | one testbench per block; `tb_lp_harness.sv` and `tb_list_pkg.sv` are shared by the list tests |

## Verification

Each testbench computes its expected values independently of the RTL and ends by printing
`TB_RESULT checks=N failures=M`. A watchdog ends any run that hangs.

- **List processor tests.** `tb_list_proc1` to `tb_list_proc4` run `tb_lp_harness` with the
  matching architecture. The test list builder in `tb_list_pkg` places nodes at random, unaligned
  addresses, fills the rest of the memory with random data, and walks the list to get n and the
  sum. Each run checks:
  - `R`
  - the memory address in every loop cycle, which confirms the order of pointer and value
    fetches in each architecture's schedule
  - the exact number of edges to `DONE`
  - that `DONE` and `R` hold afterwards

  The runs use the example list with positive and negative values, single-node lists, a run
  restarted half-way by `START`, and random lists of up to about 120 nodes.
- **`tb_lp_ctrl`** compares state and outputs with the state table under random `START` and
  `NEXT_ZERO`.
- **`tb_ld_reg`, `tb_list_mem`, `tb_rt_acc` and `tb_rt_abc`** check their blocks cycle by cycle.
- **`tb_hld_top`** runs the whole top at its default sizes. It checks all four processors on the
  same lists and both register-transfer sequences. It also counts loop iterations, end-of-list
  detections, restarts, architecture #4's drain state and both example sequences, and fails if
  any of them never happens.

To run one test with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lp_pkg.sv tb/tb_list_pkg.sv tb/tb_hld_top.sv --top-module tb_hld_top
./obj_dir/Vtb_hld_top +verilator+rand+reset+2
```

The simulator has two states, so uninitialised registers start at random values. The tests rely
on `START`, `load` and `init` to bring every block into a known state, just as real hardware
without a reset would.

## Where this design departs from, or fills in, the original example

- The sum is 8 bits, not the 15 bits of the original timing analysis (see above).
- The memory's write path, the initial-value loading and the `go`/`busy`/`init` handshakes of the
  register-transfer examples are additions needed to use the blocks.
- In `lp_ctrl`, `START` forces the START state from every state. The state diagram draws that arc
  only from DONE, but the gate-level controller feeds `START` straight into the START flip-flop.
- Architectures #2 and #3 reuse the #1 controller. `ADD_SEL` is set in COMPUTE_SUM.
- Architecture #4's controller is this design's. It follows the transfers, the initial values and
  the "two cycles after NEXT == 0" ending that were given for it.
- ACC in `rt_acc` has a load enable that the original datapath does not show.
- Timing (clock period) is not modelled. Only cycle counts are.
