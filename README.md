# Hardware loop profiler for run-time algorithm acceleration

Software spends most of its time in a few small loops. In a processor that
sits next to reconfigurable logic, such as an FPGA with an embedded PowerPC,
those loops are the natural candidates to move into a custom hardware block
while the program runs. To find them without instrumenting the program, this
design watches the processor's instruction stream with a small hardware
block. It recognises loops as they execute. For each loop it records where
the loop starts, how large its body is, how often it iterates and the fewest
clock cycles one iteration takes. At any moment it names the loop that looks
most worth accelerating. The processor reads the results through a register
port. The profiler adds no instructions to the program and no cycles to its
execution.

The RTL here covers the profiler and the program memory it observes. The
processor, the reconfigurable accelerator region and its reconfiguration
controller, the UART and the external DDR memory are platform parts. They are
not part of this RTL. The top brings out the ports the processor would use.

## How a loop is recognised

The profiler assumes the compiler closes a counted loop the usual way for
unoptimised PowerPC code. The exit test sits at the top of the loop, and the
last instruction of the body is an unconditional, PC-relative branch back to
the first instruction:

```
top:  cmpwi r3,0
      beq   exit        ; conditional, forward: ignored
      ...body...
      addi  r3,r3,-1
      b     top         ; unconditional, backward: one iteration
exit:
```

An unconditional branch that has been fetched will certainly be taken. So
seeing the word on the fetch port is proof that one iteration has ended, and
the profiler needs nothing from inside the processor. `branch_decoder`
matches the word against a mask and value. The default is PowerPC `b`:
opcode 18, AA=0, LK=0. It sign-extends the 24-bit word displacement and
accepts the branch only if it points backwards or to itself. The target is
the loop's start address. The distance from the target to the branch is the
body size in bytes, which saturates at 65535.

The monitored instruction is a parameter of `code_profiler` and
`branch_decoder` (`MATCH_MASK`, `MATCH_VALUE`, `BACKWARD_ONLY`). This lets
the profiler work at a different granularity. For example,
`MATCH_VALUE = profiler_pkg::BL_VALUE` with `BACKWARD_ONLY = 0` counts calls
to each function target instead of loop iterations. For forward targets the
body size is reported as 0.

## What is kept per loop

`loop_table` holds `NUM_LOOPS` entries (10 by default). Each entry holds
these fields:

| field      | width | meaning |
|------------|-------|---------|
| start_addr | 32    | branch target = first instruction of the loop |
| size       | 16    | bytes from the loop start to the closing branch |
| count      | 32    | times the closing branch was taken (saturating) |
| min_time   | 16    | fewest cycles between two iterations (saturating) |
| measured   | 1     | min_time holds at least one interval |
| last_ts    | 32    | cycle timer value at the latest iteration |

One free-running `cycle_timer` timestamps every accepted branch. When a
branch's target matches a valid entry (all entries are compared at once):

* the count goes up by one;
* the interval `now - last_ts` is compared with `min_time`. It replaces
  `min_time` if it is the same or smaller, and is dropped if it is larger.
  Keeping the minimum gives a conservative cost per iteration. The long
  interval seen when a loop is entered again later is dropped by this rule;
* `last_ts` becomes `now`.

The first iteration of a loop only starts the clock: `measured` becomes 1 at
the second.

## Replacement and the best candidate

A table of ten entries cannot hold every loop of a real program. A new loop
must therefore push out a less interesting one. Interest is measured by a
weight, computed in `weight_unit` for every entry, every cycle:

    weight = count x min_time      (0 while the entry is not yet measured)

This estimates how many cycles the program has spent in the loop. It combines
how often the loop runs with how long one pass takes. Both matter because
moving a loop into hardware pays off only if enough time is at stake to cover
the cost of switching to and talking to the accelerator.

* **Allocation.** A branch to an unknown target takes the first free entry.
  If there is none, it takes the entry with the lowest weight (the lowest
  index on a tie). The new entry starts with count 1 and no time, so its
  weight is 0. If another new loop arrives before this one has run a second
  iteration, it replaces this one rather than an established loop. Short
  one-off loops therefore keep recycling one slot, and heavy loops stay.
* **Threshold.** The weight of the entry a new loop would displace is
  exported as `threshold`. It is 0 while a free entry exists. It is the bar a
  loop must clear to remain in the table.
* **Best candidate.** The entry with the highest non-zero weight is
  presented on `best_valid`/`best_index` and in the STATUS and BEST
  registers. The lowest index wins a tie.

This policy is a consequence of the choice of weight. It depends on the
order of events. Which loop is evicted depends on the weights at the moment a
new loop first appears. A loop that is heavy overall but appears late can be
evicted early. It is then counted again from zero when it comes back.

## Timing

```
cycle c    : processor's fetch word on fetch_instr (program_bram read)
edge c     : code_profiler registers (valid, address, word)
cycle c+1  : decode, table lookup, weight/victim selection
edge c+1   : table entry written
cycle c+2  : best_valid/best_index and register reads reflect the branch
```

The profiler accepts one instruction per clock with no back-pressure. It
never stalls the processor, and the fetch path only fans out to it.
Consecutive branches to the same loop on back-to-back cycles are handled
because the table is read and written in one cycle. The weights, victim and
best candidate are combinational over all entries. Ten 32x16 multipliers
followed by two ten-way compare chains form the longest path.

## Register port

The register port is a plain single-master bus. `bus_sel` with `bus_we`
writes in that cycle. `bus_sel` alone reads, and `bus_rdata` holds the word
from the next cycle on. Addresses count 32-bit words.

| address      | register | content |
|--------------|----------|---------|
| 0x00         | CTRL     | bit0 enable (1 after reset); writing bit1=1 clears table and timer |
| 0x01         | STATUS   | [7:0] valid entries, [15:8] best index, [16] best valid |
| 0x02 / 0x03  | BEST     | weight of the best candidate, low / high word |
| 0x04 / 0x05  | THRESH   | threshold weight, low / high word |
| 0x06         | TIMER    | cycle timer |
| 0x07         | NLOOPS   | NUM_LOOPS |
| 0x40+4i+0    | entry i  | start address |
| 0x40+4i+1    | entry i  | {14'b0, measured, valid, size} |
| 0x40+4i+2    | entry i  | count |
| 0x40+4i+3    | entry i  | min_time |

Other addresses read 0. While enable is 0, fetched instructions are ignored
and the timer holds. The clear pulse lasts one cycle. Reset is synchronous
and active-low.

## The system around it

`profiling_system` (the top) holds `program_bram`, a simple dual-port memory
of `MEM_WORDS` 32-bit words (4096 = 16 KB by default) with registered read
data. The processor fetches from it, and a load port fills it. The profiler
is connected to this memory rather than to the processor's instruction cache,
which it cannot observe. The top delays the fetch address by the memory's
read cycle, so the profiler sees each word paired with its own address.

In the intended use, the processor runs the application from this memory
with profiling on. It then reads the table and the best candidate, picks a
pre-built accelerator from a library of partial bitstreams kept in external
memory, and loads that accelerator into the reconfigurable region through the
FPGA's internal configuration port. It can also send the data to a host over
a serial port. All of that happens in software and in vendor blocks outside
this RTL.

## Files

| file | content |
|------|---------|
| rtl/profiler_pkg.sv | widths, entry struct, branch encodings, register map |
| rtl/branch_decoder.sv | monitored-instruction match, target and body size |
| rtl/cycle_timer.sv | free-running cycle counter |
| rtl/weight_unit.sv | weights, victim, threshold, best candidate |
| rtl/loop_table.sv | associative loop table with update and replacement |
| rtl/profiler_regs.sv | control and read-out registers |
| rtl/code_profiler.sv | the profiler: snoop register + the above |
| rtl/program_bram.sv | program memory with fetch and load ports |
| rtl/profiling_system.sv | top: program memory + profiler |
| tb/tb_*.sv | one self-checking testbench per module |
| tb/profiler_ref_pkg.sv | reference model of the table (testbench only) |
| tb/ppc_fetch_model.sv | behavioural processor running a few PowerPC instructions (testbench only) |

## Parameters and sizes

| parameter | default | where | note |
|-----------|---------|-------|------|
| NUM_LOOPS | 10 | code_profiler, loop_table, top | up to 48 fit the register map |
| MATCH_MASK / MATCH_VALUE | 0xFC000003 / 0x48000000 | code_profiler, branch_decoder | PowerPC `b` |
| BACKWARD_ONLY | 1 | code_profiler, branch_decoder | 0 accepts forward targets too |
| MEM_WORDS | 4096 | program_bram, top | must be a power of two |
| field widths | see table above | profiler_pkg | shared by all modules |

After generic synthesis, `code_profiler` has about 1430 flip-flop bits,
mostly the ten 130-bit entries. That is several times the roughly 300
flip-flops of a hand-tuned FPGA implementation with ten loops. The widths
here are generous: full 32-bit addresses, counts and timestamps. Narrowing
the fields in `profiler_pkg` is the way to shrink it. The program memory is
128 Kbit.

## Verification

Each testbench checks its module against values computed independently:

* `tb_branch_decoder`: 20 000 random and branch-shaped words, with both the
  loop and the call configuration, compared with the PowerPC encoding.
* `tb_weight_unit`, `tb_loop_table`: random tables and random branch
  streams (16 loops competing for 10 entries, long pauses for saturation,
  clears), compared every cycle with the reference model in
  `profiler_ref_pkg`. The table test counts allocations, updates, new
  minima, dropped longer intervals, replacements, saturation and clears, and
  fails if one of them never happens.
* `tb_code_profiler`: a synthetic fetch stream into a loop profiler and a
  call-tracing profiler side by side. It checks the best-candidate pins every
  cycle with the model delayed by the two-edge latency, and checks the full
  register read-out after run, stop and clear phases.
* `tb_profiling_system`: the top at its default size, with the behavioural
  processor running a PowerPC program of twelve loops, a loop that calls a
  function and a nested pair. It checks count, minimum time and body size of
  every loop left in the table against the program text. It also checks that
  profiling stopped after a clear leaves the table empty and that the
  processor runs one instruction per clock while profiled.
* `tb_loop_mix`: the top at its default size running a generated program of
  114 loops in 38 nested groups, roughly the number of loops in an MPEG-2
  video decoder. It compares with the reference model every cycle and at the
  end, and reports coverage: 10 of 114 loops tracked (8.8%), with 202
  replacements along the way.

Run any of them with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/profiler_pkg.sv tb/profiler_ref_pkg.sv tb/tb_profiling_system.sv \
    --top-module tb_profiling_system -o sim
./obj_dir/sim
```

Each prints `TB_RESULT checks=N failures=M`. The simulator has two-state
values, and all state that is read is reset.

Not covered: 32-bit count saturation (it would need 2^32 iterations), and
table sizes other than 10 at system level.

## Departures and open choices

The following come from the approach this design implements: detection of
loops by their unconditional backward branch; start address and body size
taken from that branch; counting iterations; keeping the minimum cycles per
iteration with the "same or less replaces" rule; ten tracked loops;
replacement of less interesting loops by a weight factor used as a threshold;
the monitored instruction as a parameter; connection to the program block RAM
rather than to the cache.

The following are this design's own choices:

* The weight formula, count x min_time, and the tie rules. The approach
  only says frequency and iteration time are combined.
* The field widths, and saturation instead of wrap-around.
* Matching entries on start address alone. Two different branches back to
  the same address count as one loop.
* One shared cycle timer with a per-entry timestamp.
* The register port, its map, profiling enabled out of reset, and the
  clear bit.
* The snoop register and the resulting two-cycle latency.
* The program memory size and its addressing.

Known limits of the approach itself: loops that a compiler closes with a
conditional backward branch (typical once optimisation is on) are not seen
with the default pattern. A program running from a cache rather than from
the observed memory is not seen at all.
