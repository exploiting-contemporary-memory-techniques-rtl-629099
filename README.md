# A burst-oriented two-dimensional DRAM data memory for a data-driven accelerator

This is the data memory subsystem of a data-stream-driven reconfigurable
accelerator (an Xputer of the MoM-PDA kind). Such a machine has no instruction
fetch: a *data sequencer* walks a configured *scan pattern* over a
two-dimensional data memory, and the words it addresses stream into a
reconfigurable ALU (rALU) and back. The memory is built from Multibank DRAMs
(MDRAMs) instead of SRAM. DRAM is slow per word, so the subsystem recovers
bandwidth in three ways at once:

* **two parallel memory modules**, each with its own bus: even rows live in
  module 0, odd rows in module 1, so two adjacent rows can be accessed at the
  same time;
* **bank interleaving** inside a module: successive rows of a module sit in
  different banks of the 32-bank MDRAM;
* **bursts** along a row: up to 32 consecutive words per bank activation.

The bandwidth is only there if the data is laid out so that the innermost
loop of an application steps along a row (+x). Turning the arrays so that this
holds (for example storing a matrix transposed, or a vector reversed) and
giving the consumed arrays one module and the produced arrays the other is
done before run time, when the scan patterns are made. The hardware here
executes the result. Its default configuration is two modules, 32 banks,
32-word bursts, 32-bit words and a 1024 x 1024-word address space.

```
             cfg, start/done
                   |
            +------v--------+   4 request streams   +---------------------+  md_cmd[0], md_wdata[0]
            | data_sequencer|---------------------->| burst_control_unit  |<=======> MDRAM module 0
            | 4 x scan_gen  |   {we, x, y, len}     | 2 x burst_channel   |<=======> MDRAM module 1
            +---------------+                       | refresh timer       |  md_cmd[1], ...
                                                    +---------^-----------+
                                    rd_push/rd_data  |        | wr_pop/wr_head, buffer levels
                                                    +---------v-----------+
                                                    |  smart_interface    |<=======> rALU
                                                    |  8 stream buffers   |  ralu_*, rf_*, cap_*
                                                    |  register file      |
                                                    +---------------------+
```

`mompda_top` holds the three blocks. The MDRAM devices and the rALU are
outside it: the MDRAM command buses and the rALU side of the smart interface
are ports.

## Where a word lives: the address mapping (`addr_map`)

A word is named by its 2-D coordinate (x, y), where x is the burst direction.
With r = y / 2 (the row inside the module) and s = x / 32 (the 32-word segment
of the row):

| field  | value                 | width |
|--------|-----------------------|-------|
| module | y mod 2               | 1     |
| bank   | (r + s) mod 32        | 5     |
| page   | {s, r / 32}           | 9     |
| column | x mod 32              | 5     |

One 32-word segment is one page of one bank, so a burst never crosses a
segment boundary. Neighbouring segments of a row go to neighbouring banks, and
so do neighbouring rows of a module (row 0 of module 0 is bank 0, row 2 bank 1,
and so on). Rows alternating between modules, rows of a module in different
banks and bursts along x come from the architecture. The exact bank and page
formula is this implementation's choice, and is one-to-one.

## Address streams and scan patterns (`data_sequencer`, `scan_gen`)

There are four streams, two per module: stream s serves module s / 2. A
stream runs scan patterns, each a nest of up to three loops (`scan_cfg_t` in
`mompda_pkg`):

```
position(i0, i1, i2) = handle + i0*s0 + i1*s1 + i2*s2,   0 <= il < n[l]
```

`hx, hy` is the handle and `dx[l], dy[l]` is the scan step s_l, a signed
vector. Loop 0 is the innermost. `we` makes the pattern's accesses writes. A
stream whose first pattern has `en = 0` stays idle. If s0 = (+1, 0), the whole inner loop is one request
of n0 consecutive words, which becomes a burst. Any other s0 gives one-word
requests. A null s0 with n0 = 1 therefore gives single-word accesses in the
order of the outer loops. Each position is computed by adding to the previous
one, so no multipliers are used. A stream issues one request per cycle when it
is not held back.

A stream may only address rows of its own module. The data layout must
guarantee this, and an assertion checks it. For example, with A and B on
module 0 and C on module 1, vertically interleaved rows of A and B^T sit at
y = 4i and 4j+2, and C sits at y = 4i+1.

A stream works through a list of up to `NSEQ` = 4 scan patterns
(`cfg[s][0..3]`). The first disabled pattern ends the list. Patterns are
combined in two ways:

* **Concatenation.** When a pattern ends, the next one starts with the
  following request, without an idle cycle.
* **Nesting.** If pattern k+1 has its `nest` bit set, pattern k becomes an
  outer pattern. It issues no requests itself. Instead, pattern k+1 runs in
  full at each position of pattern k, with its handle taken as an offset from
  that position. The outer pattern steps one position at a time through all
  three of its levels, without burst grouping. After the pair, the list goes
  on with pattern k+2.

For example, an outer pattern with handle (5, 1), step (0, 4) and 16
positions, with a nested one-row burst pattern at offset (0, 0), writes one
burst into each of 16 rows. Nesting is one level deep. A `nest` bit on
pattern 0, or on a pattern whose predecessor is already nested, is ignored.
`seq_switch[s]` pulses in the cycle a pattern starts, except for the stream's
first pattern. That covers both the next pattern of the list and each new
run of a nested pattern.

There is no side channel of control signals from the sequencer to the rALU,
for example flags for the first and last position of a scan line.

## Bursts, bank interleaving and refresh (`burst_control_unit`, `burst_channel`)

Each module has a `burst_channel`. It holds one pending request per stream
and cuts it into sub-bursts. A sub-burst ends at the next 32-word segment
boundary or at the end of the request, whichever comes first. A 40-word run
starting at x = 5 thus becomes bursts of 27 and 13 words. Every sub-burst is
one complete bank cycle, counted from its ACT:

```
read  n words:  ACT | RD | -- | -- | D0 .. Dn-1 | PRE        = 5 + n cycles
write n words:  ACT | WR | D0 .. Dn-1 | -- | PRE             = 4 + n cycles
```

These totals are the MDRAM burst times the architecture assumes. How each
total divides into phases is this implementation's. Read data arrive
`RD_LAT` = 3 cycles after RD. Write data are driven in the n cycles after WR.

This part is the hardest to follow. Bank cycles of *different* banks overlap,
and that overlap is where the bank interleaving pays off. Up to `NTRK` = 4
sub-bursts are in flight, each tracked by its age since its ACT. A new
sub-burst is launched in a cycle only when all of these hold:

* its bank is not in use by a sub-burst still in flight;
* the cycles of its ACT (now), its RD/WR (now + 1) and its PRE are free on the
  command bus, which carries one command per cycle;
* its data window starts after every data window already scheduled, so the
  module's data bus carries one word per cycle, in launch order;
* the stream's read buffer has room for all n words, or its write buffer holds
  all n words. Words already promised to sub-bursts in flight are counted,
  because a burst cannot pause.

The streams of a module are tried round robin, one sub-burst at a time. With
these rules, the ACT and RD of the next read go out while the previous read is
still moving data. A run over consecutive segments, or over rows in different
banks, then keeps the data bus busy with no gaps: a 96-word run over three
banks takes 96 data cycles. Two bursts to the *same* bank, such as re-reading
one row, cannot overlap. The second waits for the first one's PRE. `stall`
is high while a pending stream waits only for buffer room or data. `split`
pulses when a request is cut.

A shared timer requests a refresh every `REFI` = 1040 cycles, about 15.6 us
at a 15 ns clock. Each channel then stops launching. Once its bursts have
finished it sends one REF command, waits `REF_CYC` = 4 cycles, and pulses
`refresh_done`. The need for refresh is part of the architecture. The
interval and duration are this implementation's values.

The MDRAM command bus (`mdram_cmd_t`) has op (NOP, ACT, RD, WR, PRE, REF),
bank, page, column and burst length (1 to 32). The command bus stays at NOP
during reset. This encoding is this implementation's own and is not the pin
interface of a particular device. To connect a real part, an adapter is needed.

## The smart memory interface (`smart_interface`)

The smart interface sits between the module buses and the rALU:

* Every stream has a 64-word read buffer and a 64-word write buffer. These let
  bursts run at full rate while the rALU works at its own pace. They also
  report the fill levels that the burst channels use to decide whether a burst
  may start.
* A 16-word register file holds data that is needed again and intermediate
  results. The rALU has one write port (`rf_*`) and two combinational read
  ports. A word the rALU pops from a read buffer can be copied into a register
  in the same cycle (`cap_en`, `cap_stream`, `cap_reg`). This is how a value
  shared by two successive scan window positions is read from memory once.
  When the rALU writes the same register in the same cycle, its write wins.

The buffers are show-ahead: `ralu_rd_data` shows the oldest word while
`ralu_rd_valid` is high. An accumulation such as c_ij = sum a_is * b_sj keeps
its running sum in a register, and only the final value goes to a write
buffer.

## Running an operation (`mompda_top`)

1. Load the arrays into the memories. Compute the scan patterns of the four
   streams and drive `cfg`, holding it stable while the operation runs.
2. Pulse `start`. `done` falls in the next cycle.
3. The rALU pops read words, pushes results and uses the register file.
4. `done` rises again once every stream has issued its last request and every
   burst, including the write-back of all buffered results, is finished.

Parameters of the top: `REFI`, `FIFO_DEPTH` and `NREGS`. Memory organisation
constants (`NMOD`, `NBANKS`, `MAXBURST`, `DW`, `XW`, `YW`, `LEVELS`, `NSEQ`) are in
`mompda_pkg`. `FIFO_DEPTH` must be at least 32, so that a full burst fits in
one buffer.

## Simulation and verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench                 | what it establishes |
|---------------------------|---------------------|
| `tb_addr_map`             | the mapping formula for random and corner coordinates; no two coordinates of a 128 x 128 window collide |
| `tb_data_sequencer`       | request streams match the loop formula: burst grouping, backward steps, three levels, chained and nested patterns, a disabled stream, one request per cycle, random back-pressure |
| `tb_burst_control_unit`   | read data and written memory contents; split of a 40-word run into 27 + 13; 5+n and 4+n bank cycles per bank; overlapping bank cycles and a gap-free 96-word run; stall until buffer room appears; refresh on both modules; no protocol errors |
| `tb_smart_interface`      | buffer contents and levels against queue models under random traffic; register capture and write priority |
| `tb_mompda_top`           | end to end at default parameters: c = a*b, d = a+b on 40 x 16 arrays (burst and single-word writes, register reuse); counts splits, chained patterns, nested pattern runs, refreshes, stalls, single-word writes, register reuses, cycles with both modules busy, overlapped bank cycles, and banks used |
| `tb_workloads`            | matrix multiplication 4 x 4 and 40 x 40, convolution of 20 and 200 elements, with a multiply-accumulate rALU model |

`tb/mdram_model.sv` is a behavioural model of one MDRAM module for
simulation only. It stores words sparsely, applies the read latency, and
counts protocol violations (access to a closed bank or wrong page, ACT to an
open bank, REF with a bank open, two bursts on the data bus in one cycle).

Running a testbench with plain verilator, from the folder above `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --top-module tb_mompda_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/mompda_pkg.sv tb/tb_mompda_top.sv
./obj_dir/Vtb_mompda_top
```

Measured run times at a 15 ns cycle, from `tb_workloads`:

| application  | cycles  | time       |
|--------------|---------|------------|
| MAT 4 x 4    | 159     | 2.4 us     |
| MAT 40 x 40  | 129 395 | 1.94 ms    |
| CON 20       | 1 623   | 24.3 us    |
| CON 200      | 161 426 | 2.42 ms    |

The published peak estimates for this memory with MDRAMs and rearranged data
are 3.36 us, 1.32 ms, 4.65 us and 197.7 us for these four cases. The small
matrix case here is faster, because overlapping bank cycles hide the 5 cycles
of burst overhead. The larger cases are slower, because these scan patterns
read every operand again for each result: row i of A once per j, and an
N-word window of b for every convolution output. Each run stays within about
2 % of its lower bound, the number of words module 0 has to read. The
difference from the estimates is therefore in how the workloads are scanned
and buffered, not in the burst machinery.

## What is this implementation's own

Beyond the architecture (two row-interleaved modules, 32-bank MDRAM, 32-word
bursts split at bank boundaries, refresh in the burst control unit, a register
file in the smart interface, two address streams per module, scan patterns
from handle, step vectors and loop limits), this implementation chose the
following:

* the address space (1024 x 1024 words) and the bank and page formula;
* three loop levels per pattern, lists of up to four patterns per stream,
  one-deep nesting with a relative handle, and burst grouping only for a +x
  innermost step;
* the command encoding and the phase split of the 5+n and 4+n bank cycles;
* the launch rules for overlapping bank cycles, with at most four in flight;
* the refresh interval and duration;
* per-stream buffers of 64 words, the all-or-nothing burst admission, and
  round-robin service per sub-burst;
* a 16-word register file with two read ports, one write port and a capture
  path;
* the `done` handshake and the synchronous active-low reset.

It does not include the rALU (a coarse-grained KressArray in the original
machine), the MDRAM devices, scan windows larger than one word with their data
schedules, or the compile-time computation that rearranges arrays and
produces the scan patterns.
