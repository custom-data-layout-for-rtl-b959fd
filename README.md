# Custom data layout over parallel SRAM banks

An FPGA fed by several independent SRAM banks can, in principle, fetch one
word from every bank in every cycle. Whether a loop gets that bandwidth
depends on where its array elements live. If both arrays sit in one memory,
an unrolled loop body still waits for its accesses one after another. If
elements are spread cyclically along the fastest-varying dimension
("modulo unrolling"), only the inner loop's unrolled copies land in
different banks. A *custom data layout* instead derives the placement from
the subscripts the loop actually uses. The elements touched by one unrolled
iteration then sit in different banks, whichever loops were unrolled.

This RTL implements that layout in hardware for the reference loop nest

```
int A[32][16], B[32][16];
for (i = 0; i < 32; i++)
  for (j = 0; j < 16; j++)
    A[i][j] = B[i][j] + 1;
```

The loop nest is unrolled 2x2 and runs on 8 SRAM banks by default; unroll
factors and bank count are parameters. The design does three things:

1. It moves B from a plain row-major copy in one memory into the custom
   layout.
2. It runs the unrolled loop body with all banks working in parallel.
3. It moves A back to the row-major copy.

At the default size the loop body takes 129 memory cycles. One memory
without unrolling takes 1024 (a read and a write for each of 512
elements).

## How an array is split: suffix and local index

Unrolling i and j by two turns the body into four statements. They touch
`B[2i'][2j']`, `B[2i'][2j'+1]`, `B[2i'+1][2j']` and `B[2i'+1][2j'+1]`. In
each dimension these references share a common stride s = 2 and differ in
their offset. Elements whose subscripts agree modulo s in every dimension
can be touched by the same reference, so they go into one *virtual memory*.
Elements that differ can never meet, so they go into separate ones. For a
subscript x in a dimension with stride s:

* **suffix** = x mod s. It names the virtual memory in that dimension. The
  modulo is always taken in 0..|s|-1, also for negative x, where it equals
  (|s|-1) - ((-x-1) mod |s|).
* **local index** v = floor(x / s). It is the position inside the virtual
  memory.

Element `B[i][j]` therefore becomes `B<i mod 2><j mod 2>[i div 2][j div 2]`.
The loop body becomes four statements on four virtual memories per array,
`A00..A11` and `B00..B11`, each with a 16x8 loop. A stride of 0 (a subscript
constant in the loop) keeps the subscript as both suffix and index.
`cdl_index_map` computes this per dimension, with the stride as a
compile-time parameter. It rounds toward minus infinity, so negative
subscripts map correctly.

The same mapping runs in both directions:

* naive element `[(s1·v1 + suffix1)][(s2·v2 + suffix2)]` ↔
  `<suffix1 suffix2>[v1][v2]`

The reorganization engine uses it to convert between the layouts.

## From virtual memories to banks

With U1 x U2 unrolling each array has MV = U1·U2 virtual memories, and A
and B together have 2·MV. `cdl_phys_map` binds them to the MP banks:

* **Enough banks (2·MV <= MP).** Every virtual memory gets a bank of its
  own: bank = array·MV + suffix, where A is array 0 and B is array 1. The
  suffix is numbered suffix1·U2 + suffix2.
* **Too few banks.** The virtual memories of A and B that carry the same
  suffix share a bank: bank = suffix mod MP. The read of `Bxy` must come
  before the write of `Axy` anyway, so putting the pair together costs no
  parallelism the statement could have used. Every other pair stays apart.

Inside a bank each virtual memory fills a slot of (N1/U1)·(N2/U2) words,
stored row-major by local index. A takes slot 0 and B the slot above it.

| bank | 8 banks (default)        | 4 banks                                   |
|------|--------------------------|-------------------------------------------|
| 0    | A00, words 0..127        | A00 words 0..127, B00 words 128..255      |
| 1    | A01                      | A01, B01                                  |
| 2    | A10                      | A10, B10                                  |
| 3    | A11                      | A11, B11                                  |
| 4..7 | B00, B01, B10, B11       | –                                         |

Bank 0 also holds the row-major ("naive") copy of both arrays from word
2048 on: A at 2048 + 16·i + j, then B at 2048 + 512 + 16·i + j. The
custom layout must fit below word 2048; an elaboration-time assertion
checks this.

## One run: distribute, compute, gather

`cdl_ctrl` steps through four phases. Its `phase` output selects which
engine drives the banks:

| phase   | bank owner | what happens |
|---------|------------|--------------|
| idle    | host       | The host port reads and writes bank 0. |
| distribute | `cdl_reorg` | B, which the loop reads, is copied from its row-major copy into the custom layout. |
| compute | `cdl_kernel` | The loop body runs. |
| gather  | `cdl_reorg` | A, which is live after the loop, is copied back to the row-major copy. |

A is not distributed because the loop overwrites all of it. B is not
gathered because the loop does not change it.

`cdl_reorg` moves one element every two cycles, a read and then a write.
Bank 0 is both the row-major memory and a custom-layout bank, and this
schedule keeps it free of conflicts. Each copy of a 32x16 array therefore
takes 1024 cycles. It is the slowest part of a run, and the obvious place
to speed things up (see the limits section below).

`cdl_kernel` walks the 16x8 reduced iteration space. In each iteration it
reads the MV words of B (one per virtual memory, all in different banks),
adds 1 in MV parallel adders, and writes the MV words of A. Which schedule
it uses depends on the bank binding:

* **Own banks.** B and A of a suffix are in different banks, so the reads
  of iteration n and the writes of iteration n-1 happen in the same cycle.
  This takes N1·N2/MV + 1 memory cycles: 129 at the default size.
* **Shared banks.** The read and the write of a suffix hit the same
  single-port bank, so each iteration takes a read cycle and then a write
  cycle. This takes 2·N1·N2/MV memory cycles: 256 with 4 banks.

A run at the default size takes 2183 cycles from `start` to `done`:

* 1024 cycles to distribute
* 129 cycles to compute
* 1024 cycles to gather
* two handshake cycles for each of the three phases

Kernel memory cycles for other unroll factors, all simulated (the one-memory,
no-unroll figure is 1024):

| unroll U1xU2 | banks | kernel memory cycles |
|--------------|-------|----------------------|
| 1x1          | 8     | 513                  |
| 2x1, 1x2     | 8 / 4 | 257                  |
| 2x2, 4x1     | 8     | 129                  |
| 2x2, 1x4     | 4     | 256                  |
| 8x1, 4x2, 2x4, 1x8 | 8 | 128                |

With 4 banks a 2x2 unroll saves 75% of the memory cycles. With 8 banks and
a 2x2 unroll it saves 87%.

## Interfaces and timing

All logic runs on one clock, `clk`. Reset `rst_n` is asynchronous and
active low.

A memory request (`cdl_pkg::mem_req_t`) has four fields:

| field   | meaning |
|---------|---------|
| `en`    | starts an access |
| `we`    | selects a write |
| `addr`  | 12-bit word address |
| `wdata` | 32-bit write data |

A bank takes one request per cycle. A read returns its word on that bank's
`rdata` one clock later. The external SRAMs are not part of the RTL: each
bank is a `mem_req[b]` / `mem_rdata[b]` port pair on `cdl_top`.

`cdl_top` ports:

| port | dir | meaning |
|------|-----|---------|
| `start` | in | One-cycle pulse; starts a run while idle. |
| `busy`, `done` | out | `busy` is high during a run; `done` pulses for one cycle at its end. |
| `phase` | out | idle / distribute / compute / gather. |
| `kernel_cycles` | out | Memory cycles of the last kernel run. |
| `host_req`, `host_rdata` | in / out | Host access to bank 0. It is honoured only while `busy` is low; a request during a run is dropped. |
| `mem_req[MP]`, `mem_rdata[MP]` | out / in | One port pair per SRAM bank. |

To use the design, the host does the following:

1. While idle, write B row-major at words 2048 + 512 + 16·i + j of bank 0.
2. Pulse `start`.
3. Wait for `done`.
4. Read A at words 2048 + 16·i + j.

Internal handshakes are one-cycle start and done pulses, all registered.
Concurrent assertions check two rules:

* only one engine is active at a time;
* the kernel runs only in the compute phase.

The kernel also asserts that no two of its requests hit the same bank in
the same cycle.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MP` | 8 | number of SRAM banks |
| `N1`, `N2` | 32, 16 | array shape |
| `U1`, `U2` | 2, 2 | unroll factors of i and j; they must divide N1 and N2 |

Constraints:

* MV = U1·U2 must not exceed MP, because all reads of one iteration
  happen in one cycle.
* Element width (32 bits), bank depth (4096 words) and the row-major base
  address (2048) are package constants in `cdl_pkg`.

At the default size, bank address bits 7 to 11 stay 0 on every bank except
bank 0, because each of those banks holds a single 128-word virtual memory.

## What follows the method and what is this design's own

These parts follow the method as originally described:

* the suffix and local-index arithmetic, including how negative subscripts
  are handled;
* one bank per virtual memory when there are enough banks;
* pairing the virtual memories that the statement orders anyway when there
  are not;
* the reference loop, array shape and unroll;
* 8 banks with one-cycle memory latency;
* moving only the data that enters or leaves the loop between layouts.

These parts are this design's own choices:

* the word placement inside a bank;
* the row-major copy in bank 0 and the host port;
* the three-phase controller;
* the two kernel schedules;
* the simple two-cycles-per-element reorganization engine;
* the 32-bit word and the 4096-word bank size.

## Limits

These parts of the method are not built:

* **Layout derivation.** The layout is derived by a compiler from the
  subscripts of the source loop. This hardware has the result built in
  through `U1`/`U2`. The partitioning of arbitrary references, non-affine
  subscripts and aliasing are compile-time analysis and have no hardware
  counterpart here.
* **Other kernels.** The method has also been applied to a FIR filter, a
  Jacobi stencil, pattern matching, Sobel edge detection and matrix
  multiply. Their datapaths are not part of this design, which computes
  only `A = B + 1`.
* **Faster reorganization.** Reorganization could be faster: read in
  parallel in one layout's order and reshuffle on chip. The engine here is
  the plain sequential version.
* **Replication.** Read-only data could be replicated across banks instead
  of split; this is not done.

## Files

* `rtl/cdl_pkg.sv`: shared constants, request struct, phase enum.
* `rtl/cdl_index_map.sv`: subscript → suffix and local index.
* `rtl/cdl_phys_map.sv`: virtual memory → bank and word.
* `rtl/cdl_reorg.sv`: distribute and gather engine.
* `rtl/cdl_kernel.sv`: unrolled loop body and its two schedules.
* `rtl/cdl_ctrl.sv`: phase sequencer.
* `rtl/cdl_top.sv`: the design, with the bank multiplexer.

Testbenches in `tb/`:

* `tb_cdl_index_map`, `tb_cdl_phys_map`, `tb_cdl_reorg`, `tb_cdl_kernel`,
  `tb_cdl_ctrl`: one per block.
* `tb_cdl_top`: end to end with 8 and 4 banks. It also checks that every
  mechanism occurs: distribute, parallel read, read/write overlap,
  shared-bank alternation, gather, and the host lock-out.
* `tb_cdl_top_full`: one run at the default parameters.
* `tb_cdl_top_unroll`: the unroll-factor sweep above.

`tb/system_bench.sv` models the host and the SRAM banks, and
`tb/kernel_bench.sv` drives the kernel on its own. Every testbench checks
against values it computes itself. Each ends by printing
`TB_RESULT checks=N failures=M`.

To simulate, for example the default-size run:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
  rtl/cdl_pkg.sv tb/tb_cdl_top_full.sv --top-module tb_cdl_top_full -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the others. Every
variable a testbench reads is initialised, so the runs do not depend on
start-up values.
