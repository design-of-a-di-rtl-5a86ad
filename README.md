# CAM-tagged instruction cache with DCVSL completion detection

This is an 8 KB instruction cache whose tag store is a content addressable
memory (CAM), not a RAM. The cache holds 2048 instructions of 32 bits. Each
cache row has its own 11-bit CAM word. A fetch address is compared with all
2048 words at once, and the row that matches drives its instruction straight
out. No index decoder and no tag RAM read is needed.

The design comes from a self-timed (clockless) setting. Every CAM bit
compares through a precharged differential gate (DCVSL: differential cascode
voltage switch logic). When that gate has evaluated, it produces both the
result and the signal that the result is ready. The OR of all row match lines
is therefore a completion signal, `CAM_req`. The CPU handshake waits on that
signal, not on a clock edge. A miss is detected by the absence of completion
within a matched ("bundled") delay. The cache then fetches from program memory
over a second request/acknowledge handshake.

This RTL keeps that structure, the signal names and the event order of both
handshakes. It is written as synchronous logic: one clock and an asynchronous
active-low reset. It can therefore be simulated with Verilator and built with
a standard synthesis flow. The section "Departures and choices" lists what
this changes.

## Sizes

| quantity | value | parameter |
|---|---|---|
| cache rows (instructions) | 2048 | `ROWS` |
| CAM word = instruction word address | 11 bit | `TAG_W` |
| instruction width | 32 bit | `DATA_W` |
| tag store | 2048 x 11 bit = 2.75 KB | |
| instruction store | 2048 x 32 bit = 8 KB | |
| miss-detection delay | 3 clock cycles | `MISS_DELAY` |

The defaults live in `rtl/cache_pkg.sv`. `MISS_DELAY` is this design's own
number. The others are the published sizes.

Because the address is 11 bits wide and there are 2048 rows, the whole
address space fits in the cache at the default size. A program therefore
only sees first-reference misses, and replacement never evicts. Eviction
only happens when `ROWS` is made smaller than 2^`TAG_W`; the end-to-end test
does this.

## How a fetch proceeds

```
 pc_addr ──► address latch ──► CAM search lines (2048 words x 11 bit)
                                   │ ml[2047:0]
                                   ▼
                            match-line latches ──► instruction memory ──► ir_inst
                                   │                 (word lines)
                                   ▼
                               OR tree ──► CAM_req ──► control block ──► pc_ack
   pc_req ──► latch control ──► EN, RES, eval        │      ▲
                                  eval ──► bundled delay ─┘      │
                                                 pm_req / pm_ack ┘──► program memory
```

**Hit.**
1. The CPU holds the address on `pc_addr` and raises `pc_req`.
2. The latch control raises EN. One cycle later it drops RES, and the address
   latch now holds the address.
3. From this point `eval` (EN and not RES) is high. All DCVSL comparators leave
   precharge and evaluate. The matching row's `ml[i]` rises.
4. The match-line latch captures it. The OR tree raises `CAM_req`.
5. The control block raises `pc_ack`. The instruction memory row selected by
   the latched match line is on `ir_inst`.

`pc_ack` comes 4 clock cycles after `pc_req`. The CPU then drops `pc_req`,
and EN falls, which puts the comparators back into precharge. One cycle later
RES rises. The address latch and the match-line latches are then cleared to 0
("refreshed by 0"), and `CAM_req` falls. Only then does `pc_ack` fall. This
completes the four-phase cycle, and the cache is clean for the next address.

**Miss.**
1. `eval` also runs through `bundled_delay`. If the delayed copy arrives while
   `CAM_req` is still low, no row matched.
2. The control block notes the replacement row chosen by `plru` and raises
   `pm_req`, with the address on `pm_addr`.
3. Program memory answers with `pm_ack`. The instruction on `pm_inst` is valid
   while `pm_ack` is high. On `pm_ack` the address is written into the CAM row
   and the instruction into the same instruction memory row.
4. `pm_req` falls, then `pm_ack` falls.
5. The CAM has kept evaluating the same address the whole time, so the row
   just written now matches. `CAM_req` rises, and the access ends exactly like
   a hit.

A refill therefore needs no separate data path to the CPU. The instruction
always reaches `ir_inst` from the instruction memory.

## The CAM bit and its completion

A CAM bit stores D and compares it with the search line SL. The comparator is
a DCVSL gate (`dcvsl_gate`) with two rails, Q and Q̄:

- **Precharge** (`eval` = 0): both rails are high, and the NAND of the rails
  is 0.
- **Evaluate** (`eval` = 1): Q is pulled low through the series pair SL and D.
  Q̄ is pulled low through the pair SL̄ and D̄.

| SL | D | Q | Q̄ | NAND = match |
|---|---|---|---|---|
| 0 | 0 | 1 | 0 | 1 |
| 0 | 1 | 1 | 1 | 0 |
| 1 | 0 | 1 | 1 | 0 |
| 1 | 1 | 0 | 1 | 1 |

So the NAND output is the bit's XNOR, and it is 0 whenever the gate is
precharged. In a bit that matches, one rail falls. In a bit that does not
match, neither rail falls. A row's match line (`cam_word`) is the AND of its
11 bit outputs and of a valid bit. The CAM's completion signal is the OR of
all latched match lines (`or_tree`).

A consequence that is easy to miss: a miss produces no event at all.
Completion only ever signals a match. This is why the design needs the
bundled delay. A miss is a time-out, not an evaluated result.

In silicon the comparator is a handful of transistors per bit. Here
`dcvsl_gate` is written as its Boolean function. This keeps the rails and the
NAND visible (`q`, `q_n`, `done`), but they carry no timing.

## Replacement

The published material names pseudo-LRU as the policy but does not give its
structure. `plru` uses the usual binary tree of `ROWS-1` direction bits:

- The victim is found by walking from the root along the bits.
- Every completed access walks the path to its row and turns each bit away
  from that row.
- Rows that were never filled are taken first, lowest number first. This also
  makes cold fills go to rows 0, 1, 2, …

## Departures and choices

- **Clocked, not self-timed.** The latches are edge-triggered registers, and
  every handshake input is sampled on the clock. The DCVSL precharge/evaluate
  phases map to `eval`. The completion signal is still the thing the control
  block waits for. The "delay-insensitive" property of the original has no
  meaning in this version.
- **Miss time-out is a counted delay.** `MISS_DELAY` clock cycles, 3 by
  default. It must be longer than the 1-cycle search: evaluation starts, and
  one edge later the match-line latch shows the completion.
- **Valid bits.** Each CAM row has a valid bit, cleared by reset and set by
  the refill. Without it a reset CAM would hit. At reset each row holds its
  own row number, as in the published size illustration, but is invalid.
- **Address width.** The CPU address is taken as the 11-bit instruction word
  address. If it is wider, only the low 11 bits are compared, and addresses
  that differ above bit 10 alias.
- **Gate order in a row.** One description puts the AND of the bit compares
  before a DCVSL gate per row. The transistor-level circuit uses a DCVSL gate
  per bit, followed by the AND. This design follows the circuit. The logic
  function is the same.
- **Word width in the CAM block diagram.** One block diagram draws 32 columns
  per CAM word. The sizes are stated as 2048 x 11 bit, and those are used.
- **Instruction memory read.** The one-hot latched match lines act as word
  lines. In the RTL they are encoded to a row number, which gives the same
  result for a one-hot or empty selection and lets synthesis keep the array
  as a memory.
- **Not included.** The CPU (program counter and instruction register) and
  the program memory are outside the cache. `tb/pm_model.sv` is a behavioural
  program memory for simulation: a fixed 4-cycle latency, with content that is
  a fixed function of the address.

## Evaluated programs

The design was reported with five benchmark programs (BITC, STRS, QSTR,
DHRY and DIJK). Each ran with 89 to 391 misses in 0.15 to 5.3 million
fetches. Those miss counts are far below the 2048 rows, so the
working sets fit. The reported hit ratios are "99%" per program in the table
but "up to 95%" in the summary text. The traces themselves are not
available. `tb_async_cache_full` instead runs a synthetic loop-and-call trace
at full size: 264 first-reference misses in 2280 fetches, an 88% hit ratio
that is dominated by the cold start. It then fills and re-reads all 2048
rows.

## Files

| file | what it is |
|---|---|
| `rtl/cache_pkg.sv` | sizes shared by all modules |
| `rtl/async_cache.sv` | top level: the whole cache |
| `rtl/cache_control.sv` | control block: PC and PM handshakes, hit/miss, refill |
| `rtl/latch_control.sv` | EN/RES sequencing from `pc_req`, DCVSL `eval` |
| `rtl/hs_latch.sv` | enable/reset latch (address latch, match-line latches) |
| `rtl/cam_array.sv` | 2048 x 11 CAM with write port and valid bits |
| `rtl/cam_word.sv` | one CAM row and its match line |
| `rtl/cam_cell.sv` | one CAM bit: storage and DCVSL XNOR |
| `rtl/dcvsl_gate.sv` | precharged dual-rail gate with NAND completion |
| `rtl/or_tree.sv` | completion OR tree |
| `rtl/bundled_delay.sv` | miss time-out delay line |
| `rtl/plru.sv` | tree pseudo-LRU replacement |
| `rtl/instruction_memory.sv` | 2048 x 32 instruction store |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_async_cache.sv` | end-to-end test, 16 rows, evictions, reference cache model |
| `tb/tb_async_cache_full.sv` | end-to-end test at the default size |
| `tb/pm_model.sv` | behavioural program memory |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cache_pkg.sv tb/tb_async_cache.sv --top-module tb_async_cache -o sim
./obj_dir/sim
```

Replace `tb_async_cache` with any other testbench name. The end-to-end test
checks every fetch against a reference cache: instruction, hit or miss,
refilled row, hit latency and one memory request per miss. It also checks
that hits, cold misses, evictions and the latch reset all occur.

The full-size test (`tb_async_cache_full`) takes a few minutes to compile,
because it builds 22,528 CAM bit instances. It then runs in seconds.

Concurrent assertions in `cache_control` and `async_cache` check the
handshake rules:
- `pc_ack` rises only on a request.
- `pm_req` falls only after `pm_ack`.
- `pc_ack` falls only after both `pc_req` and `CAM_req` are low.
- At most one match line is set.

## Changing it

- `ROWS` must be a power of two, because of the pseudo-LRU tree. `TAG_W` can
  grow independently. With `TAG_W` > log2(`ROWS`), replacement becomes active.
- `MISS_DELAY` must stay at 2 or more, so that the time-out cannot arrive
  before the completion signal of a hit.
- The program memory may take any number of cycles. It only has to keep
  `pm_inst` valid while `pm_ack` is high, and to return `pm_ack` low after
  `pm_req` falls.
