# March mSR memory BIST controller

A memory built-in self-test (MBIST) controller that tests an embedded
single-port SRAM with **March mSR**, a 13N March test derived from March SR
(14N) by dropping one read that adds no fault coverage. The controller walks
every word of the memory, writes and reads solid backgrounds of 0s and 1s in
a fixed order, compares every read with the value it must return, and raises
a sticky `error` flag on the first mismatch. With one memory operation per
clock, a 1024-word memory is tested in 13 × 1024 = 13 312 cycles, which is
266.24 µs at a 20 ns clock (March SR would need 14 336 cycles, 286.72 µs).

The test sequence, with ⇕ any order, ⇑ ascending and ⇓ descending addresses:

| Element | Operations | Per word | Purpose (main faults it exposes) |
|---|---|---|---|
| E0 | ⇕(w0) | 1 | initialise |
| E1 | ⇑(w1, r1, w0) | 3 | stuck-at 0, up transition, read faults on 1, coupling with aggressor 0 |
| E2 | ⇑(r0, r0) | 2 | down transition, read faults on 0, deceptive read on 0 (second read) |
| E3 | ⇑(w1) | 1 | set up the descending pass |
| E4 | ⇓(r1, w0, r0, w1) | 4 | coupling faults with aggressor 1 in both address orders |
| E5 | ⇓(r1, r1) | 2 | deceptive read on 1 (second read), last up transition |

13 operations per word. The sequence targets 26 fault primitives (FPs) of
unlinked static faults and detects 22 of them. It detects every FP of stuck-at
(SAF), transition (TF), read destructive (RDF), incorrect read (IRF),
deceptive read destructive (DRDF) and transition coupling (CFtr) faults. It
detects half of the deceptive read destructive coupling faults (CFdrd).

## How the algorithm is held in hardware: the micro-program

The algorithm is hard-coded. Nothing is loaded at run time. It is stored as a
seven-entry micro-program (`march_msr_rom`). Each instruction names an
*operation set*. That is the fixed group of operations applied to one word
before the address moves on:

| Operation set | Operations on one word | Cycles |
|---|---|---|
| WRITE_WRITE_FAST_ROW | w(D) | 1 |
| WRITE_READ_WRITE_INVERT | w(D) r(E) w(~D) | 3 |
| READ_READ | r(E) r(E) | 2 |
| READ_MODIFY_WRITE | r(E) w(D) | 2 |

D is the write-data register or its inverse, chosen by the instruction's write
command. E is the expect-data register or its inverse, chosen by its expect
command. Both registers are loaded with all zeros, so "inverse" means all ones.

| pc | Instruction | Set | Address | E | D | Ends when | Otherwise |
|---|---|---|---|---|---|---|---|
| 0 | M0 (w0) | WRITE_WRITE_FAST_ROW | +1 | – | 0 | last word | repeat |
| 1 | M1 (w1,r1,w0) | WRITE_READ_WRITE_INVERT | +1 | 1 | 1 | last word | repeat |
| 2 | M2 (r0,r0) | READ_READ | +1 | 0 | – | last word | repeat |
| 3 | M3 (w1) | WRITE_WRITE_FAST_ROW | +1, held after last | – | 1 | last word | repeat |
| 4 | M4_r1w0 | READ_MODIFY_WRITE | hold | 1 | 0 | always | – |
| 5 | M4_r0w1 | READ_MODIFY_WRITE | −1 | 0 | 1 | first word | branch to pc 4 |
| 6 | M5 (r1,r1) | READ_READ | −1 | 1 | – | first word | repeat (last instruction) |

Three details make this table work without any idle cycle or address reload
between elements:

* **Counter wrap carries the address from one element to the next.** After
  the last word of M0, M1 and M2 the address counters wrap from the top back
  to word 0. The next ascending element therefore starts in the right place.
  After M4_r0w1 steps below word 0, the address wraps to the top word, where
  the descending M5 starts.
* **Last-address inhibit.** M3 ascends, but the following element E4
  descends. M3 sets the inhibit bit, so the address stays on the top word
  after M3's last write. E4 then starts there.
* **E4 is split across two instructions with a branch.** No operation set
  holds four operations. M4_r1w0 reads 1 and writes 0 without moving the
  address, and always falls through. M4_r0w1 reads 0 and writes 1, steps the
  address down, and branches back to M4_r1w0 until it has handled word 0.

The sequencer (`mbist_sequencer`) holds `pc` and the operation index `step`.
On the last operation of a word it steps the address and checks the
instruction's end condition. If the condition holds, it moves to the next
instruction. If not, it repeats the instruction or takes the branch.

## Addressing

`mbist_addr_gen` has a row counter (X1) and a column counter (Y1). The row
counter moves on every address step. The column counter moves only when the
row counter wraps. Each counter reports its *end count*: its maximum when
counting up, zero when counting down. The last word of an element is reached
when both counters are at their end count. The memory word address is
`{column, row}`, so a sweep visits the words in plain linear order. The
default split is 128 rows × 8 columns (`ROW_BITS = 7`, `COL_BITS = 3`).
Only the sum `ROW_BITS + COL_BITS` changes the test. The split only sets
which bits are row and which are column.

## Timing

* A one-cycle `start` pulse, sampled on clock edge t0, loads the address and
  data generators and clears `error`. The first memory operation is issued in
  the cycle after t0.
* Every cycle of the run issues exactly one read or write. There are no gaps
  at word or instruction boundaries. The last of the 13N operations is in
  cycle 13N after t0.
* The memory returns read data one cycle after the read (`sram_sp`). The
  comparator registers the expected value and compares it with `dout` one
  cycle later. It shows the registered value on `bist_expect_data`, pulses
  `fail` on a mismatch, and sets the sticky `error`.
* One drain cycle after the last operation checks the final read. `done`
  rises at edge t0 + 13N + 1 and stays high until the next start. `busy` is
  high for those 13N + 1 cycles. A start pulse while busy is ignored.

## Module hierarchy

```
mbist_top                 controller + memory under test
├── mbist_controller      March mSR BIST controller
│   ├── march_msr_rom     the 7-instruction micro-program
│   ├── mbist_sequencer   pc / step, repeat, branch, start/done
│   ├── mbist_opset       operation set + step -> read/write this cycle
│   ├── mbist_addr_gen    X1 row / Y1 column counters, end counts, inhibit
│   ├── mbist_data_gen    write / expect data registers and inversions
│   └── mbist_comparator  one-cycle-late compare, fail, sticky error
└── sram_sp               1024 x 8 single-port synchronous SRAM
mbist_pkg                 shared enums and the instruction struct
```

Parameters of `mbist_top` and `mbist_controller`: `ROW_BITS` (7),
`COL_BITS` (3) and `DATA_W` (8). Together they give 1024 × 8 bits = 1 KB.
`mbist_data_gen` also takes the load values of its two registers (both 0).

Top-level ports: `clk`, `rst_n` (asynchronous, active low), `bist_start`,
`bist_busy`, `bist_done`, `error`, `fail`, `bist_expect_data`, `dout`.

## Fault coverage

`tb/faulty_sram.sv` is a behavioural test fixture, not part of the design. It
models the SRAM with one injected fault primitive on bit 5 of word 300. For
coupling faults the aggressor is word 123 (below the victim) or word 777
(above it). `tb_fault_coverage` runs the full-size controller once per FP and
builds seven detection flags from the `error` outcomes:

| Fault | Flag | Detected |
|---|---|---|
| SAF ⟨0⟩, ⟨1⟩ | 11 | 2/2 |
| TF ⟨0w1/0⟩, ⟨1w0/1⟩ | 11 | 2/2 |
| RDF ⟨0r0/1/1⟩, ⟨1r1/0/0⟩ | 11 | 2/2 |
| IRF ⟨0r0/0/1⟩, ⟨1r1/1/0⟩ | 11 | 2/2 |
| DRDF ⟨0r0/1/0⟩, ⟨1r1/0/1⟩ | 11 | 2/2 |
| CFtr, aggressor 0/1 × up/down transition × below/above | 11111111 | 8/8 |
| CFdrd, (aggressor, value) = (0,0),(0,1),(1,0),(1,1) × below/above | 11000011 | 4/8 |

In total, 22 of 26 FPs (84.6 %) are detected. Two CFdrd cases are caught. One
is ⟨0; 0r0/1/0⟩, where a 0 is read while the aggressor holds 0. E2 catches it
with its second read. The other is ⟨1; 1r1/0/1⟩, caught by E5. In both
elements the aggressor always holds that value, whichever side of the victim
it is on. The CFdrd cases with the opposite aggressor value are never
sensitised by a double read, so March mSR cannot detect them.

## Design choices not fixed by the algorithm description

* **READ_MODIFY_WRITE is two operations, r(E) w(D).** One description of
  this operation set also has a final re-read. E4 is made of two of these
  sets, and the total must be 13 operations per word, so each set can hold
  only two.
* **E1's read expects 1.** E1 is ⇑(w1, r1, w0), so it reads back the 1 it
  has just written.
* **Background.** All bits of a word get the same value: 0x00 or 0xFF.
* **Handshake.** The start pulse, the `busy`/`done` levels, the drain cycle
  before `done`, the sticky `error` cleared by start, and the asynchronous
  reset are all this design's own.
* **Memory.** The port list (`ce`, `we`, `addr`, `wdata`, `dout`) and the
  one-cycle read latency describe a generic synchronous single-port SRAM,
  not a specific compiled macro.
* **Encodings.** The instruction field encodings and the row/column split are
  this design's own.

Not included:
* There is no functional-mode path to the memory. On a real chip a
  multiplexer in front of the SRAM would select between the mission logic and
  the BIST. Here only the BIST drives the SRAM.
* There is no failing-address capture or diagnosis output. The result is
  pass/fail only.
* There is no March SR controller for comparison. Area and power figures
  belong to a specific 130 nm library and are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_march_msr_rom` | every instruction field against the algorithm; 13 operations per word |
| `tb_mbist_opset` | all operation sets, step by step |
| `tb_mbist_addr_gen` | up/down sweeps, wrap, inhibit, hold, reload, end counts (4 × 4) |
| `tb_mbist_data_gen` | all data-command combinations, default and non-zero load values |
| `tb_mbist_sequencer` | cycle-by-cycle pc/step/address against the reference stream; 13N cycles; done timing; start ignored while busy |
| `tb_mbist_comparator` | random reads with wrong data; fail timing; sticky error; clear |
| `tb_sram_sp` | random reads and writes against a model; read latency |
| `tb_mbist_controller` | every memory operation of a run against the reference stream (16 words); a bit flipped after E3 caught at the exact E4 read |
| `tb_mbist_top` | 32-word end-to-end runs (clean, corrupted, clean); counts each mechanism: all instructions, branch, inhibit, wrap, row carry, mismatch, ignored start, restart |
| `tb_mbist_full` | one run at the default 1024 × 8: 13 312 operations, 7168 reads, 266.24 µs at 20 ns, no error, memory ends all ones |
| `tb_fault_coverage` | the 26-FP fault coverage above, at 1024 × 8 |

`tb/march_ref_pkg.sv` builds the expected operation stream directly from the
March notation. This stream is the reference for the cycle-accurate checks.

To simulate with Verilator 5, for example the full-size run:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/mbist_pkg.sv rtl/march_msr_rom.sv rtl/mbist_opset.sv rtl/mbist_sequencer.sv \
  rtl/mbist_addr_gen.sv rtl/mbist_data_gen.sv rtl/mbist_comparator.sv \
  rtl/mbist_controller.sv rtl/sram_sp.sv rtl/mbist_top.sv \
  tb/tb_mbist_full.sv --top-module tb_mbist_full
./obj_dir/Vtb_mbist_full
```

Testbenches that use the reference stream also need `tb/march_ref_pkg.sv`.
`tb_fault_coverage` needs `tb/faulty_sram.sv` in place of `rtl/sram_sp.sv`
and `rtl/mbist_top.sv`. Every testbench finishes in well under a second.

## Changing the design

* **Memory size.** Set `ROW_BITS` and `COL_BITS`. The test length is always
  13 × 2^(ROW_BITS + COL_BITS) cycles + 1.
* **Word width.** Set `DATA_W`.
* **Other March tests.** Edit the table in `march_msr_rom`. Its operation
  sets, address commands, data commands, end conditions, branch and inhibit
  bits can express other March tests of the same form. Raise
  `mbist_pkg::NUM_INSTR` and `PC_W` if more instructions are needed. Keep
  `tb_march_msr_rom` and `march_ref_pkg` in step with the new table.
