# Programmable memory BIST with a shared controller

This is a built-in self-test (BIST) for embedded memories. Software picks
the test at run time instead of it being fixed in silicon. A host processor
writes one instruction word into a small register block. The instruction
names a March element, the background data, the address direction, and
whether the memories are tested together or one at a time. A single
controller then runs that element over every memory attached to it.

The controller shares one address counter and one write-data path among all
memories of the same type. This is the point of the architecture: adding
memories adds only a read and a write strobe each, plus a comparator. When
a read returns the wrong word, the controller stops. The host then reads
the syndrome, the failing memory and the failing address, and tells the
controller to go on.

The structure follows a published programmable-MBIST architecture:
instruction register, BIST controller and dual-port memory, with the
register addresses and bit positions given there. That description leaves
many details open, such as timing, the exact operand of each read and the
meaning of some control bits. Where it does, this RTL makes its own choices.
Those are marked below, in the last section and in each file's header.

## Structure

```
             register bus (32-bit, byte enables, 4-bit word address)
                 |
   +-------------v--------------------------------------------+
   | pmbist                                                   |
   |  +------------+  enable/resume/stop,   +---------------+ |
   |  | pmbist_ir  |  instruction fields,   |  bist_ctrl    | |
   |  | register   |----------------------->|  FSM, one     | |
   |  | block      |  data width            |  address ctr, | |
   |  |            |<-----------------------|  XOR compare  | |
   |  +------------+  pass, done, paused,   +---------------+ |
   |                  clear_resume, error state,  |  ^          |
   |                  failing memory/address      |  |          |
   +----------------------------------------------|--|----------+
          shared: read addr, write addr, write data |  read data, one word per memory
          per memory: mem_wr[m], mem_rd[m]       v  |
                                   +----------+ +----------+
                                   | dp_sram  | | dp_sram  |  ... NUM_MEMS
                                   +----------+ +----------+
```

| file | role |
|---|---|
| `rtl/pmbist_pkg.sv` | register map, field positions, March element table |
| `rtl/pmbist_ir.sv` | processor-visible registers; decodes the fields to the controller |
| `rtl/bist_ctrl.sv` | the test sequencer, comparator and pause logic |
| `rtl/pmbist.sv` | register block + controller; memory ports brought out |
| `rtl/dp_sram.sv` | dual-port memory under test (one write, one read port) |
| `rtl/pmbist_system.sv` | top level: `pmbist` with `NUM_MEMS` memories attached |

## March elements and what each read expects

A March test is a list of *elements*. An element visits every address in a
fixed order and performs the same short read/write sequence at each one. A
full March algorithm is a sequence of such elements. The host runs it one
instruction at a time: for example, first `m1` up with pattern `00`, then
`m3` up with pattern `11`.

The pattern select gives two background values. **D** = `pattern_sel[1]`
is the value written. **E** = `pattern_sel[0]` is the value a final read
expects. Each is repeated on every data bit.

| `march_array` | element | operations at each address |
|---|---|---|
| `8'h00` | m0 | read, expect E |
| `8'h01` | m1 | write D; read, expect E |
| `8'h02` | m2 | read, expect E; write D |
| `8'h03` | m3 | read, expect ~D; write D; read, expect E |
| other | reserved | the test ends at once, done = 1, pass = 0 |

The first read of `m3` expects the complement of the value about to be
written. It is the classic `(r0, w1, r1)` shape: with pattern `11`, the
memory must first hold zeros, is then written with ones and must read back
ones. Some combinations can never pass on a good memory, such as `m1` with
pattern `01` (write 0, expect 1). They are allowed and are useful for
exercising the error path.

`up_count = 1` walks addresses 0 to 2^ADDR_W-1; `up_count = 0` walks them
downwards.

## Register map

All registers are 32 bits. Writes take effect at the clock edge and honour
the byte enables (`4'b0001` = bits 7:0 … `4'b1000` = bits 31:24,
`4'hF` = whole word), so an 8-bit host can fill a word one byte at a time.
A read returns the word one cycle after `reg_rd`, and it stays on
`reg_rdata` until the next read.

| addr | register | access | fields |
|---|---|---|---|
| 0 | BIST control | r/w | [0] enable, [7] resume (self-clearing), [8] stop |
| 1 | BIST status | r | [0] pass, [1] paused, [2] done, [15:8] failing memory, [31:16] failing address |
| 7 | instruction | r/w | [0] up count, [2:1] pattern select, [3] serial test, [15:8] March element |
| 10 | test status | r | error state: XOR syndrome of the failing read |
| 11 | memory data width | r/w | number of low data bits compared; 0 = all; resets to `DATA_W` |

Writes to addresses 1 and 10, and to unmapped addresses, are ignored.
Unmapped addresses read as 0.

## Running a test

1. Write the instruction (address 7).
2. Write control = `0x101` (enable + stop). The controller starts on the
   next cycle.
3. Poll status (address 1) or watch the `bist_done` pin.
4. If status shows **paused**: read address 10 (syndrome) and address 1
   (failing memory and address). Then write control = `0x181` to resume.
   The controller continues with the next operation. In the same cycle it
   raises `clear_resume`, which clears the resume bit, so the bit is 0 again
   before the next pause. If resume is already set when a mismatch occurs,
   the pause lasts a single cycle and the bit clears itself.
5. At **done**, pass is 1 only if no read mismatched during the whole test.
   Write control = 0 before the next test. Clearing enable also clears done.

Stop: with stop = 1 the test ends after one pass over all memories. With
stop = 0 the element repeats from the first address until the host sets
stop, and then ends at the end of the current pass. Pass then covers
every repetition. This can repeatedly stress the same cells.

Abort: clearing enable returns the controller to idle from any state. The
memory strobes drop in that same cycle.

### Timing

| step | cycles |
|---|---|
| start (idle → first operation) | 1 |
| write | 1 |
| read (strobe, then compare) | 2 |
| pause | until resume is seen, at least 1 |

One pass takes `2^ADDR_W × (writes + 2 × reads)` cycles per memory. In
serial mode this is multiplied by `NUM_MEMS`. Example: `m3` on 16 words
in parallel takes 16 × 5 = 80 cycles, plus the start cycle. The instruction
fields are latched when the test starts, so rewriting the instruction during
a test has no effect until the next one.

## Parallel and serial testing, and error reporting

With `serial_test = 0`, every memory receives the same strobe in the same
cycle. Each memory's read word is XORed with the expected word on its own.
With `serial_test = 1`, the whole element runs on memory 0, then on
memory 1, and so on. Only that memory's strobes are active.

When a read mismatches, the controller records:

- the **syndrome** `(read ^ expected) & mask`, in the error state (address 10).
  For `DATA_W > 32`, the 32-bit slices of the syndrome are ORed together.
- the **failing memory**: the lowest-numbered one that mismatched in that
  cycle. Its syndrome is the one reported.
- the **failing address**.

The mask comes from the memory-data-width register. It lets one controller
test memories narrower than `DATA_W`, or ignore known-bad bit columns.

## Parameters

| parameter | default | where |
|---|---|---|
| `ADDR_W` | 4 (16 words) | all modules with memory ports |
| `DATA_W` | 32 | all modules with memory ports; `pmbist_ir.MEM_DATA_W` |
| `NUM_MEMS` | 2 | `bist_ctrl`, `pmbist`, `pmbist_system` (1 to 256) |

The 16 × 32 memory and the register layout are those of the original
architecture. It does not fix the number of memories per controller, so the
default of two is a choice that makes the sharing visible. A 64-bit, 8-word
configuration (`DATA_W=64, ADDR_W=3`) is exercised in `tb/tb_pmbist.sv`.

## Choices made beyond the original description

- **Operands of each read.** E is the expected value of every read except
  the first read of m3, which expects ~D. The description defines the
  patterns as "write X, read Y" and gives one worked example with pattern
  `11`, where the first read sees zeros.
- **Stop.** Stop = 0 loops the element, and stop = 1 ends the test after
  one pass. The original only says that stop halts the controller when
  testing is complete.
- **Memory data width register.** Its purpose is not really specified. Here
  it is a compare mask.
- **Status fields.** Paused, failing memory and failing address are
  additions. The original asks for "data and address" to reach the host but
  defines only pass and done bits.
- **Resume bit.** It clears itself through `clear_resume`.
- **Timing.** Read latency, two-cycle reads, registered bus reads and all
  reset values are choices of this RTL.
- **Reserved codes.** Element codes other than 00–03 fail at once.
- **Memory reset.** The memory clears all words on reset. This gives a known
  all-zero background; a real SRAM macro would not, so the first element
  of a real test should write the background.
- **Programming path.** The original also mentions shifting instructions in
  serially. This RTL uses the 32-bit parallel register bus that its
  block diagrams show.
- **Not built.** The host processor is outside this design. The register
  bus is brought out at the top for it. The original also mentions
  generating the BIST from a configuration file; that is a software flow,
  and here the three parameters play that role.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb/tb_dp_sram.sv` | reset clear, random write/read against a shadow array, read hold, read-during-write |
| `tb/tb_pmbist_ir.sv` | reset values, byte-lane merging, read-only words, field decode, read latency, resume clearing |
| `tb/tb_bist_ctrl.sv` | every operation and every pause against an independent reference model (3 memories, stuck-at bits); cycle counts; all elements and patterns; up/down; serial/parallel; mask; loop; abort; reserved code |
| `tb/tb_pmbist.sv` | host-level runs with 64-bit × 8-word memories: the all-reads-fail `(r1, w0, r1)` run, syndrome folding, lowest-memory reporting, pre-set resume, cycle counts |
| `tb/tb_march_test.sv` | the March test {⇑(w0), ⇑(r0,w1), ⇓(r1)} (first element run as m1, (w0, r0)) at default sizes, on good memories and with a stuck-at-1 and a stuck-at-0 bit; checks which element finds each fault, and where |
| `tb/tb_pmbist_system.sv` | the whole design at default parameters, driven only through the register bus; counts that each mechanism happened |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/pmbist_pkg.sv rtl/dp_sram.sv rtl/pmbist_ir.sv rtl/bist_ctrl.sv \
  rtl/pmbist.sv rtl/pmbist_system.sv tb/tb_pmbist_system.sv \
  --top-module tb_pmbist_system -Mdir obj_sys
./obj_sys/Vtb_pmbist_system
```

For the other testbenches, list `rtl/pmbist_pkg.sv`, the module under test
and its submodules, then the testbench. Every testbench finishes in well
under a second.

## Limits

The compare checks only the read data. The design has no retention test,
no diagnosis beyond the first failing memory per read, and no repair. Each
instruction is a single element, so a multi-element March algorithm needs
one host round-trip per element. Only memories with one-cycle reads and
writes fit the shared sequencer as written.
