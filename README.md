# Micro-coded memory BIST with word-level self-repair

An embedded SRAM tests itself and repairs itself. The test algorithm is a
March test. It is not hard-wired into a state machine: it is a short
**microcode program** in a small ROM. Each 7-bit microword describes one memory
operation. A different March algorithm is loaded by changing the ROM
contents; the logic stays the same. While the test runs, every read is compared
with the value the algorithm expects. Each failing word goes into a **redundant
logic array**, a small set of spare words that sit beside the memory. Each
spare word holds a failing address and a data field. In normal operation every
access is checked against the stored addresses, and a matching access is
served by the spare word instead of the faulty one.

The memory here is a 16-word x 1-bit SRAM. The default program is a 14-operation
March test built to catch static faults (write disturb, deceptive read
destructive) and dynamic single-cell faults (dynamic read destructive, dynamic
deceptive read destructive, dynamic incorrect read). The SRAM model can carry
any of these faults, so the whole detect-and-repair loop can be simulated.

## Block structure

```
            +---------+   +-----------+   +---------+
  InstEna ->| inst_ptr|-->|inst_storage|-->|inst_reg |--> op (Valid,Fo,Io,Lo,I/D,R/W,Data)
     Over ->|         |   |  (ROM)     |   |         |
            +---------+   +-----------+   +---------+
                 ^  Fo/Io/Lo                  | I/D      | R/W        | Data
                 |                            v          v            v
                 |                       +--------+ +----------+ +--------+
                 +--------- Over --------|addr_gen| |rw_control| |data_gen|
                                         +--------+ +----------+ +--------+
                                              | Address  | RdEna/WrEna | Data
   AddrIn, DataIn, REna, WEna -----------+    v          v             v
                                         +-> ip_mux (ModeType) --> sram --MemOut--+--> output_mux --> MuxOut
                                                                     |            |        ^
                                                 fault_diag <--------+------------+        |
                                                     | Fault, FaultAddr, correct data      |
                                                     v                                     |
   AddrIn, DataIn, REna, WEna ------------------> rl_array (spare words) ------------------+
   smc: drives InstEna, IEna, IREna, AddrEna, DataEna, RWEna, MemEna, FDEna, RLAEna
```

| module | role |
|---|---|
| `mbisr_top` | top level, wires everything below |
| `smc` | state machine controller: sequences the blocks through each operation |
| `inst_ptr` | instruction pointer; loops over the operations of a March element |
| `inst_storage` | microcode ROM, `PROGRAM` parameter (default: the 14-operation test) |
| `inst_reg` | 7-bit instruction register, decoded into `mbist_pkg::mcode_t` |
| `addr_gen` | test address up/down counter, `over` at the last address |
| `data_gen` | test word: all zeros or all ones |
| `rw_control` | RdEna/WrEna from the R/W bit |
| `ip_mux` | memory inputs from the BIST (test mode) or from the pins (normal mode) |
| `sram` | memory under test, with fault injection |
| `fault_diag` | compares reads with the expected word; emits fault pulses |
| `rl_array` | redundant words, comparator, overflow |
| `output_mux` | spare-word data or SRAM data onto `MuxOut` |
| `mbist_pkg` | microword struct, mode and fault enums, default program |

## The microword and how a March element is walked

A March test is a list of *elements*. Each element is a list of operations
applied to one address; the element then moves to the next address, in
increasing or decreasing order, until every address is done. One microword is
one operation; the MSB comes first:

| bit | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| field | Valid | Fo | Io | Lo | I/D | R/W | Data |

* **Valid**: 0 ends the test.
* **Fo, Io, Lo** are active low and give the word's place in its element:
  `111` single-operation element, `011` first, `101` in-between, `110` last.
* **I/D**: 1 = increasing address order, 0 = decreasing.
* **R/W**: 1 = read and compare, 0 = write.
* **Data**: the test word, all ones (1) or all zeros (0).

The flags are what make the program short. The address order is not stored
per address. The instruction pointer acts on the flags when it steps:

* first operation: remember this location as the element start, then go to
  the next word;
* in-between operation: go to the next word;
* last operation: if the address generator reports `over` (the last address
  of this order), go to the next word, which starts the next element.
  Otherwise go back to the element start, and the address generator steps;
* single operation: stay on this word until `over`, then go to the next word.

When a new element begins, the controller loads the address generator with
the first address of that element's order: 0 going up, 15 going down.

Default program (`mbist_pkg::MARCH_14`):

| loc | word | element | operation |
|---|---|---|---|
| 0 | `7C` | M0 up | w0 (single) |
| 1-3 | `5C 6E 76` | M1 up | w0, r0, r0 |
| 4-6 | `5D 6F 77` | M2 up | w1, r1, r1 |
| 7-9 | `59 6B 73` | M3 down | w1, r1, r1 |
| 10-12 | `58 6A 72` | M4 down | w0, r0, r0 |
| 13 | `7A` | M5 down | r0 (single) |
| 14-15 | `00` | | end of test |

Every cell gets a read right after a write (w0 r0, w1 r1). This catches the
dynamic faults. Every cell also gets two reads in a row, which catches the
deceptive read destructive fault. A non-transition write followed by a read
catches the write disturb fault. The program is 14 operations per address:
224 memory operations for 16 words.

## Running another March algorithm

To run another algorithm, override the `PROGRAM` parameter of `mbisr_top`. The
program has 16 locations: at most 15 operations plus an end word. An element
can have any number of operations, and each operation has its own read/write
and data bits. An element may therefore start with a read, or mix w0 and w1.

`tb/tb_march_lr.sv` loads March LR:

```
{ up(w0); down(r0,w1); up(r1,w0,r0,w1); up(r1,w0); up(r0,w1,r1,w0); up(r0) }
```

This is also 14 operations per address, in 14 words plus an end word. The
hardware runs it unchanged. The run also shows why the default program has
its double reads and its non-transition writes. March LR never reads a cell
twice in a row, and it never writes a 1 over a 1. So it misses three faults
that the default program finds:
* deceptive read destructive faults;
* dynamic deceptive read destructive faults at 1;
* write disturb faults at 1.

March SS, at 22 operations per address, does not fit in 16 locations. It would
need a 5-bit instruction pointer and a 32-word storage.

## Operation timing

The controller (`smc`) spends five clocks on each microword:

| state | enable raised | effect |
|---|---|---|
| FETCH | `i_ena` | ROM word at InstAddr registered |
| DECODE | `ir_ena` | instruction register loaded |
| SETUP | `data_ena`, `rw_ena`, (`addr_ld`) | test word and RdEna/WrEna loaded; first address of a new element loaded; an invalid word goes to DONE instead |
| ACCESS | `mem_ena` | SRAM read or write |
| CHECK | `fd_ena` (reads), `inst_ena`, (`addr_ena`) | compare; pointer steps; address steps after the element's last operation unless `over` |

The SRAM has a one-clock registered read, so the data read in ACCESS can be
compared in CHECK. A fault pulse follows one clock later, and the spare word is
written on the clock after that. A full test takes `5 x operations + 4`
clocks, which is 1124 clocks with the default program. `TestDone` stays high
until `SMCEna` is released. The instruction pointer is cleared only by `Rst`,
so a second test needs a reset.

## Repair: the redundant logic array

`rl_array` has `N_RED` words (default 4). Each word has three fields: FA (in
use), faulty address, and data. The array acts differently in the two modes:

* **Test & repair** (`ModeType = 1`): each fault pulse writes the failing
  address and the *expected* data into the next free word. A March test reads
  a bad cell several times, so a pulse for an address already stored only
  refreshes that word's data. A pulse with every word in use sets `Overflow`.
  Overflow stays set until reset and means the memory cannot be fully repaired.
* **Normal** (`ModeType = 2`): the address is compared with every word in use.
  On a match, a write goes to both the SRAM and the spare word. A read takes
  the spare word's data, registered so that it lines up with the SRAM's
  registered read; `output_mux` then drives it onto `MuxOut`.

`SRDEna = 0` turns repair off. Nothing is programmed and nothing is
substituted, so the SRAM is seen as it is.

## Fault injection in the SRAM model

`sram` is a plain synchronous SRAM while all of `FiType` is 0. Each word `a`
has its own fault type, `FiType[a]`, and its own sensitising value,
`FiPol[a]`. A good word has type 0. A fault is sensitised only when the cell
holds the value `FiPol[a]`. In `<S/F/R>` notation (sensitising
operations / cell value after / value read):

| FiType | fault | behaviour |
|---|---|---|
| 1 | WDF | writing the value the cell already holds flips it |
| 2 | DRDF | a read returns the right value and flips the cell |
| 3 | dRDF | `<v w v r v / ~v / ~v>`: a read right after a write to that word flips the cell and returns the flipped value |
| 4 | dDRDF | `<v w v r v / ~v / v>`: the same, but the read returns the right value |
| 5 | dIRF | `<v w v r v / v / ~v>`: the read is wrong, the cell is kept |

"Right after" means the previous memory operation was a write to the same
word. A fault acts on the whole word. Any number of words can be faulty,
each with a different fault type.

This algorithm depends on the cell's starting value for WDF at value 0. If a
WDF-0 cell powers up at 0, the w0 of M0 flips it to 1. The w0 of M1 is then a
transition write, which puts back a 0, and every later read is correct, so
the fault escapes. The end-to-end testbench predicts this from its own model
and does not count it as a failure.

## Top-level pins

| pin | dir | width | meaning |
|---|---|---|---|
| `Clk`, `Rst` | in | 1 | clock; asynchronous reset, active low |
| `ModeType` | in | 2 | 1 = test & repair, 2 = normal, 0/3 = idle (memory disabled) |
| `SMCEna` | in | 1 | start / enable the BIST controller |
| `SRDEna` | in | 1 | enable self-repair |
| `AddrIn`, `DataIn`, `REna`, `WEna` | in | 4, 1, 1, 1 | normal-mode access |
| `MuxOut` | out | 1 | read data, one clock after `REna` |
| `FiType`, `FiPol` | in | 16 x 3, 16 | fault injection, per word (tie `FiType` to 0 for a good memory) |
| `TestDone`, `Fault`, `FaultAddr`, `Faulty` | out | 1, 1, 4, 1 | end of test; fault pulse and its address; a fault has been seen |
| `Overflow`, `RepairCount` | out | 1, 3 | repair capacity exceeded; spare words in use |
| `RbcAddr`, `RbcData`, `RbcRd`, `RbcWr`, `RbcMemEna` | out | 4, 1, 1, 1, 1 | the memory-side signals of the input multiplexer |

Parameters: `ADDR_W = 4`, `DATA_W = 1`, `N_RED = 4`. The pins from `Clk` to
`MuxOut` are the design's original interface: 13 inputs and one output. The
fault-injection and status pins are added here so that the design can be
tested.

## What follows the original design and what is this implementation's own

From the original design:
* the block structure and signal names;
* the 7-bit microword, its field order and the Fo/Io/Lo encoding;
* the 14-word program;
* the 16 x 1 memory size;
* the register enables and the active-low reset of each block;
* the five fault models;
* the spare-word organisation (FA, address, correct data);
* the overflow signal;
* the two operating modes;
* the output multiplexer.

This implementation's own choices, where the original is silent:
* **Timing:** the five-clock sequence in the controller; the registered SRAM
  read; the registered fault pulse.
* **Address generator:** the element-start load (`addr_ld`) and the exact
  meaning of `over`.
* **Pointer:** how it returns to the element start.
* **Mode codes:** the `ModeType` values and the idle codes.
* **`SMCEna` and `SRDEna`:** only their names come from the original; their
  meanings are this implementation's.
* **Spare-word array:** 4 words; filled in order; a repeated address
  refreshes its word instead of taking a new one.
* **Flags:** `Faulty` stays set once a fault is seen; `FaultAddr` holds its
  last value.
* **Fault injection:** the whole fault-injection interface.

Departures to know about:
* **Word width:** the original text speaks of "a byte" of ones or zeros, while
  its interface is one bit wide. `DATA_W` defaults to 1 and can be raised;
  the test word is then all ones or all zeros.
* **Address order of M4:** one description of the algorithm calls M4
  increasing and another decreasing. The program uses the encoded words,
  which give decreasing order for M3, M4 and M5 and increasing order for M0 to
  M2.
* **Reliability block:** the original places a "reliability" block between
  the input multiplexer and the memory but gives no function for it. Here
  the multiplexer drives the SRAM directly, and its outputs are brought out as
  the `Rbc*` pins.
* **Data passed to the spare word:** the original says in one place that
  fault diagnosis passes on the data actually read, and in another the
  expected (correct) data. This design stores the expected word, since that
  is what a later read of the repaired address must return.
* **No X or Z:** the original shows `FaultAddr` high-impedance while idle;
  this design holds the last value.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/mbist_pkg.sv tb/tb_mbisr_top.sv --top-module tb_mbisr_top
./obj_dir/Vtb_mbisr_top +verilator+rand+reset+2
```

Replace `tb_mbisr_top` with `tb_<module>` to test a single block, or with
`tb_march_lr` to run the March LR program.

`tb_mbisr_top` runs the design at its default size, end to end, in 13
scenarios:
* fault-free;
* each fault type, at both sensitising values where they apply;
* two pairs of fault types in one memory (WDF with dIRF, DRDF with dRDF);
* more faulty words than spare words (overflow);
* repair disabled.

For each scenario the testbench predicts the test from its own model. That
model is the March test written as a list of elements, plus its own model of
the fault primitives. From it, the testbench checks:
* every memory operation the BIST issues;
* the test length;
* every fault pulse and its address;
* the spare-word count and `Overflow`;
* that every injected faulty word is found (a write-disturb-at-0 word aside,
  as explained above);
* that every normal-mode read after repair returns the last value written.

It also counts each mechanism: fault pulses, programming, refresh, overflow,
spare-word reads and writes, both address orders, element loop-back, end of
test, repair disabled and idle mode. Any mechanism that never occurs is
counted as a failure. The run takes well under a second.
