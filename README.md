# 512-bit SRAM with a microcoded March self test

A small embedded memory is hard to test from the pins of the chip around it.
This design puts the tester next to the memory. A 512-bit SRAM (64 words of
8 bits) sits behind a built-in self test (BIST) engine. The engine holds eight
March test algorithms as microcode and runs any one of them on a single start
signal. It issues one read or write per clock and compares every read with
the value it expects. The result is two flags: *fault detected* and *end of
test*.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The only part
left out is the transistor-level 6T bit cell. The cell array is written as an
ordinary memory array.

## Block structure

```
             bist_en                                   +---------------+
                |                      Read/Write      |               |
      +---------v---------+   +-------+  +---------+-->| embedded_ram  |
      | march_generator   |   |       |  |         |   |   64 x 8      |
      |  8 microcode ROMs |==>|alg_mux|->|  alg_   |   |               |
      |  program counter  |   |  8:1  |  | decoder |   +---+-------^---+
      +--^-------^----+---+   +---^---+  |         |       |dout   |din
         |       |    |           |      +-+--+--+-+       |       |
 elem/alg_last   |  end_o      alg_sel     |  |  |         v       |
   (decoder)     |                  Up/Down|  |  |Zero/One +-------+------+
                 | addr_last    +----------v+ |  +-------->| data_gen     |
                 +--------------| addr_gen  | |          +-------+------+
                                +-----+-----+ |cmp_en            | expected
                                      | addr  v                  v
                                      +-> RAM      +-------------------+
                                                   | comparator        |--> fault_detect
                                                   +-------------------+
```

| Block | Module | Job |
|---|---|---|
| ROM-based algorithm generator | `march_generator` | Eight microcode ROMs, the program counter and the start/end sequencing |
| 8:1 selector | `alg_mux8` | Picks the word of the algorithm chosen by `alg_sel` |
| Algorithm decoder | `alg_decoder` | Drives Read/Write, Up/Down and Zero/One, and tells the address counter when to move |
| Address generator | `addr_gen` | Counts through the 64 words in up or down order |
| Data generator | `data_gen` | Produces the all-0 or all-1 word |
| Embedded RAM | `embedded_ram` | The 64 x 8 memory under test. Synchronous write, one-cycle registered read |
| Comparator | `comparator` | Checks each read's data one cycle later against the expected word |
| Top | `microcode_pmbist` | Wires the blocks together. Adds a sticky fault flag |

All the modules share the types in `bist_pkg`.

## How a March test becomes clock cycles

A March test is a list of *elements*, for example
`{up(w0); up(r0,w1); down(r1,w0)}` (MATS+). Each element visits every address
once, in ascending (up) or descending (down) order. At each address it runs
its operations in order. `r0` means "read and expect all zeros" and `w1`
means "write all ones".

**Microcode.** Each algorithm is stored as one 6-bit word per operation of
each element, in order (`bist_pkg::mc_rom`):

| Field | Meaning |
|---|---|
| `valid` | The word holds an operation. Words past the end of the program read as 0 |
| `up` | Addressing order of the element this word belongs to |
| `write` | 1 = write, 0 = read |
| `data` | Data background, 0 or 1 |
| `elem_last` | Last operation of its element |
| `alg_last` | The word is in the algorithm's final element |

MATS+ therefore takes five words:
`w0*` `r0` `w1*` `r1` `w0*`, where `*` marks `elem_last`. The longest
algorithm, March SS, takes 22 words, so the program counter is 5 bits wide.

**Sequencing.** Each ROM is addressed by the same program counter, and
`alg_mux8` forwards the chosen word. Each cycle in the RUN state does the
following:

* The decoder turns the word into a RAM access at the current address. On a
  write, the data generator's word goes to the RAM. On a read, the same word
  goes to the comparator as the expected value.
* If the word is not the last of its element, the program counter moves to
  the next word.
* If the word is the last of its element and the address counter is not at
  its final count, the address advances. The program counter jumps back to
  the element's first word, which the generator keeps in `elem_start`.
* If the word is the last of its element and the counter is at its final
  count, the counter clears. The program counter then moves to the next
  element, or ends the test if this was the final element.

**Address order without reloading.** `addr_gen` always counts 0..63. In up
mode the address is the count. In down mode it is `63 - count`. Because the
order is chosen combinationally from the current word's `up` bit, a new
element starts in the right place in its first cycle. No extra cycle is spent
loading a start address, and `last` means "final address of this element" in
either order.

**Read latency.** The RAM returns read data one cycle after the read. The
comparator therefore registers the read strobe and the expected word for one
cycle, and `fault_detect` belongs to the read issued in the previous cycle.
After the final operation the generator spends one FLUSH cycle so that the
last read is compared. `end_o` rises only after that cycle.

**Timing.** An algorithm with K operations per word runs for `K*64` cycles,
then the flush cycle, then `end_o`. Counted from the first operation, `end_o`
rises `K*64 + 1` cycles later. The first operation is issued in the cycle
after `bist_en` is sampled high.

## The eight algorithms

| `alg_sel` | Algorithm | Elements | Ops/word | Cycles to `end_o` |
|---|---|---|---|---|
| 000 | MATS+ | up(w0); up(r0,w1); down(r1,w0) | 5 | 321 |
| 001 | March X | up(w0); up(r0,w1); down(r1,w0); up(r0) | 6 | 385 |
| 010 | March C- | up(w0); up(r0,w1); down(r1,w0); up(r0,w1); down(r1,w0); up(r0) | 10 | 641 |
| 011 | March A | up(w0); up(r0,w1,w0,w1); up(r1,w0,w1); down(r1,w0,w1,w0); down(r0,w1,w0) | 15 | 961 |
| 100 | March B | up(w0); up(r0,w1,r1,w0,r0,w1); up(r1,w0,w1); down(r1,w0,w1,w0); down(r0,w1,w0) | 17 | 1089 |
| 101 | March U | up(w0); up(r0,w1,r1,w0); up(r0,w1); down(r1,w0,r0,w1); down(r1,w0) | 13 | 833 |
| 110 | March LR | up(w0); down(r0,w1); up(r1,w0,r0,w1); up(r1,w0); up(r0,w1,r1,w0); up(r0) | 14 | 897 |
| 111 | March SS | up(w0); up(r0,r0,w0,r0,w1); up(r1,r1,w1,r1,w0); down(r0,r0,w0,r0,w1); down(r1,r1,w1,r1,w0); up(r0) | 22 | 1409 |

Two points about this table:

* **March C- element order.** This March C- alternates up and down in the
  middle elements (up, down, up, down). The more common form of March C-
  uses up, up, down, down. The order shown here is the one stored in the ROM.
  It has a cost, described in the next section.
* **Data backgrounds.** The algorithms are defined for memories with one bit
  per word. Here every bit of the 8-bit word gets the same value (all-0 or
  all-1 backgrounds). Coupling between bits of the same word is therefore
  not targeted.

## What the fault flag catches

`tb/faulty_ram.sv` is a RAM model into which one fault at a time can be
injected. `tb/tb_bist_faultyram.sv` runs all eight algorithms against 13
faults:

* stuck-at-0 and stuck-at-1 faults
* rising and falling transition faults
* an address decoder fault, where one address selects another word
* four inversion couplings (CFi)
* four idempotent couplings (CFd)

In each coupling the aggressor and the victim are different words. The
measured coverage ("yes" = flagged at `end_o`):

```
fault   none SA0 SA1 TFr TFf AF  CFi0 CFi1 CFi2 CFi3 CFd0 CFd1 CFd2 CFd3
MATS+     -  yes yes yes  -  yes yes yes  -  yes yes yes  -   -
March X   -  yes yes yes yes yes yes yes yes yes yes yes  -   -
March C-  -  yes yes yes yes yes yes yes yes yes yes yes  -   -
March A   -  yes yes yes yes yes yes yes yes yes yes yes yes yes
March B   -  yes yes yes yes yes yes yes yes yes yes yes yes yes
March U   -  yes yes yes yes yes yes yes yes yes yes yes yes yes
March LR  -  yes yes yes yes yes yes yes yes yes yes yes yes yes
March SS  -  yes yes yes yes yes yes yes yes yes yes yes yes yes
```

What the table shows:

* **MATS+** finds every stuck-at and address fault. It misses the falling
  transition fault, because its final `w0` is never read back. It also misses
  some couplings.
* **March X** adds full transition-fault coverage and catches only part of
  the coupling faults.
* **March C-** in the element order stored here misses CFd2 and CFd3. In
  those two faults a falling aggressor forces the victim to a value it
  already holds at that moment. The cause is that this algorithm raises cells
  only in up order and lowers them only in down order. The usual
  up-up-down-down March C- would catch them. To get that, change the
  directions of words 3–6 of `ALG_MARCH_CM` in `bist_pkg`.
* **March A, B, U, LR and SS** catch every fault in the list.

## Interface of `microcode_pmbist`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Clock. All state changes on the rising edge |
| `rst_n` | in | 1 | Asynchronous reset, active low. RAM contents are not reset |
| `bist_en` | in | 1 | Level-sensitive start. Hold high for the whole test. Dropping it aborts a test, or clears the result once it has ended |
| `alg_sel` | in | 3 | Algorithm code (table above). Must stay constant while a test runs. An assertion checks this |
| `end_o` | out | 1 | Test finished. Held until `bist_en` falls |
| `fault_detect` | out | 1 | One-cycle pulse for each read whose data differs from the expected word |
| `fault_flag` | out | 1 | Sticky OR of `fault_detect`, cleared while `bist_en` is 0. Final when `end_o` is 1 |
| `addr_o` | out | 6 | Current RAM address (for observation) |
| `out_data` | out | 8 | RAM read data (for observation) |

Parameters: `ADDR_W = 6` and `DATA_W = 8`. Together they give 2^6 x 8 = 512
bits. Both can be changed. The March programs do not depend on the size.

The RAM has no functional port besides the BIST. If it is to be used as
working memory outside test mode, put a port multiplexer in front of
`embedded_ram`.

## Where the design makes its own choices

The following come from the design as specified:

* the block partition and the signals between the blocks
* the 512-bit size and the 8-bit output word
* the eight algorithms and their 3-bit codes
* BIST_EN, End_ and *fault detect*
* the idle comparator during writes

The following are this implementation's own choices:

* the microcode word format
* the jump-back sequencing and the use of one operation per clock
* the single mirrored address counter (the original used separate up and
  down counts)
* the solid data backgrounds
* the synchronous RAM with a one-cycle read, and the comparator's alignment
  register and FLUSH cycle that follow from it
* the asynchronous reset
* the abort on `bist_en` falling
* the sticky `fault_flag` and the observation ports

No diagnostic output is provided, such as a failing address or a serial
export of fault data. The result is pass/fail only.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_microcode_pmbist` | Full-size end-to-end test. All eight algorithms run on a clean RAM and with a read-data line stuck at 0 and at 1. Checks every RAM access against the March notation, the exact number of fault pulses, the cycle count and an abort |
| `tb_bist_faultyram` | The fault-coverage table above |
| `tb_march_generator`, `tb_alg_mux8`, `tb_alg_decoder`, `tb_addr_gen`, `tb_data_gen`, `tb_embedded_ram`, `tb_comparator` | Unit tests |

The expected behaviour in the testbenches comes from `tb/march_ref_pkg.sv`.
That package parses each algorithm from its March notation written as text,
independently of the ROM contents.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_microcode_pmbist \
    -y rtl -y tb +libext+.sv rtl/bist_pkg.sv tb/march_ref_pkg.sv \
    tb/tb_microcode_pmbist.sv
./obj_dir/Vtb_microcode_pmbist
```

Swap in any other testbench name the same way. `tb_alg_mux8` and
`tb_alg_decoder` need `rtl/bist_pkg.sv` on the command line. The RAM-only
and counter testbenches need neither package, but listing both does no harm.

## Changing it

* **Memory size.** Set `ADDR_W` and `DATA_W` on `microcode_pmbist`. The test
  length scales with the number of words.
* **Another algorithm.** Rewrite one case of `bist_pkg::mc_rom`, one line per
  element. Set `elem_last` on each element's last word and `alg_last` on
  every word of the final element. Then update the text and the
  operation count in `tb/march_ref_pkg.sv` so the testbenches follow. A
  program longer than 32 operations needs a wider `PC_W`.
