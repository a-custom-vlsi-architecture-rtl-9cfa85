# A four-lane vector-excitation speech coder processor

Low-delay analysis-by-synthesis speech coders such as LLD-VXC (16 kbit/s,
4-sample vectors, a 256-entry excitation codebook) spend almost all their
time on two kinds of work:

- **Short filters and inner products.** These are lattice, direct-form, pitch and
  gain-prediction filters, autocorrelations, and filtering the codebook through the
  synthesis filter.
- **The codebook search.** Each candidate is scored with a distortion measure and
  the smallest score is kept.

This design implements that workload in a small, low-clock-rate processor. It has
three parts:

- **A chain of Adaptive Arithmetic Units (AAUs).** There is one AAU per vector
  component, four by default. Each AAU is a multiply-add cell whose data path
  can be reconfigured instruction by instruction. The cells are chained two ways:
  - their data registers form a delay line;
  - their adders form one sum of products, finished in a single clock.
- **One Distortion Arithmetic Unit (DAU)** behind the chain. It turns an inner
  product and a precomputed codevector energy into a distortion and keeps the
  running minimum. While the codebook is being filtered, it squares and adds the
  filtered rows to build that energy table.
- **A control unit.** It runs one 16-bit instruction per clock from a 2K-word
  program ROM. It has a hardware REPEAT counter whose count also indexes memory,
  an index-save register for the winning codevector, and a vector interrupt.

Each instruction takes one cycle. With four lanes, the full codebook search takes
one instruction per codevector: 256 cycles. Filtering the codebook takes one
instruction per codevector row: 1024 cycles. At about 2 MHz, a complete coder fits
in the 0.5 ms that a 4-sample vector lasts at 8 kHz.

```
                 host port (writes)             vector_irq
                      |                              |
   +------------------v------------------+    +------v-----------------------+
   |        global RAM 512 x 16          |    | control unit                 |
   +--+-------------------------------^--+    |  PC, REPEAT counter/index,   |
      | read data                     |       |  write pointer, interrupt,   |
      v                               |       |  index-save register         |
   +------+   +------+   +------+   +------+  |  program ROM 2K x 16         |
   | AAU0 |-->| AAU1 |-->| AAU2 |-->| AAU3 |  +------------------------------+
   |      |   |      |   |      |   |      |--> store to global RAM
   +--^---+   +--^---+   +--^---+   +--^---+
      |  data RAM, coefficient RAM,     |      +-----------------------+
      |  codevector ROM for every lane  +----->| DAU: -2G*ip + G^2*E,  |---> newmin, index
                                               | minimum, energy sum   |---> energy to global RAM
                                               +-----------------------+
```

`vxc_top` is the whole processor. Its ports are:

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `vector_irq` | in | 1 | rising edge = a new input vector; interrupts the program |
| `host_we`, `host_addr`, `host_wdata` | in | 1, 9, 16 | write into global RAM |
| `host_ready` | out | 1 | a host write is taken in this cycle only when high |
| `index_out`, `index_valid` | out | 11, 1 | codebook index sent by the `OUTIDX` instruction (one-cycle strobe) |
| `pc`, `int_active` | out | 11, 1 | program counter; high while interrupts are disabled, e.g. inside the interrupt routine |

## The AAU chain

Every AAU (`aau.sv`) is a three-stage pipeline:

- **Load.** The data register is loaded from one of four sources:
  - the lane's data RAM;
  - the lane's codevector ROM;
  - the previous lane's data register, which makes a delay line;
  - the previous lane's stored accumulator, a path used by the lattice filter.

  For lane 0, the "previous lane" is the global RAM read port. The coefficient
  register always comes from the lane's coefficient RAM. DATA2 can capture the
  old data register value.
- **Execute.** One 16×16 signed multiply: data × coefficient, or data × data for a
  magnitude square. The second adder input is one of:
  - zero;
  - the previous lane's sum;
  - DATA2.

  The sum leaves the lane combinationally. A chain of N lanes therefore forms an
  N-term sum of products in one cycle: one multiplier delay plus N adder delays.
  This ripple sets the highest clock rate. The sum is also registered in the
  lane's 32-bit accumulator.
- **Store.** A shifter takes the accumulator, shifts it arithmetically right by
  `shamt`, and keeps the low 16 bits.

  The stored word goes to the lane's own RAMs (`STA`/`STAC`). From the last lane
  it goes to global RAM. It is also what the next lane sees on its
  accumulator-chain input.

DATA2 is added at the accumulator's scale, that is, shifted left by `shamt`.
A word that was stored with shift `shamt` is therefore added back at its own
weight.

Lane 0's adder input is chosen by the instruction:

| source | used by |
|---|---|
| zero | most instructions |
| last lane's accumulator | `FILT2`, which continues a filter sum over more than four taps |
| global RAM word `<<< shamt` | `LATF`, the lattice input sample |

## The DAU

The DAU (`dau.sv`) has two pipeline stages behind the last AAU.

**Search mode** (`SRCH`):

- **Stage 1** forms the distortion with two 16×16 multipliers and a 34-bit adder:

  `d = m2g·ip + g2·E`

  - `ip` is the chain's inner product of the target with the codevector.
  - `E` is the codevector's filtered energy, read from global RAM in the same
    instruction.
  - `m2g` and `g2` are scale registers. They reset to −2 and 1, which is the
    gain-less case. `LDGM` and `LDGS` load them from global RAM, so a
    gain-shape coder can scale by −2G and G².

  The ‖x‖² term is the same for every candidate, so it is left out.
- **Stage 2** compares `d` with the minimum register. It uses strict `<`, so on a
  tie the earlier codevector wins.
  - On a new minimum, the register is replaced and `newmin` pulses.
  - On that pulse, the control unit's index-save register loads the codevector
    index that travelled down the pipeline with the value.
  - `CLRMIN` sets the minimum to the largest positive value.

**Energy mode** (`FCB`, FILTER CODEBOOK):

- The first multiplier squares the chain output.
- A separate 34-bit energy accumulator sums the squares over the rows of one
  codevector.
- After the last row, the sum goes through the DAU shifter (right shift by
  `dshamt`, low 16 bits kept) and is written to global RAM.

The energy accumulator is separate from the distortion path. A codebook search
run from an interrupt therefore cannot disturb an energy sum in progress.

## Memories

| memory | per | size | read | notes |
|---|---|---|---|---|
| data RAM | lane | 256 × 16 | sync, 1 cycle | the same address in all lanes at once |
| coefficient RAM | lane | 256 × 16 | sync | separate from data RAM, so a tap loads data and coefficient in one cycle |
| codevector ROM | lane | 256 × 16 | sync | lane *j* holds component *j* of every codevector |
| global RAM | chip | 512 × 16 | sync | energies, input and output vectors, shared parameters |
| program ROM | chip | 2048 × 16 | combinational | loaded from `rtl/vxc_program.hex` |

All RAMs are `sync_ram.sv`: one read port and one write port. A read of a word
written in the same cycle returns the old word.

Global RAM has one write port, shared with this priority:

1. the DAU energy store;
2. the last lane's store stage;
3. the host.

The host may write only while `host_ready` is high. An assertion fires if the
first two ever meet in the same cycle; keeping them apart is the program's job
(see the rules below).

## The control unit and its pipeline

A program word is `{opcode[6:0], field[8:0]}`. The 9-bit field addresses one of:

- a 512-word space, either global RAM or all local RAMs in parallel;
- a small constant.

While a REPEAT runs, the loop index is added to the field, so a repeated
instruction walks through memory.

The decoded control word (`instr_decode.sv`) travels down a pipeline that matches
the datapath (`control_unit.sv`). For an instruction issued in cycle t:

| cycle | stage | what happens |
|---|---|---|
| t | issue | memory read addresses out (field + index); flow control: PC, REPEAT, shifter settings, `CLRMIN`, `OUTIDX`, `SETWP` |
| t+1 | load | read data arrives; data, coefficient and DATA2 registers and the DAU scale registers load |
| t+2 | execute | multiply and chained add; accumulators load; `STD`/`STDC` write the data registers back to local RAM |
| t+3 | store | shifted accumulators written: local RAM (`STA`/`STAC`) or global RAM; DAU stage 1 (distortion or energy accumulate) |
| t+4 | DAU compare | minimum register and index-save register update; energy word written to global RAM |

There are no interlocks. The program spaces dependent instructions itself;
see *Programming rules*.

**REPEAT and indexing.**

- `RPT N` issues the next instruction N times, with loop index 0 … N−1. `RPT 0`
  issues it once. The field is 9 bits, so `RPT 256` covers the codebook.
- `RPTV N` issues the next instruction N × NAAU times, which is 1024 for `RPTV 256`.
- For `SRCH`, the loop index is the codevector number.
- For `FCB`, the index is split into two parts:
  - `idx >> log2(NAAU)` selects the codevector (ROM address);
  - `idx & (NAAU−1)` selects the filter row (coefficient address = field + row).

  The codebook's filtered rows and energies therefore come out in a single
  hardware loop.

**Write pointer.** Each of these results goes to global RAM at a write pointer
set by `SETWP`:

- every `FILT1`, `FILT2` and `LATF` result;
- every completed `FCB` energy.

The pointer then steps by one. An instruction has only one address field, which
names the input, so the output needs an address of its own.

**Index save.**

- The index-save register holds the index of the best codevector so far.
- `OUTIDX` copies it to `index_out` and pulses `index_valid`.

**Interrupts.**

- A rising edge of `vector_irq` is latched.
- It is taken at the next issue slot when all of these hold:
  - interrupts are enabled (`EI`);
  - the word at PC is not itself a REPEAT;
  - (the word can be in the middle of a REPEAT loop).
- Taking it:
  - turns that slot into a bubble;
  - saves the PC, the loop counter, the loop index and the write pointer;
  - jumps to word 1;
  - disables interrupts.
- `RETI` restores all four and re-enables interrupts, so an interrupted loop
  continues exactly where it stopped.
- The accumulators and data registers are not saved. An interrupt routine that
  needs them intact must store and reload them itself.

This is the intended structure for a real coder:

- the once-per-12-vectors adaptation and update code runs as the background
  program;
- each vector's interrupt routine runs the per-vector code.

## Instruction set

The field is an address unless noted. "Global" means global RAM read at
field + index. "Local" means every lane's RAM at field + index.

| op | mnemonic | action |
|---|---|---|
| 00 | `NOP` | nothing |
| 01 | `LDDC` | LOAD DATA & COEFF: data and coefficient registers from local data / coefficient RAM |
| 02 | `LDD` | data registers from local data RAM |
| 03 | `LDC` | coefficient registers from local coefficient RAM |
| 04 | `LDROM` | data registers from codevector ROM (address = loop index) |
| 05 | `SHIN` | shift the data chain by one lane; lane 0 takes the global word |
| 06 | `STD` | STORE DATA: data registers → local data RAM |
| 07 | `STDC` | data registers → local coefficient RAM |
| 08 / 09 | `STA` / `STAC` | shifted accumulators → local data / coefficient RAM |
| 0A | `STG` | last lane's shifted accumulator → global RAM |
| 0B | `SOP` | SUM OF PRODUCTS of data × coefficient over the chain → global RAM |
| 0C | `SQR` | sum of data² over the chain → global RAM |
| 0E | `FILT1` | FILTER I: shift the delay line (lane 0 from global), chain sum from zero → global at write pointer |
| 0F | `FILT2` | FILTER II: as FILT1, but the chain starts from the last lane's previous sum |
| 10 | `LATF` | lattice forward: chain sum starting from the global sample `<<< shamt` → global at write pointer |
| 11 | `LATB` | lattice backward: data ← previous lane's stored result, DATA2 ← old data; acc = data × coef + DATA2 |
| 12 | `LDACC` | data registers ← previous lane's stored result (lane 0: global word) |
| 13 | `SRCH` | SEARCH CODEBOOK: data ← codevector ROM[index]; inner product; DAU distortion with E = global word; compare |
| 14 | `FCB` | FILTER CODEBOOK: data ← ROM[codevector], coefficient ← row; DAU energy accumulate; energy → global at write pointer |
| 15 | `CLRMIN` | reset the DAU minimum |
| 16 | `SETWP` | write pointer ← field |
| 17 / 18 | `SETSH` / `SETDSH` | AAU / DAU shifter amount ← field (reset value 15) |
| 19 / 1A | `LDGM` / `LDGS` | DAU −2G / G² register ← global word |
| 1B | `OUTIDX` | send the index-save register |
| 1C / 1D | `RPT` / `RPTV` | REPEAT field / field × NAAU times |
| 1E / 1F | `EI` / `DI` | enable / disable the vector interrupt |
| 20 | `RETI` | return from interrupt |
| 40–43 | `JMP` | PC ← {opcode[1:0], field} (11-bit target) |

Any other opcode is an error, and an assertion reports it.

## Programming rules

Each rule follows from the pipeline table:

- **Local RAM write, then read.** A word written by `STD`/`STDC`, issued in
  cycle t, is read correctly from t+3 on. For `STA`/`STAC` it is t+4.
- **Global RAM write, then read.** A global word written by a store-stage
  instruction issued at t is read correctly from t+4 on. The energy of an `FCB`
  last row issued at t is ready from t+5 on.
- **Register chaining needs no spacing.** Loads feed the next instruction
  directly. For example, `LDDC` followed at once by `SOP` multiplies the freshly
  loaded values.
- **FILTER I/II chain back to back.** `FILT2` adds the sum of the instruction
  just before it.
- **Wait two cycles for a stored accumulator.** An instruction that reads the
  previous lane's stored accumulator (`LATB`, `LDACC`) sees the result of an
  instruction issued two cycles earlier. The lattice step is therefore
  `LATF, NOP, LATB, NOP, LDACC`.
- **Read the index late enough.** `OUTIDX` must come at least 5 cycles after the
  last `SRCH`.
- **Keep global writes apart.** A store-stage global write must not be issued in
  the cycle right after an `FCB` that finishes a codevector. Both would write
  global RAM in the same cycle.
- **Scaling.** With `SETSH s`, a product of two Qs numbers stored through the
  shifter is again Qs. The demonstration program uses Q12 throughout.

## Demonstration program

The real coder's program is not part of this design. `rtl/vxc_program.hex` holds
an 89-word program that exercises every datapath operation.

**Global RAM map** (word addresses):

| address | contents |
|---|---|
| 0x000–0x0FF | codevector energies |
| 0x100–0x103 | search target, lane j at 0x103−j |
| 0x104 / 0x105 | −2G / G² |
| 0x108–0x117 | 4 × 4 synthesis filter rows |
| 0x118–0x11B | FIR taps |
| 0x11C–0x11F | lattice coefficients, stored negated |
| 0x120–0x12F | FIR input |
| 0x130–0x133 | lattice input |
| 0x140 / 0x141 | sum of products / sum of squares |
| 0x150–0x15F | FIR output |
| 0x160–0x163 | lattice output |

**Main program** (word 2):

1. Set both shifters to 12.
2. Copy the filter rows, taps and lattice coefficients into the coefficient RAMs
   with `RPT 4; SHIN` sequences.
3. Enable the interrupt.
4. Run `RPTV 256; FCB`, which computes all 256 energies in 1024 cycles.
5. Spin on a jump.

**Interrupt routine** (word 32):

1. Load the gains and the target.
2. Run `CLRMIN; RPT 256; SRCH`, then `OUTIDX`.
3. Run a 4-tap FIR over 16 samples (`RPT 8; FILT1`, then `RPT 8; FILT2`).
4. Run one `STD`/`LDDC`/`SOP`/`SQR` sequence.
5. Run four samples of a 4-stage lattice.
6. Return.

In simulation, the index comes out 277 cycles after the interrupt edge, 256 of
them the search loop itself. The whole test, including one interrupt taken in the
middle of the codebook-filtering loop, takes 1799 cycles.

The hex file holds one program word per line in hexadecimal, `{opcode, field}`,
from address 0. Word 0 must jump to the main program and word 1 to the interrupt
routine.

## Codebook contents

A trained codebook is not included. Each codevector ROM is filled at elaboration
with a fixed pseudo-random Q12 codebook. Component `lane` of codevector `i` is
computed in 32-bit unsigned arithmetic:

```
h0 = i*2654435761 + lane*40503 + 40503
h1 = (h0 ^ (h0 >> 13)) * 1540483477
h2 = h1 ^ (h1 >> 15)
c  = signed(h2[15:0]) >>> 3
```

To use a real codebook, replace `cb_word()` in `codebook_rom.sv`, for example
with a case table.

## Sizing against LLD-VXC

| need (LLD-VXC, 4 AAUs) | built |
|---|---|
| codebook 256 × 4 = 1024 words | 4 ROMs × 256 |
| local RAM ≈ 580 words in total (filters, memories, past input, autocorrelation) | 4 lanes × (256 + 256) = 2048 |
| global RAM 256 energies + 12 temporaries | 512 |
| ≈ 1046 cycles per vector (search 256, codebook filtering 1024 / 12 vectors) | 1 instruction/cycle; search 256 and filtering 1024 cycles measured |

These configurations do not fit:

- **LD-CELP.** Its 5-sample vectors do not map onto 4 lanes; it would need
  `NAAU = 5`. Its Levinson–Durbin recursion needs division, which no unit
  provides.
- **VSELP.** It uses 40-sample vectors and needs square roots and reciprocals.

## Where this design goes beyond or departs from the architecture

These follow the architecture description:

- the AAU stages and sources;
- the DAU's two stages and energy mode;
- 16-bit words with 32-bit products and accumulators;
- separate data and coefficient RAMs per lane;
- the memory sizes: 256-word RAMs per lane, a 512-word global RAM, a 2K program ROM;
- the 7 + 9 bit program word;
- the REPEAT counter used as a memory index;
- the index-save register;
- the interrupt with a saved program counter.

These are this design's own choices:

- **Encodings and extra instructions.** All opcode values, and every instruction
  beyond the seven basic ones, are chosen here:
  - the lattice trio `LATF`/`LATB`/`LDACC`;
  - `RPTV`;
  - the write pointer;
  - shifter setting;
  - gain loading;
  - jumps.
- **Lattice filter.** The lattice is mapped onto two extra paths: the
  accumulator chain into the data registers, and the global sample into lane 0's
  adder. Only the computation was specified, not these paths.
- **Saved state on interrupt.** The loop counter, loop index and write pointer
  are saved with the PC.
- **Pipeline detail.** The exact cycle of every control point, and the absence
  of interlocks.
- **DAU details.** The DAU scale registers and their reset values, and its
  separate energy accumulator.
- **Host port.** The host write port into global RAM; how samples reach the chip
  was not given.
- **Memory ports.** RAM port structure and read-during-write behaviour.
- **Codebook.** The pseudo-random codebook.

Not built:

- the LLD-VXC program itself (adaptation, pitch, update routines);
- the I/O pads.

The fixed-point behaviour of a full coder on this datapath has not been evaluated.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against a model
written from the arithmetic, not from the RTL, and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_aau` | random operands through every source, adder input and shift; multiply-square; accumulator hold |
| `tb_dau` | random searches against a running-minimum model, with loaded gain registers; energy sums over rows; the shifter |
| `tb_instr_decode` | every opcode's control word; illegal opcodes |
| `tb_control_unit` | REPEAT/RPTV counts and indexed addresses; FCB row/codevector split; each stage's timing; the write pointer; index save; an interrupt in a 100-issue loop resuming with every index issued once |
| `tb_sync_ram` | random reads and writes, including read-during-write |
| `tb_codebook_rom` | every word against the formula, for two lanes |
| `tb_program_rom` | the assembled program words |
| `tb_vxc_top` | the demonstration program at full size (4 lanes, 256 codevectors), end to end |

`tb_vxc_top` checks the following against a bit-exact model:

- all 256 energies;
- both transmitted indices;
- the FIR, the sum of products and sum of squares, and the lattice outputs.

It also counts how often each mechanism happened and fails if any never did:

- interrupt taken inside a REPEAT loop;
- `RETI`;
- new minimum;
- each filter and lattice instruction;
- STORE DATA;
- host stall.

## Simulating

Verilator 5 with `--timing`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vxc_pkg.sv tb/tb_vxc_top.sv \
    --top-module tb_vxc_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_vxc_top` with any other testbench name. Run from the directory that
holds `rtl/`, because the program ROM reads `rtl/vxc_program.hex` by that relative
path (parameter `PROG_FILE`).

Parameters on `vxc_top`:

- `NAAU`: lanes, a power of two for `FCB` addressing.
- `LRAM_DEPTH`, `GRAM_DEPTH`, `CB_DEPTH`, `PROG_DEPTH`.
- `PROG_FILE`.

Widths are in `vxc_pkg.sv`.
