# Klessydra T1: a multi-threaded RISC-V core with a configurable vector co-processor

This is a small RV32I processor for edge devices that run convolutional neural
networks such as VGG-16. It uses two ideas.

1. **Interleaved multi-threading.** Three hardware threads (*harts*) share one
   four-stage pipeline, and each cycle a different hart is fetched. Two
   instructions of the same hart are never in the pipeline together, so the
   core needs no forwarding, no interlocks and no branch prediction.
2. **A vector co-processor tied to the threads.** The co-processor works
   directly on vectors held in local scratchpad memories (SPMs), not in a
   vector register file. It is sized by three numbers:
   - **M**, how many scratchpad interfaces there are;
   - **F**, how many vector functional units there are;
   - **D**, how many lanes each unit has.

   Different choices of M, F and D trade area against data-level parallelism
   (SIMD, more lanes) and thread-level parallelism (MIMD, more units).

The default build is the configuration that gives the best total VGG-16
time: 3 harts, M = 3, F = 3, D = 4. Every hart has its own scratchpads and
its own four-lane unit.

```
            +------------------------- klessydra_t1_core ---------------------------+
 prog_mem ->| Fetch -> Decode -> Execute ------------------------> Write-back      |
 (32 KB)    |  (PC per hart)  (3 reg.    | ALU / branch / CSR        (reg. file)    |
            |   pc_unit        read ports)| LSU  <-> data_mem (1 MB) + SPMIs        |
            |                             | MFU x F  <->  SPMI x M (N SPMs x D banks)|
            +----------------------------------------------------------------------+
```

## The interleaved pipeline

- **Fetch.** `pc_unit` keeps one PC per hart and a rotating pointer. Each
  cycle it fetches for the next hart: 0, 1, 2, 0, 1, 2, and so on.
- **Decode.** `decoder` decodes the instruction and `regfile` reads the
  hart's own registers. The register file has three read ports, because a
  vector instruction needs the values of rs1, rs2 *and* rd: rd holds the
  destination address in the scratchpad.
- **Execute.** The `alu` handles integer and branch work. `csr_file` handles
  CSR accesses. Memory and vector instructions are handed to the `lsu` or to
  an `mfu`.
- **Write-back.** Results are written to the register file. Loads are
  aligned and sign- or zero-extended here.

A hart's next PC is decided by its own instruction in Execute. With H = 3 that
happens before the hart's next fetch slot, so a taken branch costs nothing.
H is therefore limited to 3 or 4 (an assertion checks this).

**Self-referencing jump.** Vector instructions take many cycles. Suppose an
instruction reaches Execute but the unit it needs is busy: its hart's MFU,
or the LSU running a burst. The pipeline is not stalled. Instead the
instruction is dropped and its hart's PC is set back to the instruction
itself, so it is fetched again on the hart's next turn, three cycles later.
The other harts are not held up.

Scalar instructions of a hart keep executing while that hart's MFU or the LSU
works in the background. This is possible because vector instructions write
only the scratchpads, never the register file.

## The co-processor

### MFU (multi-purpose functional unit)

`mfu` runs one vector instruction at a time, with D lanes (`mfu_lane`). Each
lane has adder, shifter, multiplier, comparator and accumulator logic. The
instruction goes through these phases:

- **PEND:** checks the addresses and waits while the contention handler
  halts it.
- **SCAL:** two extra cycles that fetch the scalar from the SPM, for the
  scalar-in-SPM forms.
- **RUN:** a loop that requests D words per cycle and computes and writes the
  group requested one cycle earlier. A write mask covers a partial last
  group.
- **FIN:** reductions write their single result word here.

An n-word vector keeps the MFU busy for about ceil(n/D) + 3 cycles. The
scalar-in-SPM forms take 2 cycles more and reductions 1 more.

### SPMI (scratchpad memory interface)

`spmi` holds N SPMs (spmA..spmD by default), each of SPM_BYTES (16 KB by
default). Every SPM is split into D word-interleaved banks (`spm_bank`): word
w lives in bank w mod D, at row w div D. Any D consecutive words therefore
sit in D different banks, and one cycle reads a whole lane group starting at
any word. A rotator then puts the bank outputs into lane order.

The SPMI has these ports:

- **MFU side:** two D-word read ports and one D-word write port.
- **LSU side:** a 32-bit read port and a 32-bit write port.

Every bank has two read ports, so the two vector operands may lie in the same
SPM.

### LSU (load-store unit)

`lsu` does two jobs:

- **Scalar accesses:** byte, half-word and word loads and stores to the data
  memory, one cycle each.
- **Bursts:** `kmemld` and `kmemstr` copy data between the data memory and an
  SPM at one 32-bit word per cycle. A burst of n words takes n + 2 cycles.

There is one LSU for all harts.

### Contention between the LSU and an MFU

The LSU and an MFU may work on the same SPMI at the same time, but never on
the same SPM. The rules are:

1. When a unit's instruction is ready, it declares the set of SPMs the
   instruction uses.
2. It may start only when none of them is held by the other unit's running
   instruction. Otherwise the handler raises *Halt LSU* or *Halt MFU* and the
   unit waits.
3. If both units would start on a shared SPM in the same cycle, the LSU goes
   first.
4. A unit holds its SPMs until its instruction is finished.

Because of these rules, a `kmemld` followed by a vector operation on the
loaded data works without any software synchronisation. So does a vector
operation followed by a `kmemstr` of its result. Assertions in `spmi` check
that the two units never use one SPM in the same cycle.

### Sharing schemes

Hart h uses SPMI (h mod M) and MFU (h mod F). Allowed settings are F = M or
F = 1, with M ≤ H:

| M | F | D | scheme |
|---|---|---|--------|
| 1 | 1 | 1 | one shared co-processor, scalar lanes (SISD) |
| 1 | 1 | 2, 4, 8 | one shared co-processor (pure SIMD) |
| 3 | 3 | 1 | a co-processor per hart (symmetric MIMD) |
| 3 | 3 | 2, 4, 8 | a co-processor per hart (MIMD + SIMD), **default with D = 4** |
| 3 | 1 | 1, 2, 4, 8 | SPMs per hart, one shared MFU (heterogeneous MIMD) |

With a shared MFU, a hart that finds the MFU busy replays its instruction
(self-referencing jump) until the MFU is free.

With one shared SPMI, all harts see the same SPM address range. Software then
splits the scratchpads between the harts.

D must be a power of two that divides the number of words in an SPM.

## Programming model

### Memory map

| Address | Size | Content |
|---|---|---|
| `0x0000_0000` | 32 KB | program memory; every hart starts at `0x0000_0080` |
| `0x0010_0000` | 1 MB | data memory, one-cycle latency |
| `0x0100_0000` + k·SPM_BYTES | SPM_BYTES | SPM k of the hart's SPMI (spmA = k 0 … spmD = k 3) |

Harts tell themselves apart by reading MHARTID and branching to their own
code.

### CSRs

| Name | Address | Meaning |
|---|---|---|
| MVSIZE | `0xBF0` | vector length in **bytes**, per hart (reset 0) |
| MVTYPE | `0xBF8` | element width: 0 = 8, 1 = 16, 2 (or 3) = 32 bits, per hart (reset 2) |
| MPSCLFAC | `0xBE0` | post-scaling right shift used by `kdotpps`, per hart |
| MHARTID | `0xF14` | hart number |
| MCYCLE | `0xB00` | cycle counter |

CSRRW, CSRRS and CSRRC are supported, with both register and immediate
forms.

### Vector and scratchpad instructions

Every instruction in this group has the same encoding:

- R-type, opcode `0101011` (RISC-V *custom-1*), funct3 = 0;
- funct7 selects the operation, as shown in the table.

`(r)` means "the address held in register r". Apart from `kmemld` and
`kmemstr`, every address must lie in the SPM section.

- **Vector length:** vector operations act on MVSIZE/4 words.
- **Element width:** MVTYPE selects 8-, 16- or 32-bit elements. Narrow
  elements are packed little-endian in the 32-bit words, and each lane
  processes 4 bytes or 2 half-words per cycle. No carries cross element
  boundaries.
- **Destination:** the result goes to the SPM at `(rd)`.
- **Products:** products keep the low bits of the element width.
- **Comparisons:** they are signed and write 1 or 0 per element.
- **Reductions:** `kvred`, `kdotp` and `kdotpps` add sign-extended elements
  or full element products in 32 bits, whatever the width.
- **Scalars:** the scalar forms use the low bits of the scalar, at the
  element width. For `ksvaddsc`/`ksvmulsc` the scalar is the element at
  byte address (rs2). Shift amounts are always rs2[4:0].

| funct7 | mnemonic | operation |
|---|---|---|
| 1 | `kmemld (rd),(rs1),rs2` | copy rs2 bytes from main memory (rs1) to SPM (rd) |
| 2 | `kmemstr (rd),(rs1),rs2` | copy rs2 bytes from SPM (rs1) to main memory (rd) |
| 3 | `kaddv (rd),(rs1),(rs2)` | vd = v1 + v2 |
| 4 | `ksubv (rd),(rs1),(rs2)` | vd = v1 − v2 |
| 5 | `kvmul (rd),(rs1),(rs2)` | vd = v1 · v2 |
| 6 | `kvred (rd),(rs1)` | one word at (rd) = Σ v1 |
| 7 | `kdotp (rd),(rs1),(rs2)` | one word at (rd) = Σ v1·v2 |
| 8 | `ksvaddsc (rd),(rs1),(rs2)` | vd = v1 + scalar word at (rs2) |
| 9 | `ksvaddrf (rd),(rs1),rs2` | vd = v1 + register rs2 |
| 10 | `ksvmulsc (rd),(rs1),(rs2)` | vd = v1 · scalar word at (rs2) |
| 11 | `ksvmulrf (rd),(rs1),rs2` | vd = v1 · register rs2 |
| 12 | `kdotpps (rd),(rs1),(rs2)` | one word at (rd) = Σ (v1·v2 >>> MPSCLFAC) |
| 13 | `ksrlv (rd),(rs1),rs2` | vd = v1 >> rs2 (logical) |
| 14 | `ksrav (rd),(rs1),rs2` | vd = v1 >>> rs2 (arithmetic) |
| 15 | `krelu (rd),(rs1)` | vd = max(v1, 0) |
| 16 | `kvslt (rd),(rs1),(rs2)` | vd = (v1 < v2) |
| 17 | `ksvslt (rd),(rs1),rs2` | vd = (v1 < register rs2) |
| 18 | `kvcp (rd),(rs1)` | vd = v1 |
| 19 | `kbcst (rd),rs1` | vd = register rs1 in every element (used to clear SPM regions) |

Two kinds of instruction are dropped without effect, and the core's
`stat_exc` output pulses for one cycle:

- a vector instruction whose SPM address lies outside the SPM section;
- a `kmemld` or `kmemstr` whose SPM-side address lies outside that section.

An unknown opcode executes as a no-op. There is no trap mechanism.

### A CNN layer with these instructions

A 3×3 convolution of an R×R feature map runs in five steps:

1. Clear a (R+2)² region of spmA with `kbcst`.
2. Copy the R rows into it with `kmemld`, leaving a zero border. This is the
   padding.
3. Load the 9 kernel weights into spmB and pre-scale both with `ksrav`.
4. For every output row and every kernel tap, do three operations:
   `ksvmulsc` multiplies the shifted input row by the tap weight into spmD,
   `ksrav` post-scales it, and `kaddv` adds it into the output row in spmC.
5. Add the bias with `ksvaddsc`, apply `krelu`, and write the map back with
   `kmemstr`.

A fully connected layer needs three things:

- `kmemld` to load the input vector once;
- `kmemld` to load one weight row per output, followed by one `kdotpps`;
- `kaddv`, `krelu` and `kmemstr` at the end.

Max pooling and softmax run as ordinary scalar code. `tb/tb_vgg_layers.sv`
runs exactly these sequences.

## Files

| File | Content |
|---|---|
| `rtl/klessydra_pkg.sv` | memory map, opcodes, CSR numbers, operation codes, decoded-instruction and vector-command structs |
| `rtl/pc_unit.sv` | per-hart PCs and the round-robin fetch pointer |
| `rtl/regfile.sv` | H × 32 registers, three read ports, one write port |
| `rtl/decoder.sv` | RV32I, CSR and custom-instruction decoder |
| `rtl/alu.sv` | integer ALU and branch comparator |
| `rtl/csr_file.sv` | per-hart MVSIZE/MVTYPE/MPSCLFAC, MHARTID, MCYCLE |
| `rtl/lsu.sv` | scalar accesses and SPM bursts |
| `rtl/mfu.sv`, `rtl/mfu_lane.sv` | vector unit and its lane |
| `rtl/spmi.sv`, `rtl/spm_bank.sv` | scratchpads, bank interleave, rotation, contention handler |
| `rtl/klessydra_t1_core.sv` | the pipeline, self-referencing jump and co-processor crossbar |
| `rtl/prog_mem.sv`, `rtl/data_mem.sv` | 32 KB program memory and 1 MB data memory (one-cycle, with a load port / second port for the testbench) |
| `rtl/klessydra_t1_top.sv` | core plus memories; top level |

The top exposes these ports:

- `pload_*`: writes program words while `fetch_en_i` is low.
- `bk_*`: a second data-memory port, used to place inputs and read results.
- `stat_*`: per-cycle event flags (commit, replay, halt, unit activity,
  exception).

## Simulation

Each testbench prints `TB_RESULT checks=… failures=…`. Build and run one
with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/klessydra_pkg.sv tb/kasm_pkg.sv tb/tb_klessydra_t1_top.sv \
    --top-module tb_klessydra_t1_top
./obj_dir/Vtb_klessydra_t1_top
```

`tb/kasm_pkg.sv` is a tiny assembler. It is a set of encoder functions that
the system-level testbenches use to build their programs.

| Testbench | What it checks |
|---|---|
| `tb_pc_unit`, `tb_regfile`, `tb_decoder`, `tb_alu`, `tb_csr_file` | pipeline pieces, against independent models |
| `tb_prog_mem`, `tb_data_mem` | memories, byte enables, both ports |
| `tb_spmi` | interleave and rotation at every start offset, masks, halt rules, the LSU-first tie |
| `tb_mfu` | all operations on random lengths, element widths and SPMs against a reference, cycle counts, halt, exception |
| `tb_lsu` | scalar accesses, bursts, the one-word-per-cycle rate, halt, exception |
| `tb_klessydra_t1_core` | the same three-hart program in the five configurations M1F1D1, M1F1D2, M3F3D1, M3F1D1 and M3F1D8 |
| `tb_klessydra_t1_top` | end-to-end run at the default parameters (see below) |
| `tb_vgg_layers` | VGG-16 layer kernels at the default parameters (see below) |

### End-to-end test

`tb_klessydra_t1_top` runs all three harts at once. Each hart performs this
work:

- an 8×8 convolution;
- all 19 vector instructions, plus an add and a dot product on 8-bit elements;
- an SPM address exception;
- a scalar loop, plus byte and half-word accesses.

The test checks every result word. It also counts the core's events, and
fails if any of them never happened:

- self-referencing jumps on a busy MFU and on a busy LSU;
- Halt MFU and Halt LSU;
- several MFUs active at once;
- scalar instructions committed while the LSU, the MFU or both work.

### VGG-16 layer test

`tb_vgg_layers` runs a different layer on each hart, all at the default
parameters:

| Hart | Layer |
|---|---|
| 0 | a 32×32 convolution with two input channels |
| 1 | a 512-input, 16-output fully connected layer |
| 2 | 32×32 → 16×16 max pooling in scalar code |

All three finish in about 29,000 cycles.

## How far the design reaches

Sizes at the defaults (16 KB per SPM, 1 MB data memory):

- **Convolutions:** a padded 32×32 map (34² words, 4,624 B) fits easily
  in one SPM.
- **Fully connected layers:** the 4,096-element vectors of the largest layers
  fill one SPM exactly.
- **Activations:** these fit in the 1 MB data memory.
- **Weights:** they do not fit. A 4096×4096 layer alone is 64 MB. In the
  platform this core was made for, the weights sit in a large external flash
  behind an SPI controller. That flash and its controller are not part of
  this RTL. Only layers whose weights fit beside their feature maps in 1 MB
  (the 32×32 and 16×16 convolutions) can run from the data memory alone.

## Departures and limitations

- **Element width.** How 8- and 16-bit elements are laid out and reduced
  (packed little-endian, reductions in 32 bits) is this design's choice.
  MVSIZE must be a multiple of 4 bytes for every width.
- **Shared MFU (F = 1, M = 3).** A busy MFU is taken as a whole. The original
  scheme lets harts use different free internal units of the shared MFU
  (adder, multiplier, …) at the same time. Here whole instructions are
  serialised.
- **Reductions.** `kvred`, `kdotp` and `kdotpps` write their result as one
  word in the scratchpad at (rd), not into a register. This keeps the rule
  that the co-processor never writes the register file.
- **Choices of this design, not taken from a specification:**
  - the custom instruction encoding and the funct7 values;
  - the CSR addresses;
  - MVSIZE counted in bytes;
  - the reset PC `0x80`;
  - the MFU and LSU pipeline timing;
  - contention checked per instruction, with the LSU first on a tie;
  - two read ports per SPM bank;
  - the hart-to-unit mapping h mod M, h mod F.
- **ISA.** The base ISA is RV32I with the Zicsr instructions. These are not
  implemented: multiply/divide (M), atomics, ECALL/EBREAK, interrupts and
  traps. FENCE is a no-op.
- **Platform.** These parts of the surrounding microcontroller platform are
  not included: the debug unit, peripherals (UART, SPI, GPIO, timers),
  interrupt logic, boot ROM and external flash. The memories have simple
  load ports instead.
- **Burst transfers.** `kmemld`/`kmemstr` lengths are rounded down to whole
  words, and their addresses must be word aligned.
