# KASUMI hardware for UMTS security: four cipher cores and a MIPS instruction-set extension

UMTS protects user data with two algorithms, f8 (confidentiality, a keystream generator) and
f9 (integrity, a 32-bit MAC). Both are built around KASUMI: a 64-bit block cipher with a
128-bit key and eight Feistel rounds. This repository holds SystemVerilog RTL for two ways of
putting KASUMI into hardware.

* **Stand-alone cipher cores.** There are four of them, trading area against speed. All are built
  from the same small set of parts: a *dual-port FI unit* and a *two-round datapath* that
  computes an odd/even pair of rounds in four pipeline steps.
* **An extended MIPS processor.** A five-stage MIPS pipeline gets a KASUMI functional unit and four
  new instructions. f8 and f9 then stay in software, which handles all the bit-string and
  counter bookkeeping. Only the cipher itself is done in hardware: one `k2rnd` instruction
  does two rounds, so one block takes four of them.

All five designs are instantiated side by side in `umts_sec_top`. They share only the clock and
reset.

| design | module | cycles per block | blocks in flight | key input |
|---|---|---|---|---|
| reuse-based 1 | `kasumi_reuse1` | 16 | 1 | 128-bit key with each block |
| reuse-based 2 | `kasumi_reuse2` | 12 | 1 | 128-bit key with each block |
| reuse-based 3 | `kasumi_reuse3` | 16 | 1 | preloaded in 16 cycles, once per key |
| pipelined | `kasumi_pipelined` | 1 (latency 16) | 16 | 128-bit key with each block |
| extended processor | `myrisc_kasumi_core` | 16 (four `k2rnd`) | 1 | `kxor1` writes it into the extended registers |

For comparison, the original FPGA implementations (Virtex-E class) reported these results:

* Design 1: 488 slices at 41.14 MHz.
* Design 2: 566 slices at 41.63 MHz.
* Design 3: 79.45 MHz.
* Pipelined: 83.14 MHz, which is 5.3 Gbit/s.

None of these numbers has been re-measured with this RTL.

## The cipher in brief

Each round takes a 64-bit state L||R and computes L' = R ^ f(L), R' = L. Odd rounds use
f = FO(FL(x)) and even rounds use f = FL(FO(x)).

* **FL** is cheap: AND, OR and one-bit rotations, under the subkeys KL1 and KL2.
* **FO** is a three-stage Feistel network on 32 bits. Each stage calls FI with a 16-bit subkey
  from KO and KI.
* **FI** is a 16-bit function. It runs a 9-bit S-box S9 and a 7-bit S-box S7 twice, with a
  subkey XOR between the two layers.

The round keys of round i come from the key words K1..K8 and the constants C1..C8, shifted i
positions. Ki' means Ki ^ Ci, and `<<<` is a left rotation.

| round key | value |
|---|---|
| KL1 | K1 <<< 1 |
| KL2 | K3' |
| KO1 | K2 <<< 5 |
| KO2 | K6 <<< 8 |
| KO3 | K7 <<< 13 |
| KI1 | K5' |
| KI2 | K4' |
| KI3 | K8' |

Moving on one round is therefore just a one-word rotation of both arrays. Every key scheduler
in this design relies on that.

The functions live in `rtl/kasumi_pkg.sv`. The S-box contents are in `rtl/kasumi_s9.hex` and
`rtl/kasumi_s7.hex` and are the tables of the KASUMI specification. They are the only part not
computed by formula. The conformance vectors that every testbench checks would catch an error
in them.

## Dual-port FI unit (`kasumi_dpfi`, `kasumi_sbox_rom`)

The S-boxes are synchronous ROMs, meant for FPGA block RAM. A naive FI built from them would
take two cycles, one per S-box layer. The unit instead clocks the **first layer on the falling
edge** and the **second layer on the rising edge**, so an FI result is ready one full cycle
after its input.

Timing:

* Inputs change after a rising edge.
* The first-layer ROMs and their companion registers sample at the falling edge.
* The second-layer ROMs and their registers sample at the next rising edge.
* The result is combinational after that edge.

Each ROM has two read ports, so one unit computes **two independent FI functions per cycle**
(ports a and b). Every core below is organised around keeping both ports busy.

A caller must register anything that has to line up with the FI result in the same way:
sample on the falling edge, then on the rising edge.

## Two rounds in four steps (`kasumi_2round`)

This is the core idea of the design, and the part that takes most effort to follow.

An odd/even round pair holds six FI calls, three in each FO. Write the two FO functions in
terms of 16-bit halves and follow the data dependences. The six calls can then be grouped into
three pairs. The two calls of each pair do not depend on each other:

| step | work | dual-port FI inputs |
|---|---|---|
| K1 | FL of the odd round; first FI pair | FO1.FI1, FO1.FI2 |
| K2 | second FI pair | FO1.FI3, FO2.FI1 |
| K3 | third FI pair | FO2.FI2, FO2.FI3 |
| K4 | FL of the even round | none |

In K4 the module gives L2 = L0 ^ FL(...) and R2 = L1.

FO2.FI1 can start before FO1 has finished. This works because the even round's FO input is L1
= R0 ^ FO1(...), and its upper half is complete as soon as FO1.FI2 is done. The module header
gives the exact equations.

* **Units and registers.** Three dual-port FI units are used, one per pair. The values that ride
  alongside go through falling-edge and then rising-edge registers, to stay level with the FI
  results.
* **Output timing.** A block entering at K1 has its result combinationally during K4, four cycles
  later. The caller registers it.
* **Round keys.** Each key field is read in exactly one step:
  * K1 reads the odd round's KL, KO1, KO2, KI1 and KI2.
  * K2 reads the odd round's KO3 and KI3, plus the even round's KO1 and KI1.
  * K3 reads the even round's KO2, KO3, KI2 and KI3.
  * K4 reads the even round's KL.

  A scheduler therefore only needs to hold each field for the step that reads it.

## Key schedulers

* **`kasumi_roundkeys`.** Combinational. It gives the round keys of one round from the key and
  constant arrays, together with both arrays rotated one word. Feeding the rotated arrays back
  through registers makes an iterative scheduler. Chaining two of them gives two rounds.
* **`kasumi_keysched_pipe`.** Used by the pipelined core, one per two-round section. The arrays
  travel down a four-register pipeline beside the data. Each step computes only the fields
  that step consumes (see the list above). The arrays leave rotated by two words, ready for the
  next section. Blocks under different keys can therefore follow each other on consecutive
  cycles.
* **`kasumi_keysched_shift`.** Used by reuse-based design 3. Two rotate registers hold the key
  and the constants.
  * Preload takes 16 cycles: one 16-bit word per cycle on `load_word`, K1..K8 first, then
    C1..C8.
  * During ciphering both arrays advance one word every second cycle.
  * The original design clocks this scheduler from a divide-by-two clock. Here it runs on the
    main clock with an enable, which gives the same register contents.

## The stand-alone cores

All four cores use an asynchronous active-low reset for their control state.

Design 1, design 2 and the pipelined core take `in_block` and `in_key` with `start` or
`in_valid`. Design 3 takes its key from the preloaded scheduler.

For the iterative cores, latency is counted in rising edges. Take a start seen at edge 0. After
edge N (16, or 12 for design 2), `done` is high for one cycle and `out_block` is valid. The
output then holds until the next result.

A new `start` may be given in the last cycle of the running block, so blocks can run back to
back with no gap.

### `kasumi_reuse1`: one round per two cycles

This design uses one dual-port FI unit.

* **Phase 0** issues FI1 and FI2 of the round's FO. For an odd round this comes after its FL.
* **Phase 1** issues FI3 on port a. Port b is idle.

FI3's result arrives at the start of the next phase 0. There the round is finished
combinationally: the FL of an even round, then the XOR and swap. The result goes straight into
the next round. In the last round it goes to the output register.

The key arrays advance once per round. The KL subkeys of an even round are kept one extra cycle
for that finishing FL.

### `kasumi_reuse2`: two rounds per three cycles

This design also uses one dual-port FI unit. It issues the six FI calls of a round pair in the
three-pair order of the table above, one pair per cycle. A pair of rounds therefore takes three
cycles, and a block takes 12.

Two chained `kasumi_roundkeys` give the keys of both rounds. The arrays advance by two words
every third cycle. The original design uses a divide-by-three clock for this; here it is an
enable.

### `kasumi_reuse3`: the four-step datapath, reused

One `kasumi_2round` is used four times. Multiplexers at L0/R0 choose between a new block and
the fed-back halves.

A block enters every fourth cycle, and four passes make 16 cycles. The key comes from
`kasumi_keysched_shift`. Preload it before the first block and again whenever the key changes.
`start` is ignored while `load_en` is high.

### `kasumi_pipelined`: one block per cycle

This design chains four `kasumi_2round` sections, each with its own `kasumi_keysched_pipe`. The
half-blocks are registered between sections. It takes a block on every cycle with
`in_valid`, each with its own key, and gives `out_valid` and `out_block` 16 edges later. The
number of sections is the parameter `SECTIONS` (default 4, which is eight rounds).

## The extended processor (`myrisc_kasumi_core`)

### Integer pipeline

A classic five-stage in-order MIPS pipeline (IF, ID, EX, MEM, WB) running the R2000 user-mode
integer instructions.

* **Instructions:**
  * register ALU operations: addu, subu, and, or, xor, nor, slt and sltu;
  * sll, srl and sra, and the variable forms sllv, srlv and srav;
  * the immediate forms, and lui;
  * lb, lbu, lh, lhu, lw, sb, sh and sw, big-endian;
  * beq, bne, blez, bgtz, bltz, bgez, bltzal and bgezal;
  * j, jal, jr and jalr;
  * mult, multu, div and divu, with mfhi, mflo, mthi and mtlo.
* **Forwarding** from MEM and WB into EX.
* **Load-use stall** of one cycle.
* **Branches and jumps** resolve in EX. They are predicted not taken and flush two
  instructions. There is no delay slot, so a link register receives the address of the next
  instruction.
* **Multiply and divide** run in `myrisc_muldiv`, one bit per cycle plus a sign cycle: 33
  cycles. An instruction that uses HI, LO or the unit waits in ID while the unit is busy.
* **Memories:** instruction and data memories of 1024 words each (parameters `IMEM_WORDS` and
  `DMEM_WORDS`).
* **Program loading** goes through `imem_we`, `imem_addr` and `imem_wdata` while the core is in
  reset.
* **Observation** is through `dbg_reg_addr`/`dbg_reg_data`, `kregs` and `pc`. The `ev` struct
  gives one-cycle flags for every pipeline mechanism below, for testbenches and performance
  counting.

### Extended register file (`kasumi_regfile`)

There are ten 32-bit registers.

| register | contents |
|---|---|
| k0, k1 | the block: upper half in k0, lower half in k1. It goes in as plaintext and comes back as ciphertext. |
| k2..k5 | the key, K1‖K2 in k2 through K7‖K8 in k5 |
| k6..k9 | the constants, written by reset and read-only |

**Rotation.** When a `k2rnd` reaches step K3, both the key array and the constant array rotate
"upwards" by one register: k2 takes k3, k3 takes k4, k4 takes k5, and k5 takes k2. The same
happens in k6..k9. This is a two-word shift, which is exactly what the next round pair needs.
After four `k2rnd` both arrays are back where they started, so the next block can use the same
key without reloading it.

**Write rules.** The only write allowed in the same cycle as a rotation is the parallel write of
the result block into k0/k1. Assertions flag a program that breaks this rule.

### Forwarding and key generation (`kasumi_fwd`, `kasumi_keygen`)

Both sit in ID.

The forwarding unit gives the newest value of k0..k5. It takes values from pending
`kxor1`/`kxor2` writes in EX, MEM and WB, and the block from a `k2rnd` in K4 or in its MEM step.
The priority is EX, then MEM, then WB, then K4, then MEM of the unit, then the register file.

The key generation unit turns the forwarded key and the stored constants into the round keys of
two rounds. The block and both key sets are captured in a decode/execute register of the unit.

### Instructions

| instruction | encoding | effect |
|---|---|---|
| `kxor1 KRd, Rs, Rt` | R-type, funct 0x0A | KRd ← Rs ^ Rt, written in WB |
| `kxor2 KRd, Rs, KRt` | R-type, funct 0x0B | KRd ← Rs ^ KRt |
| `kxor3 Rd, Rs, KRt` | R-type, funct 0x32 | Rd ← Rs ^ KRt (integer destination) |
| `k2rnd` | opcode 0x2C, word 0xB0000000 | two KASUMI rounds on k0/k1 under the current key position |

`KRd` and `KRt` are the low four bits of the rd and rt fields. With `kxor1` and `kxor2`, loading
a block and a key takes six instructions, and four `k2rnd` then encrypt it. `kxor2` and `kxor3`
make the XOR chaining of f8 and f9 cheap.

### Timing and hazards

* **k2rnd issue.** A `k2rnd` leaves ID only when K1, K2 and K3 are empty. Otherwise it waits
  there. It takes the new block from the K4 bypass while its predecessor is in K4, and it
  enters K1 as the predecessor moves on to MEM. Consecutive `k2rnd` instructions therefore
  issue every four cycles, and the datapath never holds two of them. One KASUMI block takes
  16 cycles. Loading the block and key with six `kxor1` and running the block takes 26 cycles,
  from fetch of the first `kxor1` to the write-back of the fourth `k2rnd`.
* **Overlap with integer work.** When a `k2rnd` enters K1, the integer EX stage gets a bubble.
  Integer instructions behind it overlap with K2..K4.
* **True hazards.** A `k2rnd` right after the `kxor1`s that load its key reads the key through
  forwarding; there is no stall.
* **False hazards.** KASUMI register numbers are compared only with KASUMI destinations. An
  integer instruction that reads `$5` right after a `kxor1 k5, ...` neither stalls nor picks up
  the k5 value.
* **Reading the result.** The new block is in k0/k1 three cycles after the last `k2rnd` issues.
  A `kxor2`/`kxor3` that reads k0/k1 must therefore be at least three instructions after the
  last `k2rnd` of a block.
* **Writes to the key.** The key registers rotate at K3. A `kxor` that changes the key must not
  write in the same cycle as that rotation.

## Top level (`umts_sec_top`)

The top holds the processor and the four cores, with the ports of each brought out under a
prefix:

* `r1_`: reuse-based design 1.
* `r2_`: reuse-based design 2.
* `r3_`: reuse-based design 3.
* `p_`: the pipelined core.
* The processor's own ports, plus `cpu_rst_n`, a processor-only reset that holds the processor
  while its program is loaded.

## Verification

Every testbench is self-checking. It ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog that counts a failure if the run hangs. The expected values come from:

* `tb/kasumi_ref_pkg.sv`, a straightforward software model of KASUMI;
* the f8/f9 conformance vectors.

| testbench | what it checks |
|---|---|
| `tb_kasumi_sbox_rom` | every entry on both ports; both edge variants |
| `tb_kasumi_dpfi` | 300 random FI pairs; one-cycle latency |
| `tb_kasumi_roundkeys`, `tb_kasumi_keygen` | round keys of all eight rounds for 20 keys |
| `tb_kasumi_2round` | pipelined and iterative use against the reference rounds |
| `tb_kasumi_reuse1`, `tb_kasumi_reuse2`, `tb_kasumi_reuse3` | known answers, random blocks, back-to-back starts, exact latency 16, 12 and 16, output hold |
| `tb_kasumi_pipelined` | known answers and 60 random blocks with a new key every cycle; latency 16; one result per cycle |
| `tb_kasumi_regfile`, `tb_kasumi_fwd` | reset contents, writes, rotation, block write; forwarding priority against a shadow model |
| `tb_myrisc_muldiv` | corner operands and 6000 random mult/multu/div/divu against SystemVerilog arithmetic; 33 busy cycles; mthi/mtlo |
| `tb_myrisc_kasumi_core` | f8 Test Set 3 (three blocks) and f9 Test Set 1 (five blocks, MAC-I F63BD72C) as programs; the 26-cycle and 16-cycle figures; an integer loop with store, load and load-use stall; a program using every other integer instruction; every pipeline event at least once |
| `tb_umts_sec_top` | the whole top at default parameters: f8, then f9, then the integer program on the processor, while all four cores cipher known-answer and random blocks; 20 mechanisms counted, each must occur |

The programs are built by a small assembler in `tb/myrisc_asm_pkg.sv`.

* The f8 program follows the original instruction sequence for the extended processor.
* The f9 program is written for this repository. It loads the 189-bit message in six words and
  pads it.

Run a testbench with Verilator 5 from the repository root. The S-box files are read by paths
relative to that root.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/kasumi_pkg.sv rtl/myrisc_pkg.sv tb/kasumi_ref_pkg.sv tb/myrisc_asm_pkg.sv \
  tb/tb_umts_sec_top.sv --top-module tb_umts_sec_top -o sim
./obj_dir/sim
```

Replace the last file and the top module to run another testbench. Leave out the packages it
does not import. Every testbench takes seconds.

## Departures from the original design and limits

* **Integer core.** The original extends an existing open-source R2000 core. That core is not
  reproduced here. The integer pipeline written in its place runs the instructions listed
  above. It has no branch delay slot, no exceptions or interrupts, no coprocessor 0, no
  syscall/break, and no unaligned lwl/lwr/swl/swr. The KASUMI unit and its pipeline behaviour
  follow the original.
* **Divided clocks.** The original's divide-by-two and divide-by-three clocks for the key
  schedulers are clock enables here.
* **Undocumented interfaces.** The handshakes of the stand-alone cores are not given in the
  original and are chosen here: start/done with back-to-back start, and in_valid/out_valid
  with a key per block. So are the preload port of design 3 and the memory sizes.
* **Memory mapping.** The S-box ROMs are written as arrays with registered reads. Whether they
  map to block RAM depends on the synthesis tool; with a generic flow they become registers
  and logic.
* **Speed and area.** Clock frequency and area have not been measured against the original
  FPGA figures.
