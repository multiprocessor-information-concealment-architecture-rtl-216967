# MUTE: a dual-core processor that hides a cipher's power signature

A block cipher running on a processor leaks its key through the power drawn
by the bits that flip at each step. Differential power analysis reads that
leak, typically at the moment an intermediate value is stored (DES) or an
SBOX entry is loaded (AES). MUTE balances these flips at the algorithm
level instead of with special logic cells. It has two identical cores on one
clock. While one core encrypts, the other runs the same instruction stream
in the same cycles on complemented operands. Every 0→1 flip in the first
core then meets a 1→0 flip in the second, so the total Hamming weight of
each stored intermediate stays constant and no longer depends on the key.

Outside encryption the two cores are ordinary, independent processors.
The only extra hardware is a small controller and a few instructions.

This repository holds synthesizable SystemVerilog for the whole processor:
- two pipelined cores;
- their instruction and data memories;
- the balancing controller.

It also has a self-checking testbench for each part, plus three end-to-end tests:
- one runs DES-style and AES-style kernels in balanced mode;
- one runs a complete DES encryption, balanced, against a published
  example;
- one runs a complete AES-128 encryption, balanced, against the published
  FIPS-197 example.

## How the complement is arranged

The first core (CORE1) always runs the real cipher on the real data. What
the second core (CORE2) gets depends on the cipher:

| cipher | CORE1 data memory | CORE2 data memory |
|---|---|---|
| DES | key K, data D, SBOX | ~K, ~D, the same SBOX |
| AES ("complete inversion") | K, D, SBOX | ~K, D, SBOX' with SBOX'[j] = ~SBOX[~j] |

Why these choices work:
- **DES.** XOR of complemented data with a complemented subkey gives the
  same SBOX index as the original, so both cores look up the same entry.
  The stored a_i = L ^ f is still exactly complemented, because L is.
- **AES.** The first AddRoundKey leaves the state complemented. The
  transposed and inverted table maps a complemented index to the
  complemented output. So the state stays complemented through every round,
  and the SBOX loads themselves are balanced.

CORE2 runs the same code. The complementary program is the same
instruction sequence, stored in CORE2's instruction memory. Only the
tables differ. The program also has to contain any extra complement
operations that one of the two versions needs, so that the two instruction
streams stay identical.

## The balancing sequence

The controller (`bal_controller`) watches both cores and can do three
things to each:
- **hold** it: stop fetching and drain;
- **interrupt** it at a vector;
- **load its PC.**

A *switch* register records that balancing is in progress. A session runs
like this:

1. **startBal.** CORE1 executes `startBal n`. The core parks itself: it
   squashes younger instructions and stops fetching. The controller sets
   the switch and raises a maskable interrupt on CORE2 at `SAVE_VEC`. The
   immediate `n` is the word index of the complementary program in CORE2's
   instruction memory.
2. **Save.** CORE2 waits until its pipeline is empty and takes the
   interrupt. Its next PC goes into `PC_backup`. The save routine pushes
   r1–r31, HI, LO and PC_backup onto a stack in CORE2's data memory. It
   ends with `endIntr`, and CORE2 parks.
3. **Start together.** Both cores are now idle. In one clock cycle the
   controller loads CORE1 with the address after `startBal` and CORE2 with
   `8·n`. From here the two fetch, stall and store in lockstep.
4. **Interrupts during the session.** An interrupt request for either
   core puts *both* on hold in the same cycle, so they stop at the same
   instruction. Once both are empty, only the requesting core gets the
   interrupt, and the other stays on hold. The routine's closing `endIntr`
   acts as a non-maskable request to the controller. In one cycle the
   controller sends the interrupted core back to its `PC_backup` and the
   other to the instruction where it stopped.
5. **endBal.** When CORE1 executes `endBal` it parks. The controller holds
   CORE2 (which has just executed its own `endBal`) and starts it at
   `RESTORE_VEC`. The restore routine reloads HI, LO, PC_backup and
   r1–r31, then ends with `endIntr`.
6. **Resume.** In one cycle CORE1 is loaded with the address after
   `endBal` and CORE2 with its saved PC_backup. The switch is cleared.

Outside a session, an interrupt goes straight to its core, and that core's
`endIntr` sends it back to its `PC_backup` alone.

The rule that matters is that every PC load during balancing happens in the
same cycle for both cores. An assertion in `bal_controller` checks it, and
the end-to-end testbench checks its effect: every store of one core is
matched in the same cycle by a store of the other to the same address with
the complemented value.

## The core

`pisa_core` is an in-order, six-stage pipeline with no cache. It runs a
subset of the SimpleScalar PISA instruction set:

| stage | work |
|---|---|
| F1 | PC to instruction memory (synchronous read) |
| F2 | instruction word arrives |
| D  | decode, read registers/HI/LO/PC_backup, hazard check, issue |
| E  | ALU, 32×32 multiplier, branch/jump resolution, address |
| M  | data memory request, byte enables for stores |
| W  | load alignment, write-back of GPR, HI, LO, PC_backup |

**Hazards and control flow.** There are no forwarding paths. D stalls while
an older instruction in E or M will write a register it reads. The register
file passes a W-stage write straight through. Taken branches and jumps
resolve in E and squash the two younger instructions. There are no delay
slots.

**Instruction encoding.** Instructions are 64 bits (see `mute_pkg`):

| bits | field |
|---|---|
| [47:32] | opcode (SimpleScalar opcode numbers) |
| [31:24] | rs |
| [23:16] | rt |
| [15:8] | rd |
| [7:0] | shamt |
| [15:0] | imm16 (overlays rd/shamt) |
| [25:0] | jump target (an instruction index) |

Instruction addresses are byte addresses in steps of 8.

**Extra instructions.**

| instruction | opcode | effect |
|---|---|---|
| `startBal n` | `0xf0` | parks the core; reported to the controller with `n` |
| `endBal` | `0xf1` | parks the core; reported to the controller |
| `endIntr` | `0xf2` | parks the core; reported to the controller (the non-maskable request) |
| `MFPCB rd` | `0xf3` | rd ← PC_backup |
| `MTPCB rs` | `0xf4` | PC_backup ← rs |

MFPCB and MTPCB let an interrupt routine keep PC_backup on its stack.

**Controller interface.** The core talks to the controller through two
packed structs:
- `core_cmd_t`: `hold`, `pc_load` + `pc_value`, `ext_irq` + `irq_vec`;
- `core_status_t`: the retired balancing instruction and its immediate,
  `idle`, `irq_ack`, the interrupt-enable bit, the resume PC and
  PC_backup.

**Draining.** `idle` means the pipeline is empty and not fetching. After a
hold or an interrupt, only E, M and W have to drain, because F2 and D are
squashed and the PC is wound back to the oldest squashed instruction. The
core is idle a few cycles after the request (the core testbench requires at most 6).

## Memories

- **`imem`.** One per core, 4096 × 64 bits. The core can only read it,
  through a synchronous port with an enable. A separate write port loads
  the program before reset is released.
- **`dmem`.** One per core, 4096 × 32 bits:
  - core port: byte enables, synchronous read;
  - host port: whole words, used to load keys, data and tables and to
    read results.

## Top level

`mute_top` contains the controller, the two cores and the four memories.
Its ports are plain signals:
- the memory load and host ports;
- `irq_req[1:0]` (CORE1 in bit 0);
- for observation, the switch flag and both cores' store strobes,
  addresses and data.

| parameter | default | meaning |
|---|---|---|
| `IM_WORDS`, `DM_WORDS` | 4096 | memory depths |
| `RESET_PC1`, `RESET_PC2` | 0 | start addresses |
| `SAVE_VEC` | 0x7000 | CORE2 save routine |
| `RESTORE_VEC` | 0x7400 | CORE2 restore routine |
| `INTR_VEC1`, `INTR_VEC2` | 0x7800 | ordinary interrupt routines |

DES and AES use the same hardware. Only the programs and the data-memory
contents differ.

## Testbenches

| testbench | what it shows |
|---|---|
| `tb_pisa_core` | ALU, immediates, load-use and ALU hazards, loops, JAL/JR, signed/unsigned multiply, byte loads/stores; `startBal` parks and resumes; a hold drains within 6 cycles; an interrupt saves PC_backup, and `endIntr` returns |
| `tb_imem`, `tb_dmem` | random read/write against a model, enables, byte enables, both ports |
| `tb_bal_controller` | the whole sequence driven from scripted core status: same-cycle loads, holds, vectors, switch set/clear |
| `tb_mute_top` | full default sizes, described below |
| `tb_mute_des` | complete balanced DES at full default sizes, described below |
| `tb_mute_aes` | complete balanced AES-128 at full default sizes, described below |

`tb_mute_top`:
- CORE1 runs a short task, then a 16-round DES-style Feistel kernel and a
  10-round AES-style kernel (`s = SBOX[s ^ k]`), each between
  `startBal`/`endBal`.
- CORE2 meanwhile runs a multiply/xor task that keeps registers and HI/LO
  live.
- An interrupt hits CORE1 in the first session, CORE2 in the second, and
  CORE2 once before either.
- Checked: both cores' cipher outputs against a model (CORE2's are the
  exact complement); paired complementary stores; CORE2's task finishing
  with the same values as uninterrupted; and a count of every mechanism.
- It also prints the measured cost of entering and leaving a session.

`tb_mute_des`:
- CORE1 encrypts `0123456789abcdef` under key `133457799bbcdff1` between
  `startBal` and `endBal`.
- CORE2 runs the same 605-instruction program on the complemented block
  and the subkeys of the complemented key.
- The cores do the whole cipher: the initial permutation, 16 rounds and
  the final permutation.
  - The permutations are unrolled bit by bit.
  - In each round, the eight 6-bit expansion groups of R are cut out with
    a rotate and a shift, then XORed with the subkey's groups.
  - The result indexes eight combined S-box/P tables (64 words each).
- On CORE2 both the group and the subkey group are complemented, so the
  index and f match CORE1's, and each stored a_i = L ^ f is complemented.
- The host computes the key schedule and the S/P tables from the standard
  DES tables.
- An interrupt for CORE2 arrives mid-session.
- Checked:
  - CORE1 ends with `85e813540f0ab405`, and CORE2 with its complement;
  - every a_i matches a DES model;
  - all 18 stores made during the session are paired and complementary.
- The session takes about 4,400 cycles.

`tb_mute_aes`:
- CORE1 encrypts the FIPS-197 example block (key `000102…0f`) between
  `startBal` and `endBal`.
- CORE2 runs the same 483-instruction program on its own data memory:
  - the same plaintext;
  - the first round key complemented;
  - the other round keys unchanged;
  - SBOX'.
- The program is branch-free except for its round counter. `xtime` is a
  shift, a mask and an XOR, so both cores stay in lockstep. MixColumns maps
  a complemented column to the complement of its result, so CORE2's state
  stays the exact complement of CORE1's.
- The SBOX is computed in the testbench from its definition: the inverse in
  GF(2⁸), then the affine map with 0x63. The round keys come from the
  standard key schedule.
- An interrupt for CORE1 arrives mid-session.
- Checked:
  - CORE1 ends with `69c4e0d86a7b0430d8cdb78070b4c55a`, and CORE2 with its
    complement;
  - all 336 stores made during the session are paired and complementary;
  - CORE2's own task is unaffected.
- The session takes about 6,800 cycles.

The assembler functions used by the testbenches are in `tb/pisa_asm_pkg.sv`.
Every testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mute_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/mute_pkg.sv tb/pisa_asm_pkg.sv tb/tb_mute_top.sv -o sim
./obj_dir/sim
```

Use the same command for the other testbenches. `tb_imem` and `tb_dmem` do
not need the assembler package. The end-to-end run takes about 10,000
cycles and well under a second.

## Cost of balancing

Each session:
- enters in 52 cycles, from `startBal` to both cores starting together;
- leaves in 50 cycles, from `endBal` to both cores back on their own work.

Most of that is the 38-instruction save and restore routines. The original
design spends 728 cycles in total:
- 320 + 40 to save the register file, other registers and PC;
- 6 to flush;
- 1 to switch and 1 to exit;
- 320 + 40 to restore.

That is under 1 % of a full DES (about 76,000 cycles) or AES (about
176,000 cycles) encryption. The smaller figure here comes from the
single-cycle stores and the short pipeline drain, not from any saving in
what is stacked. Against the shorter hand-written ciphers here, the same
102 cycles are about 2.3 % of the DES session (4,405 cycles) and 1.5 % of
the AES-128 session (6,786 cycles).

## Where this design goes its own way

- **Saving and restoring.** These are done by software routines on CORE2,
  started by the controller, rather than by hidden controller logic. The
  controller only sequences the holds, interrupts and PC loads.
- **The core.** Pipeline split, forwarding policy, hazard handling and the
  instruction bit layout are this design's choices. Only the six-stage
  depth, the register set and the PISA instruction set are given.
  LH/LHU/SH, DIV/DIVU, floating point, system calls and overflow traps are
  not implemented.
- **Opcodes and memories.** The opcodes of the balancing instructions, the
  routine vectors, the memory sizes, the memory load ports and the reset
  values are all choices.
- **Interrupts during a session.** The partner core simply waits. Letting
  it run other work meanwhile would need extra controller logic to
  resynchronise, and is not built.
- **Cipher programs.**
  - DES and AES-128 run in full on the cores.
  - The key schedules are done by the host, and the DES S-boxes are merged
    with the P permutation into lookup tables.
  - The cycle counts of the original design's compiled ciphers (about
    76,000 and 176,000) and its overhead percentages are not reproduced.
  - The programs here are hand-written and shorter.
- **Power.** It is not modelled. The balance shown is in the stored values
  and their timing, which is what the technique relies on.
