# A 16-bit elliptic-curve processor for contactless tags

This is SystemVerilog for a small processor that computes elliptic-curve
cryptography over the NIST P-192 prime field. It is meant for devices such as
RFID and NFC tags, which run on a few microwatts and a few thousand gates.
The design follows the processor described in *Low-Resource Hardware Design
of an Elliptic Curve Processor for Contactless Devices*, which performs an
ECDSA signature in 1377k cycles with about 11.7k gate equivalents. This
code is not by that paper's authors. The architecture comes from the paper.
The control-vector layout, the opcodes, the memory map, the I/O block and the
bundled program are this design's own, because the paper does not publish
them.

The main ideas are these:

* **No instruction decoder.** The program memory is a look-up table of
  72-bit *control vectors*, indexed by the PC. Each vector drives the
  datapath directly, so the "instruction" is simply the set of control
  signals for one cycle.
* **Several operations per cycle.** One vector can issue a load, consume the
  word loaded in the previous cycle in a multiply-accumulate, copy that word
  into a register (MOVNF), store the accumulator and shift it right by one
  word (RSACC), all at the same time. This keeps the single-port data memory
  busy on nearly every cycle during field multiplication.
* **A 48-bit multiply-accumulate accumulator.** A 16×16 multiplier adds
  into three 16-bit accumulator words, which suits product-scanning
  multi-precision multiplication.
* **One small single-port data memory.** It holds a 111-word RAM, a
  100-word constant table and memory-mapped I/O behind one port.

## Block structure

```
ecp_top
├── program_memory    1662 x 72 look-up table, combinational read
├── ecp_cpu           executes one control vector per cycle
│   ├── register_file PC, SP, ACC2:ACC1:ACC0, B0..B2, W0..W3, flags C Z V N
│   └── alu
│       ├── arith_unit   ADD ADC SUB SBC (carry = borrow on subtract)
│       ├── logic_unit   AND OR XOR NOT SHL SHR PASSA PASSB
│       ├── mac_unit     16x16 multiply, accumulate, clear, right shift
│       └── branch_unit  next PC: JMP, Bcc on flags, CALL, RET, HALT
└── data_memory       one port, synchronous read
    ├── data_ram      111 x 16
    ├── constant_rom  100 x 16 (P-192 p, n, b, Gx, Gy)
    └── io_port       32 input + 16 output registers
```

`ecp_pkg` holds the control-vector struct, the enums and the constants
shared by all of these.

The sizes 1662×72, 111×16 and 100×16 are those of the paper's signing
configuration. The register set matches the paper: PC, SP, a 48-bit
accumulator, three base registers, four work registers, and the C/Z/V/N
flags.

## The control vector

`ctrl_t` in `rtl/ecp_pkg.sv` is a packed 72-bit struct. Fields, MSB first:

| field | bits | meaning |
|---|---|---|
| `br_op` | 4 | none, JMP, BZ/BNZ, BC/BNC, BN/BNN, BV/BNV, CALL, RET, HALT |
| `br_target` | 11 | absolute target PC |
| `mem_op` | 2 | none, load, store |
| `addr_base` | 2 | address base: 0, B0, B1 or B2 |
| `addr_off` | 8 | address offset, added to the base |
| `st_src` | 3 | store data: ALU result, ACC0/1/2 after this cycle's MAC, or W0..W3 |
| `alu_op` | 4 | ALU operation, `ALU_NOP` leaves the flags alone |
| `alu_a` | 3 | operand A: W0..W3, B0..B2, ACC0 |
| `alu_b` | 3 | operand B: loaded word, immediate, ACC1, ACC2, W0..W3 |
| `imm` | 16 | immediate |
| `rd_we`, `rd_sel` | 1+4 | write the ALU result to W*, B*, SP or ACC* |
| `movnf`, `movnf_reg` | 1+2 | MOVNF: copy the loaded word into W[n] |
| `mac_op` | 2 | none, MULACC (acc += a·b), MUL (acc = a·b) |
| `mac_a`, `mac_b` | 2+1 | multiplier inputs: W[n] times the loaded word or the immediate |
| `acc_shr` | 1 | RSACC: shift the accumulator right by 16 after the MAC |
| `acc_clr` | 1 | start the MAC from zero |
| `flags_we` | 1 | load C/Z/V/N from the ALU |

Several fields can be active in one vector. When the ALU result port and
another port write the same register, the ALU result wins.

## Cycle timing and the "loaded word"

Every part of the data memory has a registered read. A load issued by
vector *t* delivers its word in cycle *t+1*. In that cycle the word can feed
the ALU (`alu_b = AB_RDATA`) or the multiplier (`mac_b = MB_RDATA`), or be
copied by MOVNF. It does not have to pass through a register first. The
word stays visible until the next load.

The paper's own example is one column of a product-scanning multiplication,
A1·B11 + A2·B10 + A3·B9. With this overlap it takes 7 vectors:

| cycle | vector | memory port | uses the word loaded in the previous cycle |
|---|---|---|---|
| 1 | `LD A1` | read A1 | – |
| 2 | `MOVNF W0 ‖ LD B11` | read B11 | W0 ← A1 |
| 3 | `MULACC W0 ‖ LD A2` | read A2 | acc += A1·B11 |
| 4 | `MOVNF W0 ‖ LD B10` | read B10 | W0 ← A2 |
| 5 | `MULACC W0 ‖ LD A3` | read A3 | acc += A2·B10 |
| 6 | `MOVNF W0 ‖ LD B9` | read B9 | W0 ← A3 |
| 7 | `MULACC W0 ‖ STR Acc0 ‖ RSACC` | write column | acc += A3·B9, store the low word, acc >>= 16 |

In the last line, the store writes the accumulator *after* this cycle's
multiply-accumulate. The shift is then applied, so the carry of the column
passes into the next column. `tb/tb_ecp_cpu.sv` runs exactly this sequence.

Conditional branches test the flags as they were registered by earlier
vectors, not the flags of the current vector.

### CALL, RET and HALT

The stack lives in data RAM and grows down from word 110. CALL writes PC+1
to `[SP]`, decrements SP and jumps, all in one cycle, using the data port.
The vector that holds the CALL must not do its own memory access; an
assertion checks this. RET takes two cycles. In the first it reads
`[SP+1]`, increments SP and holds the PC. In the second it jumps to the word
it read, and the rest of the vector is suppressed. HALT holds the PC and
does nothing else.

## Data memory map

The data port uses 16-bit word addresses. Bits 15:10 must be zero and bits
9:8 select the part:

| address | part |
|---|---|
| `0x000–0x06E` | data RAM, 111 words |
| `0x100–0x163` | constant ROM, 100 words; stores are ignored |
| `0x200–0x21F` | I/O input registers, written by the host and read by the CPU |
| `0x220–0x22F` | I/O output registers, written by the CPU and read by the host |

Loads from unmapped addresses return 0. The constant ROM holds p, n, b, Gx
and Gy of NIST P-192, 12 words each, least significant word first, at
offsets 0, 12, 24, 36 and 48. Its other 40 entries are zero.

## The bundled program: field arithmetic modulo p and a Montgomery product modulo n

The paper's ECDSA firmware has not been published. The program memory
therefore holds a program written for this design. The function `build()`
in `program_memory.sv` computes the table from small helper functions. The
program exercises the datapath in the same way as the paper's field arithmetic.

1. **Main program (entry 0).** It sets B0 to the I/O base and polls input
   word 24 until the host makes it non-zero. It then copies A (inputs 0–11)
   and B (inputs 12–23) into RAM. It CALLs the addition routine if the start
   word is 2, the subtraction routine if it is 3, the Montgomery routine if
   it is 4, and the multiplication routine for any other value. Afterwards it copies the 12 result words
   to outputs 0–11, writes 1 to output 12 and halts.
2. **Routine at entry 160, A·B mod p.** All loops are unrolled.
   * **Product scanning.** Each of the 23 columns runs the pattern in the
     table above, then the top word is stored. That makes 144 MULACCs.
   * **Fast reduction.** The prime is p = 2^192 − 2^64 − 1. Split the
     384-bit product into 64-bit chunks c0..c5. Then
     R = (c2,c1,c0) + (0,c3,c3) + (c4,c4,0) + (c5,c5,c5). This sum is formed
     word by word in the accumulator, by multiplying each loaded word by W1 = 1.
     The accumulator carries between words.
   * **Two folding passes.** Each pass adds carry·(2^64 + 1) back into R,
     because 2^192 ≡ 2^64 + 1 (mod p).
   * **Final correction.** The routine computes D = R − p with SUB/SBC,
     reading p from the constant ROM. It branches on the final borrow to
     keep R or copy D, then RETurns.
3. **Routine at entry 660, A+B mod p.** It adds with ADD/ADC and keeps
   the carry in W3. It then forms D = R − p. D is the result if the addition
   carried or the subtraction did not borrow; otherwise R is.
4. **Routine at entry 780, A−B mod p.** It subtracts with SUB/SBC. On a
   borrow it adds p back with ADD/ADC.
5. **Routine at entry 880, Montgomery product A·B·2^−192 mod n.** Here n
   is the order of the P-192 base point, the modulus of the ECDSA scalar
   arithmetic. The routine uses the finely integrated product-scanning
   form, fully unrolled. Column i adds up the products A[j]·B[i−j] and
   M[j]·N[i−j] in the accumulator.
   * **Columns 0–11.** Each column also creates a new word
     M[i] = ACC0 · (−n^−1 mod 2^16). The routine saves ACC1 and ACC2 to
     RAM and copies ACC0 to W3. A MUL by the immediate −n^−1 forms M[i],
     which is stored. The three accumulator words are then written back
     through the ALU result port. M[i]·N[0] clears ACC0, and RSACC shifts
     the accumulator.
   * **Columns 12–22.** These store result words 0–10. The rest of the
     accumulator gives word 11 and a carry.
   * **Final correction.** The routine subtracts n once if the result is
     n or more.

The addition, subtraction and Montgomery routines expect A and B below
their modulus. The multiplication modulo p accepts any 192-bit operands.
The immediate −n^−1 mod 2^16 is computed in `program_memory.sv` with
Newton steps x ← x·(2 − n0·x), from the lowest word n0 of n.

RAM layout: A at 0–11, B at 12–23, the product at 24–47, R at 48–59, D at
60–71 and the carry at 72. The Montgomery routine keeps its M words at
24–35 and the saved accumulator words at 73–74. The program fills entries
0–91, 160–642, 660–762, 780–854 and 880–1630, which is 1504 of the 1662.

| operation | start word | cycles from start to done |
|---|---|---|
| A·B mod p | 1 | about 543 (461 from CALL to the end of RET) |
| A+B mod p | 2 | 161–185 |
| A−B mod p | 3 | 122–158 |
| A·B·2^−192 mod n | 4 | about 790 |

Each run includes about 80 cycles of copying operands in and the result
out.

## Using it

* **Load the operands.** While the processor runs, the host writes
  operand words with `host_we`, `host_addr` (0–31) and `host_wdata`.
* **Read the result.** The host reads `io_out[0..15]`.
* **Reset.** `rst_n` is synchronous and active low. The PC starts at 0.
* **Halted.** `halted` is high while the PC is on a HALT vector.

To run your own code, change `build()` in `program_memory.sv`.
The helpers `ld`, `st`, `movnf`, `mulacc`, `aluop` and `br` each set one
group of fields and can be nested to build one vector, for example
`ld(mulacc(CTRL_NOP, 0, 0, 0), AB_ABS, 5)`, which is "MULACC W0 ‖ LD [5]".

## Simulation

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ecp_pkg.sv tb/tb_ecp_top.sv --top-module tb_ecp_top -o sim
./obj_dir/sim
```

What each testbench checks:

* **`tb_ecp_top`** runs the full-size design 43 times: 11 multiplications,
  12 additions, 12 subtractions and 8 Montgomery products. The operands are
  random, plus edge cases such as 0, p−1, n−1, 2^192−1 and, for
  multiplication, an input above p. It compares each result with the value
  computed with wide integers in the testbench. A Montgomery result E is
  checked by its definition: E < n and E·2^192 ≡ A·B (mod n). It also counts the mechanisms the program relies on:
  MOVNF, MULACC overlapped with a load, STR + RSACC, CALL, the RET stall,
  taken conditional branches, constant-ROM reads, I/O writes, ADC, MUL by
  an immediate, both
  outcomes of the multiplication's final subtraction, all three ways an
  addition can end and both ways a subtraction can end. It fails if any of
  them never happened.
* **`tb_program_memory`** checks the program's shape: the four routines,
  the number of MULACC, MUL, ADC and SBC vectors, and HALT in every unused
  entry. It also checks each vector on its own. For example, a vector that
  uses the loaded word must directly follow a load, and CALL and RET must
  not access memory.
* **`tb_ecp_cpu`** runs a hand-written control-vector program: the
  example column above, plus a CALL/RET routine. It checks the stored words,
  the stack and the cycle count.
* **The remaining testbenches** check one unit each against a reference
  model with random stimulus. `tb_constant_rom` checks the curve constants
  by their properties: the value of p, that the base point is on the curve,
  and that n lies in range.

## Where this departs from the paper

* **Firmware.** The paper's firmware covers ECDSA signing with SHA-1,
  Montgomery-ladder point multiplication with randomized projective
  coordinates, Montgomery multiplication modulo n, and Montgomery
  inversion. Only its building blocks are included here: multiplication,
  addition and subtraction modulo p, and Montgomery multiplication modulo n,
  each written for this design. The signing cycle count the paper reports
  (1377k) therefore cannot be reproduced here. The multiplication modulo p
  takes 461 cycles. The paper reports 401 for its version with the same
  instruction set, and 328 for one that also keeps operands in the work
  registers as a cache. The paper runs its Montgomery multiplication as a
  loop in 84 entries. The one here is unrolled and uses 751 entries,
  which the free part of the program memory allows.
* **Encodings.** The paper gives 72 control signals and about 46
  instructions. It does not give their encoding, the condition set or
  the stack behaviour. Those shown above are this design's.
* **Instruction decoder.** It is left out. The paper uses one only in
  alternative versions that store 16-bit instructions.
* **Memories.** The RAM macro is modelled as a synchronous array. The
  program memory is a combinational table. A function with no inputs
  computes it, and synthesis folds that function into constants.
* **Low-power measures.** Clock gating of the registers appears only as
  per-register write enables, which a clock-gating insertion tool can map to
  gating cells. Operand isolation of the multiplier is modelled by forcing
  its inputs to zero when it is idle.
* **I/O.** The paper leaves the I/O to the application, for example an
  ISO 14443 air interface. Here it is a plain register mailbox.
* **Signing and verification.** The variant that both signs and verifies
  needs 149 RAM words, 2321 program entries and 148 constants. It is not the
  default, but it only takes larger `RAM_WORDS`, `PM_DEPTH`/`PC_W` and
  `ROM_WORDS` values in `ecp_pkg`.
