# Code-based masking instructions for a small RISC-V core

Boolean masking in software splits each secret into shares. On a real CPU the
shares still meet in hardware: in the multiplexer tree that picks operands
from the register file, in a register that is overwritten, or on ALU wires.
Those meetings leak the secret through "transitional" side channels that the
software cannot control.

This design stops that at the hardware level. Every share that sits in a
register or travels between register file and ALU is kept in a
*code-based encoding*: a 32-bit word `x` is stored as `Enc(x) = A·x`. Here `A`
is an 8×8 MDS matrix over GF(2^4), and the word is read as eight 4-bit field
elements. Because `A` is involutory (`A·A = I`), one circuit both encodes and
decodes.

New custom instructions (the CBM extension) do three things in one cycle:
- decode their operands just before the ALU;
- compute a plain bit-wise operation;
- optionally mix 16 fresh pseudo-random bits into the result and re-encode it.

Neither the register file nor the operand buses ever carry a raw share. A
small leakage-resilient pseudo-random generator (PRG) built on a Keccak-p[100]
round supplies the random bits. Register gating replaces the register-file
read multiplexer with AND/OR logic, so a read shows only the selected register.

The RTL here is the execution slice of such a core. It has a decoder, the
register-gated register file, the ALU with its masking wrapper, and the PRG,
all in a two-stage pipeline (IF, then ID/EX). Instruction words come in on a
port instead of from a memory.

## The code: `cbm_codec`

- **Element layout.** Element `k` of the word is bits `4k+3:4k`.
- **Field.** Arithmetic is in GF(2^4) with the polynomial x^4 + x + 1.
- **Matrix.** The matrix's first column, applied to `x = 1`, gives `0xF8A5C432`.
  Every element of every column is non-zero and the matrix is MDS. Any error
  touching fewer than nine field elements is therefore visible as a non-codeword.
  Error detection itself is not built.
- **Circuit.** The product is not built as 64 field multipliers. It is a
  straight-line program of 182 two-input XORs, an area-optimised linear
  program for this matrix. Wires `t[0..31]` are the input bits, MSB first
  (`t[i] = x[31-i]`). Each later wire is the XOR of two earlier ones, and 32
  chosen wires form the output, MSB first.
- **How it is written.** The module keeps the program as a table of operand
  pairs and evaluates it in one `always_comb` loop, so synthesis sees exactly
  182 XOR gates.
- **Test.** `tb_cbm_codec` checks the program against a plain GF(2^4) matrix
  product. It also checks that applying the codec twice returns the input.

## The masking wrapper around the ALU: `cbm_alu_wrap`

The base ALU (`cbm_alu`, the RV32I integer operations) is left unchanged. Four
demultiplexer/multiplexer pairs wrap it, each pair sharing one select signal:

| select              | effect when 1                                            |
|---------------------|----------------------------------------------------------|
| `cbm_opa_sel`       | operand a goes through decoder A before the ALU           |
| `cbm_opb_sel`       | operand b goes through decoder B before the ALU           |
| `cbm_enc_sel[0]`    | 16 PRG bits are XORed into result bits 31:16             |
| `cbm_enc_sel[1]`    | the result goes through the encoder                      |

`cbm_enc_sel` is the two-bit `es` field of a CBM instruction.

Each demultiplexer is AND gating. The leg that is not selected is held at zero.
So when plain RV32I instructions run, the decoders see an all-zero input and do
not toggle with the operands. The opposite also holds: a CBM instruction's
operands never reach the bypass leg.

The XOR comes before the encoder. A CBM instruction with `es = 3` therefore
yields `Enc(op(Dec(a), Dec(b)) ^ {r,16'h0})`.

Because the operands are decoded, a CBM instruction whose sources are x0 works
on a true zero. `cbm.or rd, x0, x0` with `es = 3` therefore writes a fresh
encoded random value, `Enc({r, 16'h0})`. This is how software obtains masks
without ever holding them in plain form.

## Instructions and their encoding: `cbm_decoder`

All CBM instructions use custom opcodes:

| group         | opcode    | fields (31 → 0)                                        |
|---------------|-----------|--------------------------------------------------------|
| R-type CBM    | `0001011` | `es[1:0] 00000 rs2 rs1 funct3 rd opcode`              |
| I-type CBM    | `0101011` | `es[1:0] imm[9:0] rs1 funct3 rd opcode`               |
| PRG control   | `1011011` | `00000 imm[1:0] 00000 rs1 funct3 rd opcode`           |

- **CBM computation.** funct3 selects the operation: 0 = and, 1 = or, 2 = xor,
  3 = sll, 4 = srl. There are reg-reg and reg-immediate forms, so ten
  computation instructions in total.
- **Immediates.** The I-type immediate is sign-extended. For shifts the shift
  amount is `imm[4:0]` and `imm[9:5]` must be zero.
- **PRG control.**
  - `cbm.prg imm` has funct3 0, with rs1 and rd zero.
  - `cbm.s2r rd, imm` has funct3 1.
  - `cbm.r2s rs1, imm` has funct3 2.
- **Checks.** Fields shown as `00000` must be zero. Any other value, or any
  unknown opcode or funct3, makes the word illegal.
- **Illegal words** do nothing and raise `illegal_o` for their ID/EX cycle.
- **RV32I.** The decoder also handles OP, OP-IMM and LUI, so that the same
  slice can run the unprotected reference code. Writes to x0 are dropped.

The decoder outputs one packed `ctrl_t` struct (`cbm_pkg`).

## The pseudo-random generator: `cbm_prg` and `keccak_p100_round`

The PRG is a duplex construction on a 100-bit state:
- **Output.** The rate is the top 16 bits, `S[99:84]`, and these are the random
  output. The capacity is the other 84 bits.
- **Update.** One round of Keccak-p[100] (theta, rho, pi, chi, iota on 25 lanes
  of 4 bits) is applied per clock. A 4-bit round counter picks the round
  constant and wraps after 16 rounds. The round is in `keccak_p100_round`,
  which computes its rotation offsets and round constants from their
  definitions as constant functions.
- **Seed.** A separate 100-bit seed register holds the seed.

`cbm.prg imm` selects one of four operations:

| imm | operation                                                        |
|-----|------------------------------------------------------------------|
| 0   | reseed: state ← seed register, round counter ← 0                 |
| 1   | one manual round — only when automatic mode is off               |
| 2   | automatic mode off (the state then holds still)                  |
| 3   | automatic mode on (one round every clock)                        |

State access goes through 32-bit parts. Part `p` covers bits `32p+31:32p`, and
part 3 has only bits 99:96.
- `cbm.s2r rd, p` copies part `p` of the live state to `rd`.
- `cbm.r2s rs1, p` writes `rs1` into part `p` of the seed register.

So software loads a new seed with four `r2s` and applies it with
`cbm.prg 0`.

After reset, state and seed hold `SEED_INIT` and automatic mode is on. If a
reseed and a step happen in the same cycle, the reseed wins.

## Register gating: `cbm_regfile_rg`

- **Storage.** 32 × 32-bit flip-flop registers. x0 reads as zero and is never
  written.
- **Read ports.** Each read port turns its address into a 32-bit one-hot select
  during IF and registers it. In ID/EX every register is ANDed with its select
  bit, and a 32-input OR tree combines the results.
- **Why.** Only the addressed register can reach the port, even during glitches
  or while the address changes. The selects come from flip-flops, so they are
  stable for the whole ID/EX cycle.
- **Write port.** The write port is not gated.

Read data therefore belongs to the address presented one cycle earlier, and a
read enable of 0 gives an all-zero port. Assertions check that each select is
one-hot or zero.

## Pipeline of the top: `cbm_core`

| cycle | stage | what happens                                                                 |
|-------|-------|------------------------------------------------------------------------------|
| n     | IF    | `instr_i` (with `instr_valid_i`) is decoded; the register selects and the control word are registered |
| n+1   | ID/EX | gated operands are read; the ALU wrapper or PRG produces the result; it is written back at the end of the cycle |

- `ex_valid_o`, `illegal_o`, `wb_valid_o`, `wb_rd_o` and `wb_data_o` show the
  ID/EX cycle.
- `prg_auto_o` shows the PRG mode.
- Every instruction takes one cycle. A following instruction can use the
  result at once: the register is written at the edge that ends its ID/EX
  cycle, and the next instruction reads the array after that edge.
- The PRG's 16-bit output is taken from the current state in the same cycle it
  is used.

## Where this design departs from the published core, and what it chooses itself

- **Only the slice is built.** Instruction fetch, compressed instructions, the
  multiplier/divider, loads and stores, branches, CSRs and the peripherals of
  the reference system are not built.
  - Instructions are supplied on a port.
  - As a result a full bit-sliced AES S-box program, which needs memory, cannot
    run on this slice. Its building block, the ISW multiplication gadget, can.
- **Seed register.** The seed register, its reset value and the choice that
  `r2s` writes the seed while `s2r` reads the live state are this design's own.
  The same goes for the round-counter schedule and for using `S[99:84]` as the
  rate.
- **Decoder details.** Sign extension of the 10-bit immediate, the shift-amount
  rule, and treating non-zero `00000` fields as illegal are this design's own.
- **Wrapper details.** AND gating as the demultiplexer and XOR-before-encode are
  this design's reading of the wrapper structure.
- **No alternative codec or fault detection.** Only the 182-XOR codec is built.
  A faster 251-XOR variant of the same matrix exists but is not used, and
  fault detection with the code is not built.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

| testbench              | what it checks                                                      |
|------------------------|---------------------------------------------------------------------|
| `tb_cbm_codec`         | matrix product, involution, unit vectors, random words               |
| `tb_keccak_p100_round` | fixed round vectors and the full 18-round Keccak-f[100] of zero      |
| `tb_cbm_prg`           | random operations against a cycle model (reseed priority, manual step only when auto is off, parts) |
| `tb_cbm_alu`           | every operation on corner and random operands                        |
| `tb_cbm_alu_wrap`      | all 16 select combinations against the reference formula             |
| `tb_cbm_regfile_rg`    | one-cycle read timing, x0, disabled ports read zero                  |
| `tb_cbm_decoder`       | every instruction form, field checks, illegal words                  |
| `tb_cbm_core`          | end to end, at default parameters (details below)                    |
| `tb_cbm_isw_listing`   | the two published first-order ISW micro-benchmarks (RV32I and CBM), with their nop spacing, checked by recombining the shares |

`tb_cbm_core` runs about 21 000 cycles against a cycle-level model:
- directed PRG management;
- 20 first-order ISW multiplications with CBM instructions, whose output
  shares are decoded and recombined;
- 20 with plain RV32I instructions;
- a random mix of all instructions, bubbles and illegal words.

After every cycle it compares the whole register file with the model. It
counts each mechanism (every CBM operation, every `es` value, each PRG
operation, s2r and r2s, back-to-back dependencies, refresh through x0, illegal
words) and fails if any of them never happened.

The shared reference models and instruction encoders are in
`tb/cbm_ref_pkg.sv` and `tb/cbm_asm_pkg.sv`. To run a testbench with Verilator 5
from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cbm_pkg.sv tb/cbm_ref_pkg.sv tb/cbm_asm_pkg.sv tb/tb_cbm_core.sv \
    --top-module tb_cbm_core -o sim && ./obj_dir/sim
```

Replace `tb_cbm_core` with any other testbench name.

## Parameters

| module           | parameter        | default                                  |
|------------------|------------------|------------------------------------------|
| `cbm_regfile_rg` | `NREGS`, `W`     | 32, 32                                   |
| `cbm_prg`        | `SEED_INIT`      | `100'h0_5EED_C0DE_0123_4567_89AB_CDEF`   |
| `cbm_prg`        | `AUTO_INIT`      | 1 (automatic mode after reset)           |
| `cbm_core`       | `PRG_SEED_INIT`  | same as `SEED_INIT`                      |

State width (100), rate (16) and round count (16) are constants in `cbm_pkg`.
