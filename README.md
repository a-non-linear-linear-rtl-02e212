# NLU: a non-linear/linear instruction-set extension for lightweight ciphers

Block ciphers spend most of their software run time in two layers. One is
the substitution layer (S-boxes, non-linear). The other is the permutation
or mixing layer (bit permutations and matrix products, linear over GF(2)).
On an 8-bit microcontroller both are slow. An S-box becomes a table lookup
or a long Boolean expression. A bit permutation becomes dozens of shifts and
masks per byte.

The NLU is a small functional unit for such a processor. It adds four
instructions that do both layers from one 64-bit configuration register:

* **Non-linear**: the register holds the algebraic normal form (ANF) of any
  4-bit to 4-bit S-box. One instruction substitutes both nibbles of a byte.
* **Linear**: the register holds an 8×8 binary matrix. One instruction
  multiplies a byte by it. A four-entry result shift register lets the next
  instruction XOR in an earlier partial result. A permutation or mixing
  layer over many bytes is therefore a chain of multiply-and-add steps.

The unit is about 100 flip-flops (64 configuration bits, 32 result bits)
plus AND/XOR logic. Every instruction takes one cycle.

## Instructions

| Instruction     | Effect                                                    |
|-----------------|-----------------------------------------------------------|
| `NLD n, K`      | n = 0: `CONF <- {CONF[55:0], K}`; n = 1..7: `CONF <- {CONF[62:0], K[7-n]}` |
| `NNL Rd, Rs`    | `Rd[7:4] <- S(Rs[7:4])`, `Rd[3:0] <- S(Rs[3:0])`, where S is the ANF in CONF |
| `NMU Rd, Rs`    | `Rd <- M·Rs`; push `M·Rs` into the FIFO                   |
| `NMA s, Rd, Rs` | `Rd <- M·Rs ⊕ FIFO(s)`; push the same value, s = 1..4     |

`FIFO(s)` is the value pushed `s` multiply instructions earlier. Only NMU
and NMA push. NLD and NNL leave the FIFO alone, so matrix reloads can sit
between the steps of a chain.

## The configuration register and its two readings

The same 64 bits are read in two ways. Which bit means what decides how
software must load the register, so this is the part to get right.

**As an S-box** (coefficient `m_i` is `CONF[63-i]`, so the first byte loaded
holds `m_0..m_7`, MSB first). Name a nibble's bits `a b c d`, with `a` the
MSB. Output bit `a'` is the XOR of the 16 monomials
`1, d, c, cd, b, bd, bc, bcd, a, ad, ac, acd, ab, abd, abc, abcd`. Each
monomial is ANDed with its coefficient `m_0..m_15`. Bit `p` of the monomial
index selects variable `d, c, b, a` for `p = 0..3`. Outputs `b'`, `c'` and
`d'` use `m_16..m_31`, `m_32..m_47` and `m_48..m_63`. A zero coefficient
masks a monomial that the S-box does not use. To get the coefficients of a
table `S`, run the Möbius transform on each output bit's truth table `f`:
for each variable `v`, and each `x` with bit `v` set,
`f[x] ^= f[x without v]`.

**As a matrix** (row `i` is `CONF[8i+7:8i]`, so the first byte loaded is the
row for output bit 7). Output bit `i` is `^(row_i & Rs)`, and row bit `j`
multiplies operand bit `j`.

Because NLD shifts, a matrix that equals the current one moved up by two
rows needs only two NLDs. PRESENT's permutation layer relies on this: its
16 matrices come in groups of four, each the previous one moved by two rows.

`NLD n, K` with `n > 0` shifts in the single bit `K[7-n]`. This allows
bit-level updates of CONF.

## Datapath

```
            push,sel                       mac            mac      mac      mac
  dinp ──┬──► CONF[63:0] ─┬──────────┐      │              │        │        │
         │                │          │      ▼              ▼        ▼        ▼
         ├─► non-linear ◄─┘(reversed)│   lin_sum ──► [stage0]─►[stage1]─►[stage2]─►[stage3]
         │     unit ─────────────┐   │      ▲            └────────┴───┬────┴────────┘
         └─► linear unit ◄───────┼───┘      │                          ▼ sro
                 │               │          │                    FIFO tap
                 └──────► XOR ◄──┼── acc ? tap : 0
                           │     │
                        lin_sum  nl_out
                           └─►mode mux◄┘──► dout
```

* `nlu_conf_reg`: CONF and its byte/bit shift.
* `nlu_nonlinear`: 2 × (4 outputs × 16 AND terms) with XOR reductions.
* `nlu_linear`: 8 AND/parity rows.
* `nlu_shift_fifo`: four 8-bit stages. Each stage either holds or takes
  the previous one (`mac`). A 4:1 tap mux is controlled by `sro = s-1`.
* `nlu_unit`: wires these together. `acc` chooses between the tap and zero
  as the value XORed onto the linear result. `mode` picks the non-linear or
  the linear result as `dout`.
* `nlu_decode`: maps an instruction onto `push, sel, mode, acc, mac, sro`.
* `nlu_ise` (top): decoder plus unit. The host supplies
  `valid, op, field, operand`: `field` is `n` for NLD and `s` for NMA, and
  `operand` is `K` for NLD and `Rs` otherwise. The host receives `result`
  and `result_we`.

**Timing.** `result` is combinational from the operand and the current CONF
and FIFO contents, in the cycle the instruction is issued. CONF and the FIFO
update on the rising edge at the end of that cycle. The next instruction
therefore sees them back to back. No stall or bypass is needed. Reset
(`rst_n`, asynchronous, active low) clears CONF and the FIFO.

## Example: one PRESENT round

State bytes `A7..A0` are in registers. The S-box layer is 8 × `NLD 0,K`
(the ANF of the PRESENT S-box) followed by 8 × `NNL`. The bit permutation
`P(j) = 16j mod 63` splits into eight output bytes. For example:

```
Y7 = M00·A7 ⊕ M01·A6 ⊕ M02·A5 ⊕ M03·A4      Y6 = the same matrices on A3..A0
```

Two chains run interleaved with `s = 2`:

```
load M03 (8 NLD)   NMU t0,A4   NMU t1,A0
load M02 (2 NLD)   NMA 2,t0,A5 NMA 2,t1,A1
load M01 (2 NLD)   NMA 2,t0,A6 NMA 2,t1,A2
load M00 (2 NLD)   NMA 2,t0,A7 NMA 2,t1,A3     -> t0 = Y7, t1 = Y6
```

The end-to-end testbench runs whole PRESENT-80 encryptions this way.

## Departures from the source description, and choices made here

The unit's structure, widths, signal names, instruction semantics and the
ANF/matrix gate networks follow the published description. The following
are this design's own:

* **Opcode encoding** (`nlu_op_e`: NLD=0, NNL=1, NMU=2, NMA=3) and the
  `valid`/`result_we` handshake. Only the mnemonics are defined.
* **`NLD n, K` with n > 0** is read as "shift in one bit, `K[7-n]`". The
  source writes this case only as `CONF << K[MSB-n]`.
* **Reset** of CONF and the FIFO, and the clock, are not shown in the source
  diagram.
* **Single-cycle, combinational result.** No latency is given. The unit
  behaves like an ALU.
* **Bit order inside a matrix row** (`row[j]` multiplies operand bit `j`)
  and **which CONF bit holds which ANF coefficient** are derived from the
  published PRESENT code. They are not printed in the diagrams.
* **Published configuration constants.** Two published constants disagree
  with the structure. The example S-box constants (`B3 92 67 0B DE 43 4A
  80`) reproduce only the last output bit of the PRESENT S-box. One
  published matrix row for PRESENT's permutation is `0x40` where the
  permutation needs `0x08`. This RTL follows the gate networks and the
  cipher definition, and the testbenches compute all constants from the
  S-box tables and permutation formulas. The constants printed in this
  README are therefore not byte-for-byte those of the source.
* The host processor (an 8-bit microcontroller) is not included. The
  testbenches model its register file.
* S-boxes wider than 4 bits do not fit. The 8-bit S-boxes of AES and of
  CLEFIA (S1) would need 8 × 256 = 2048 ANF coefficients, against 64 here.
  Those ciphers can use the NLU only for their linear layers and 4-bit
  parts. The source does not say which parts of AES and CLEFIA it ran on
  the unit.

## Size and performance

After generic synthesis the top is 92 word-level cells and 96 flip-flop
bits: 64 for CONF and 32 for the FIFO. The source reports 1752 GE in a 90 nm
library and 28.59 µW at 100 kHz for its implementation. It reports that
software with the NLU needs 6017 cycles and 406 bytes of code for PRESENT,
against 10792 cycles and 660 bytes with a lookup table. None of these
figures is reproduced here, because they depend on the host processor. In
the testbench's PRESENT-80 encryption the NLU executes 4666 instructions.
That count includes the deliberately varied, less efficient schedules
described below.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench            | What it checks |
|----------------------|----------------|
| `tb_nlu_nonlinear`   | PRESENT S-box and its inverse over all 256 operands, using ANF computed from the tables; random coefficients against a subset-sum truth table |
| `tb_nlu_linear`      | zero, identity, bit-reverse and all-ones matrices over all operands; random matrices |
| `tb_nlu_conf_reg`    | loading order, random byte/bit loads, asynchronous reset |
| `tb_nlu_shift_fifo`  | all four taps after random shift/hold sequences |
| `tb_nlu_decode`      | every opcode × field × valid against the control table |
| `tb_nlu_unit`        | 6000 cycles of random control words against a reference model |
| `tb_nlu_ise`         | full PRESENT-80 encryptions driven by NLU instructions (below) |
| `tb_nlu_serpent_sbox` | all eight Serpent S-boxes loaded in turn, each applied to all 256 operands with NNL |
| `tb_nlu_aes_mixcolumns` | AES MixColumns as ×2/×3/×1 matrices with four interleaved NMA-4 chains; FIPS-197 example columns and random columns |
| `tb_nlu_clefia_diffusion` | CLEFIA's M0 and M1 (GF(2^8) mod 0x11D) with one constant matrix per step; against a software reference |

`tb_nlu_ise` encrypts the four published PRESENT-80 test vectors and two
random blocks. It checks every NNL result, every permuted byte and every
ciphertext. The rounds rotate through four schedules: FIFO distance s = 1,
2, 3 and 4. Every fifth round loads the S-box bit by bit with `NLD n>0`. The
testbench counts each mechanism: byte load, bit load, two-byte matrix
reload, NNL, NMU, and NMA for each s. It fails if any of them never
happened.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/nlu_pkg.sv tb/tb_nlu_ise.sv --top-module tb_nlu_ise -o sim
./obj_dir/sim
```

Replace `tb_nlu_ise` with any other testbench name. Every module has
default parameters: `NIBBLES = 2`, `W = 8`, `CONF_W = 64`, `DEPTH = 4`. The
package fixes the operand width at 8 bits and the FIFO at four stages.
