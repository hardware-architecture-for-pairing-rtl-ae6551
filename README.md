# A programmable pairing cryptoprocessor for GF(2^m)

Bilinear pairings (the Tate pairing and its η_T variant) are the core operation of
identity-based encryption, short signatures and key agreement. No single pairing
algorithm, elliptic curve, tower field or distortion map has become standard. This
design therefore does not hard-wire any one of them. It is a small programmable
coprocessor that only does arithmetic in the binary field GF(2^m). A pairing, with
whatever parameters, is a program of 16-bit instructions.

The default field is GF(2^1223) with the trinomial f(x) = x^1223 + x^255 + 1. With
supersingular curves of embedding degree 4, this gives about 128-bit security.
Elements of the extension field GF(2^(4m)) are simply four GF(2^m) registers. The
processor stores them in banks of four registers and works on them with GF(2^m)
operations.

Three rules shape the whole machine:

1. Only GF(2^m) arithmetic is supported. Extension-field arithmetic is done in software.
2. All operands come from registers. There are no immediates; the constant 1 is
   produced by the `IncG0` instruction (flip bit 0 of register G0).
3. Every multiplication, squaring and square root is preceded by an addition of up
   to four registers of one bank, in the same instruction. Pairing code nearly
   always multiplies sums of coordinates, so this saves many instructions.

## Block diagram

```
            prog port                        ld_en/ld_data (points in)
                |                                     |
         +--------------+   ip_next   +--------+      v
         |program_memory|<------------|program_|   +-----+  MoveBank  +-----+
         | 4K x 16, sync|------------>|control |   |  F  |<-----------|V / H|<--+
         +--------------+   instr     | IP,For,|   +-----+            +-----+   |
                                      | Wait,R |      |4-in XOR (bank_adder)     |
                                      +--------+      v                          |
                                                  F-sum | Fs   G-sum | Gs        |
                                                     \   (OR merge)  /           |
                   +-----------+-----------+-------------+                       |
                   |           |           |             |                       |
                 (sum)   gf2m_square   gf2m_sqrt    serial_mult (9 cycles)       |
                   |           |           |             |                       |
                   +-----------+---4:1 mux-+-------------+                       |
                                   |                                             |
                          G, V, W, Fs, Gs  ------------------------------------- +
                          (G also from W / I by MoveBank)
```

| Storage | Size | Role |
|---|---|---|
| F | 4 × m | Source bank. Loaded from outside or by MoveBank from V or H. |
| G | 4 × m | Source bank and destination bank. G0 has the `IncG0` flip. |
| V, W | 4 × m each | Destination banks for results. |
| H, I | 4 × m each | Spill space for V and W. Reached only with MoveBank. |
| Fs, Gs | m each | Single registers. Both can be operands; both can be written. |
| serial multiplier | about 13 m | Operand, partial-product and holding registers. |

## Instruction set

Every instruction is one 16-bit word, `{CMD[3:0], OP2[5:0], OP1[5:0]}`. Each operand
field is `{S1,S0,R3,R2,R1,R0}`. `S1S0` names a bank and `R3..R0` is a mask of
registers within it. For the control instructions, `{OP2,OP1}` is a 12-bit constant
`n`. The format and field sizes are those of the original design. The opcode numbers
and bank codes below are this implementation's own choice (see `rtl/pairing_pkg.sv`).

| CMD | Mnemonic | Effect | Cycles |
|---|---|---|---|
| 0 | `Addition(D[],S[])` | Write sum(S[mask]) to every D register in the mask. With one source register this is a move. | 1 |
| 1 | `Squaring(D[],S[])` | Write (sum S[mask])^2. | 1 |
| 2 | `SquareRoot(D[],S[])` | Write sqrt(sum S[mask]). | 1 |
| 3 | `LoadMult(S2[],S1[])` | Start (F-sum or Fs) × (G-sum or Gs). S2 is in OP2, S1 is in OP1. | 1 (+9 in background) |
| 4 | `StoreMult(D[])` | Write the multiplier's held product to D. | 1 |
| 5 | `MoveBank(D,S)` | Copy a whole bank: V→F, V→H, H→F, W→G, W→I or I→G. | 1 |
| 6 | `IncG0()` | G0 ← G0 ⊕ 1. | 1 |
| 7 | `Wait(n)` | Hold IP for n cycles. | n+1 |
| 8 | `For(n)` | Loop header for exactly n iterations (see below). | 1 |
| 9 | `Jmp(n)` | IP ← n. A Jmp to its own address ends the program. | 1 |
| 10 | `Jz(n)` | Skip the next instruction if bit 0 of R is 1, then shift R right. | 1 |

Bank codes:

* Source (OP1, and both fields of LoadMult): 0 = F, 1 = G, 2 = Fs, 3 = Gs. LoadMult
  requires F or Fs in OP2 and G or Gs in OP1.
* Destination (OP2): 0 = G, 1 = V, 2 = W, 3 = single registers (R0 writes Fs, R1
  writes Gs).
* MoveBank source (OP1): 0 = V, 1 = H, 2 = W, 3 = I. MoveBank destination (OP2):
  0 = F, 1 = H, 2 = G, 3 = I.

Assertions in `pairing_datapath` flag a LoadMult operand taken from the wrong side
and a bank move that has no wiring.

### Control flow

The program control computes the next IP combinationally. That value is the read
address of the synchronous program memory. So the word being executed is always the
one at `ip`, and jumps cost no bubbles and have no delay slots.

`For(n)` is a loop header with one internal counter. The usual layout is:

```
L:    For(n)        ; iterations left: IP+2 (into the body); none left: IP+1
      Jmp(EXIT)
      ... body ...
      Jmp(L)
EXIT:
```

On the first visit the counter is loaded with n. Each later visit decrements it.
When it reaches zero, the header falls through to the `Jmp(EXIT)` and re-arms for the
next time. Loops do not nest, because there is one counter.

`Jz` uses the same skip-next convention, on bit 0 of register R. R is loaded from
`r_in` at `start`. Each `Jz` shifts R right by one, so a sequence of `Jz`
instructions walks through the bits of r. This is meant for Miller loops that
depend on the bits of the group order.

### Multiplier timing contract

If `LoadMult` runs in cycle c, its product can be stored by a `StoreMult` in cycle
c+10 or later. Until then, `StoreMult` returns the previous product. The usual
pattern is `LoadMult; Wait(8); StoreMult`, or any eight unrelated instructions in
place of the `Wait`. A new `LoadMult` may be issued before the previous product is
stored. The old product stays readable until the new one arrives.

## The arithmetic units

**Addition** (`bank_adder`) is a 4-input XOR. Each register has a read enable; a
disabled register contributes zero. There is one adder on bank F and one on bank G.
Their outputs, and Fs and Gs, are merged with OR gates. Only one source is ever
enabled, so the OR acts as a multiplexer.

**Reduction by parallel LFSR** (`plfsr`, `gf2m_reduce`). One LFSR step computes
x·A mod f: shift left, and if the bit shifted out was 1, XOR in the low
coefficients of f. A chain of d such combinational stages gives x^d·A mod f in a
single pass. For a trinomial each stage is one XOR gate, and the chain is at most
two gates deep. A (2m−1)-bit product g = g2·x^m + g1 is reduced as
plfsr(g2, d=m) ⊕ g1. The polynomial is a parameter (`FPOLY`, the coefficients
f_0..f_{m−1}), so pentanomials work too.

**Squaring** (`gf2m_square`) spreads the input bits apart, which costs no logic, and
reduces the result with the PLFSR.

**Square root** (`gf2m_sqrt`) is specific to trinomials with odd m and odd a. Split
A into its even-indexed part Ae and odd-indexed part Ao. Then
sqrt(A) = Ae + Ao·(x^((m+1)/2) + x^((a+1)/2)). Neither term needs reducing, so the
whole unit is (m−1)/2 XOR gates.

## The multiplier: KOA-LFSR and the serial Karatsuba core

This is the largest and least obvious part of the design.

### KOA-LFSR: reduction folded into Karatsuba

Karatsuba–Ofman (KOA) splits each operand at L = ceil(n/2) into A = A_H·x^L + A_L.
It forms three half-size products:

* z0 = A_L·B_L
* z2 = A_H·B_H
* z1 = (A_L+A_H)(B_L+B_H) + z0 + z2

The product is z2·x^(2L) + z1·x^L + z0.

Normally that (2m−1)-bit polynomial is then reduced modulo f. KOA-LFSR applies the
reduction to the two shifted terms directly:

    C = (z2·x^(2L) mod f) + (z1·x^L mod f) + z0

Here z0 and z1 have at most 2L−1 ≤ m coefficients. They are already field-sized,
and the two "mod f" terms are PLFSRs of 2L and L stages. Only the top call (n = m)
does this; the inner calls are plain KOA with shifts. `koa_lfsr_mult` is this
multiplier, fully parallel, for any field. Its default is GF(2^163) with the NIST
pentanomial. It recurses down to single AND gates, as in the textbook algorithm, or
stops at a schoolbook multiplier of `TH` bits. It is a stand-alone block. A fully
parallel multiplier at m = 1223 would be far too large, so the processor does not
use it.

### The serial multiplier (`serial_mult`) inside the processor

Two levels of Karatsuba are unrolled around one fully parallel core of about m/4
bits:

1. **Level 1 (KOA-LFSR split).** The operands are split high/low at L1 = 612. This
   gives three operand pairs: low halves, high halves and half-sums.
2. **Level 2 (overlap-free split).** Each pair is split into even and odd
   coefficients, x = x_e(x²) + x·x_o(x²). This gives e, o and e+o of 306 bits. The
   product is p_e(x²) + x·(p_m+p_e+p_o)(x²) + x²·p_o(x²). The sub-products land on
   interleaved bit positions, which removes one XOR level from the recombination.

That makes nine 306-bit operand pairs. They are captured in registers when
`LoadMult` runs. On the next nine clocks the core (`fph_koa`) multiplies one pair per
clock. Eight products are parked, and on the ninth clock all nine are copied into
holding registers. The output is combinational from the holding registers:

* the overlap-free merge back into three 1223-bit level-1 products;
* then the KOA-LFSR merge with two PLFSRs (1224 and 612 stages).

There is never a separate reduction step.

The core `fph_koa` is a "fully parallel hybrid" KOA. It applies the overlap-free
split recursively for `S` levels, then uses schoolbook AND/XOR arrays. With the
default S = 4, 306 bits become 81 schoolbook multipliers of 20 bits or fewer. S is
the knob that trades area against clock period. The design uses S = 4, which gave
the best area-time product when the truncation depth was swept from 1 to 6.

Register cost is about 13 m: 2 × 9 × 306 operand bits, 8 × 611 parked bits and
9 × 611 holding bits.

## Interface and use

`pairing_cryptoprocessor` has these ports (default M = 1223):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock and asynchronous active-low reset. Reset clears every register, not the program memory. |
| `prog_we`, `prog_waddr`, `prog_wdata` | in | 1, 12, 16 | Program memory write port. |
| `ld_en`, `ld_data` | in | 4, 4×M | Write any of F0..F3. Used for the input points. |
| `start`, `r_in` | in | 1, M | Start at address 0 and load R. |
| `busy`, `done` | out | 1 | Running; program ended (stays high until the next start). |
| `mult_busy`, `ip` | out | 1, 12 | Status. |
| `bank_g`, `bank_v`, `bank_w` | out | 4×M each | Results. |

Sequence: write the program, load F (for a pairing, x1, y1, x2, y2 in F0..F3), pulse
`start`, wait for `done`, then read the result banks.

Example: the squaring G^2 in the tower GF(q^4) = GF(q^2)[v]/(v²+v+u), with
GF(q^2) = GF(q)[u]/(u²+u+1), takes four instructions:

```
Squaring(W[0], G[0,1,3])   ; W0 = (g0+g1+g3)^2
Squaring(W[1], G[1,2])     ; W1 = (g1+g2)^2
Squaring(W[2], G[2,3])     ; W2 = (g2+g3)^2
Squaring(W[3], G[3])       ; W3 = g3^2
```

A different tower, for example GF(q)[u]/(u⁴+u+1), is just a different set of masks.
No hardware changes. Field inversion has no dedicated unit. The Itoh–Tsujii method
(squarings and multiplications along an addition chain for m−1) is a short program.
The end-to-end testbench contains one.

## Verification

Each module has a self-checking testbench in `tb/`. The reference arithmetic
(`tb/gf2m_ref_pkg.sv`) is deliberately naive:

* bit-serial shift-and-add multiplication with the field size as a run-time value;
* square root checked by squaring the result back.

`tb/pairing_iss_pkg.sv` is an instruction-level model of the processor and a small
assembler.

| Testbench | What it shows |
|---|---|
| `tb_gf2m_reduce`, `tb_gf2m_square`, `tb_gf2m_sqrt` | The three units at m = 1223 against the reference, including extreme inputs. |
| `tb_bank_adder` | All 16 read-enable patterns. |
| `tb_fph_koa` | The 306-bit, S = 4 core and a 77-bit, S = 2 core against shift-and-XOR products. |
| `tb_koa_lfsr_mult` | GF(2^163) pentanomial, GF(2^233) trinomial (schoolbook below 8 bits) and GF(2^131) pentanomial. |
| `tb_serial_mult` | m = 1223 products. Result exactly 9 clocks after the start clock; `busy` throughout; old product held during a new multiplication; restart while busy. |
| `tb_program_memory` | Write and synchronous read-back across the address range. |
| `tb_program_control` | Cycle-by-cycle IP trace through Wait, For, Jz and Jmp, then halt and re-start. |
| `tb_pairing_datapath` | 300 random legal instructions with idle cycles and reloads. Banks compared with the model every clock. |
| `tb_pairing_cryptoprocessor` | Full size, end to end (see below). |
| `tb_eta_t_miller` | The Miller loop of the η_T pairing as a program, full size (see below). |

The end-to-end test runs a 138-word program at full size. The program includes a
complete Itoh–Tsujii inversion in GF(2^1223): 1217 loop iterations and 3896 cycles.
The checks are:

* the final banks and the cycle count against the model;
* independently of the model, a · a⁻¹ = 1;
* that every mechanism occurred at least once.

The mechanisms counted are wait stalls, loop iterations and exits, both Jz outcomes,
a held multiplier result, each of the six bank moves, IncG0, square root, Fs and Gs
operands, external load and halt.

`tb_eta_t_miller` runs a real workload: the Miller loop of the η_T pairing in the
Barreto–Beuchat form, all (m+1)/2 = 612 iterations. F is held in GF(q^4) on the basis
(1, u, v, uv). Each iteration takes two square roots and two squarings of the point
coordinates and builds the line function G = g0 + g1·u + v. It then forms the sparse
product F·G from six multiplications in GF(q), using Karatsuba in GF(q^2). The
program is 70 words long; each iteration takes 96 cycles, and the loop 58,775 cycles
in all. The program shows how the banks are used in practice:

* The points wait in G, with a copy in I.
* The accumulator sits in F, and the new F is built in V.
* Each product is stored into G next to a copy of the F coordinates it must be added
  to, so that one bank addition forms each new coordinate.
* g0 and g1 are kept in W, so `MoveBank W→G` brings them back.

The result is checked against a plain schoolbook GF(q^4) product. The inputs are
random field elements, so the test checks the loop's arithmetic, not the bilinearity
of the pairing.

To simulate with plain Verilator, for example the full processor:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pairing_pkg.sv tb/gf2m_ref_pkg.sv tb/pairing_iss_pkg.sv \
  rtl/plfsr.sv rtl/gf2m_reduce.sv rtl/gf2m_square.sv rtl/gf2m_sqrt.sv \
  rtl/bank_adder.sv rtl/fph_koa.sv rtl/serial_mult.sv rtl/pairing_datapath.sv \
  rtl/program_memory.sv rtl/program_control.sv rtl/pairing_cryptoprocessor.sv \
  tb/tb_pairing_cryptoprocessor.sv --top-module tb_pairing_cryptoprocessor
./obj_dir/Vtb_pairing_cryptoprocessor
```

The build takes under a minute and the run about a second. Every testbench prints
one line, `TB_RESULT checks=N failures=F`.

## How far to trust it, and where it departs from the original design

Everything above runs in simulation at the full default size. The Miller loop of
the η_T pairing has been run. The final exponentiation has not been written, so no
complete pairing value has been produced. The
reference design reports 5.3 and 10.3 kbit of program (about 331 and 644 words) and 51.5k and 57.6k
cycles, for its two η_T variants. Both fit in the 4K-word program memory.

Some choices are this implementation's own, because the original description does
not settle them:

* **Encoding.** The opcode numbers, the bank code numbers, the position of S1S0
  inside an operand field, and the encoding of writes to Fs and Gs.
* **LoadMult operand order.** The F-side operand is in OP2 and the G-side operand in
  OP1. This follows the written examples, `LoadMult(F[..], G[..])`.
* **Fs as a source.** Squaring and square root may also take Fs as their source.
* **Control details.** Wait(n) lasts n+1 cycles. For uses one re-arming counter. Jz
  shifts R after testing it, and R is m bits wide. A Jmp to itself halts.
* **Ports.** The result ports are banks G, V and W. The program is loaded through a
  plain write port. The program memory is an inferred RAM rather than a vendor core.
* **Serial multiplier sequencing.** The nine partial products are sequenced by an
  index counter, and a start during a running multiplication restarts it.
* **Load conflict.** A simultaneous external load of F and a MoveBank into F is not
  allowed; an assertion reports it.

Tool notes:

* When linted on their own, Verilator reports the three child products in
  `koa_poly` and `fph_koa` as undriven. This is an artifact of linting a
  self-instantiating module. The recursion does elaborate, and the testbenches
  exercise every level.
* Synthesis of the complete processor in Yosys is slow and needs more than 16 GB
  of memory. A likely cost, not measured, is the PLFSR chains. They are written as
  1223 unrolled stages and shrink to a few XOR gates per bit only after constant
  propagation. The units do
  synthesize separately. The serial multiplier comes to about 65k cells and 15.9k
  flip-flops, and the fph_koa core to about 60k cells.

## Files

* `rtl/pairing_pkg.sv` holds the constants, the opcode enum and the instruction
  struct.
* `rtl/pairing_cryptoprocessor.sv` is the top level.
* `rtl/pairing_datapath.sv` and `rtl/program_control.sv` are the two halves of the
  processor. `rtl/program_memory.sv` is the instruction store.
* The arithmetic units are `rtl/serial_mult.sv`, `rtl/fph_koa.sv`,
  `rtl/koa_lfsr_mult.sv`, `rtl/koa_poly.sv`, `rtl/plfsr.sv`, `rtl/gf2m_reduce.sv`,
  `rtl/gf2m_square.sv`, `rtl/gf2m_sqrt.sv` and `rtl/bank_adder.sv`.
* `tb/` holds one testbench per module, the reference arithmetic package and the
  instruction-level model.
