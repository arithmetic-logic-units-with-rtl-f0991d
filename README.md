# Multi-residue protected 32-bit datapath

This is a 32-bit register file and ALU that detects faults injected on purpose, for example
by lasers aimed at a smart-card chip. Each register holds a 32-bit data word plus a 16-bit
check symbol, the **residue vector**:

    p(d) = { d mod 5, d mod 7, d mod 17, d mod 31 }

Every operation runs twice. It runs once on the data words, in an ordinary ALU. It runs once on
the residue vectors, in a small **residue ALU** that predicts the result's check symbol. A
single shared **encoder** recomputes the check symbol of the real data result, and a comparator
checks it against the prediction. If they disagree, `ok` drops for that cycle and the sticky
`alarm` output is set.

A plain duplicated (dual modular redundant) ALU needs a second 32-bit register file. This design
stores only 16 extra bits per register, so its register file is 25 % smaller. The catch is that
the code must keep its strength through every operation, including ones the code does not handle
naturally. The next sections explain how it does that.

## Why a residue code, and what can go wrong

Residue codes are *arithmetic* codes. Addition and multiplication carry straight through them:

    p(a + b) = p(a) + p(b)   (mod m, lane by lane)
    p(a * b) = p(a) * p(b)

An attacker who corrupts one operand, or the ALU, changes the data result but not the
prediction, so the check catches it. The moduli {5, 7, 17, 31} were picked so that any error
of Hamming weight up to 3 in a stored codeword is detected for certain. This is code distance 4.
Against random, global faults, the 16 redundant bits give a detection rate of about
1 − 2⁻¹⁶ ≈ 99.998 %.

The Boolean operations are **non-native** for a residue code. Their prediction needs an
*auxiliary value* taken from the operands themselves. It rests on a + b = 2·(a∧b) + (a⊕b):

| operation | predicted residue                  | auxiliary value |
|-----------|------------------------------------|-----------------|
| a ∧ b     | (p(a) + p(b) − p(a⊕b)) · 2⁻¹       | a ⊕ b           |
| a ∨ b     | (p(a) + p(b) + p(a⊕b)) · 2⁻¹       | a ⊕ b           |
| a ⊕ b     | p(a) + p(b) − 2·p(a∧b)             | a ∧ b           |

All moduli are odd, so "divide by 2" means "multiply by the inverse of 2 mod m".

The weak point is this. The auxiliary value is computed from the operands *as they are now*,
possibly corrupted. Only p(a) + p(b) still remembers the original values. Suppose a fault turns
a into a + e and b into b − e. Then the sum is unchanged, the prediction matches the corrupted
result, and the result check passes. The smallest such error needs only a few flipped bits.
Take a even and b odd, set bit 0 of a and clear bit 0 of b: that is two flipped bits. The
code's distance of 4 then no longer protects you.

The way out uses one fact: an error that fools the result check must hit **both** operands. Each
operand's own error is too small to escape detection. So checking the result and **one**
operand is enough to restore the full code distance. This design checks operand a.

## Time instead of area: one encoder, three cycles

Checking both the result and an operand, after also encoding the auxiliary value, would need
three encoders. Encoders are the largest part of a residue ALU. Non-native operations are rare
in typical smart-card code, so this design keeps a **single encoder** and gives and/or/xor
three cycles:

| cycle | encoder input     | what happens                                                       |
|-------|-------------------|--------------------------------------------------------------------|
| 1     | auxiliary value   | its residue is stored in the *residue register* inside the checker |
| 2     | operand a         | compared with a's stored residue (operand check)                   |
| 3     | result            | residue ALU predicts from p(a), p(b) and the residue register; result encoded and compared, then written back |

All native operations take one cycle: add, sub, cmp, mov, load and store. Each one encodes and
checks its own result, or for a store the outgoing word. `tb_workload_mix` samples instruction
streams with the class mix of four profiled smart-card workloads and measures the cost:

| workload mix    | logic ops | mul   | measured extra cycles |
|-----------------|-----------|-------|-----------------------|
| AES             | 19.5 %    | 0 %   | 38.7 %                |
| OS boot         | 3.6 %     | 0.2 % | 7.6 %                 |
| OS shell        | 6.9 %     | 0.1 % | 14.7 %                |
| ECC (P-192)     | 0.7 %     | 3.3 % | 4.5 %                 |

The overhead is exactly 2 cycles per logic operation and 1 per multiplication. Under normal
operation it stays in the 5–15 % range. AES is logic-heavy and pays about 39 %.

### Wrap-around of add and sub

The formulas above hold for unbounded integers, but the data ALU is 32 bits wide. When an
addition carries out, the stored sum is a + b − 2³², so the residue ALU subtracts
2³² mod m = {1, 4, 1, 4}. A subtraction that borrows adds the same constant back. The carry
or borrow bit comes from the data ALU. If an attacker flips that bit, the prediction changes
but the data result does not, so the check catches it.

## The multiplier: two writes, four check registers

A 32×32 product is 64 bits. It goes back as two words, high word to `rd` and low word to `rd2`.
Each word needs its own residue, yet the residue ALU only knows the residue of the whole
product, p_c = p(a)·p(b). It splits p_c into two parts:

    p_hi = (p_c − p(lo)) · 2⁻³²      p_lo = p_c − p(hi) · 2³²      (mod m)

The 2⁻³² mod m values are {1, 2, 1, 8}. Each split needs the encoding of the *other* half. The
one encoder provides that across two cycles:

* **Cycle 1.** The product is formed. The high word is written with p_hi, which uses the
  encoding of the low word. The low word is ready first, so encoding it can overlap the
  multiplier's carry propagation. The product and p_c are registered. Check registers:
  `hi_pred ← p_hi` and `lo_enc ← p(lo)`.
* **Cycle 2.** The registered high word is encoded. The low word is written with p_lo. Check
  registers: `lo_pred ← p_lo` and `hi_enc ← p(hi)`.

Neither written word has been checked at this point. The check happens afterwards: a comparator
is permanently connected to the four check registers (`mul_checker`) and requires
`hi_pred == hi_enc` and `lo_pred == lo_enc`. That comparison is ANDed into `ok` in every cycle
except the two multiply cycles, when the registers are only half updated. The registers keep
their values, so a mismatch stays visible until the next multiplication.

## Blocks

```
 instr ──► control_unit ──ctrl──┬──────────────────────────────────────────────┐
                                │                                              │
     regfile (32-bit data) ──a,b──► data_alu ──y, aux, carry, product──┐       │
            ▲                                                          ▼       ▼
            └──── write back ◄──────────────────────────────── encoder_checker ──► ok
     regfile (16-bit residues) ──p(a),p(b)──► residue_alu ──prediction──▲  (residue register)
            ▲                                     │                     │
            └──── write back ◄────────────────────┘              mul_checker ──► ok
```

| file | role |
|------|------|
| `rtl/mr_pkg.sv` | moduli, residue vector type, lane helpers, constants 2³², 2⁻³², 2⁻¹ mod m (computed by constant functions), opcodes, control word |
| `rtl/residue_encoder.sv` | word → residue vector. Per lane: sum of constant bit weights 2ⁱ mod m, then one small reduction |
| `rtl/encoder_checker.sv` | encoder input multiplexer, comparator, residue register |
| `rtl/data_alu.sv` | add, sub, and, or, xor, move, 32×32 unsigned multiply; carry/borrow and auxiliary outputs |
| `rtl/residue_alu.sv` | lane-wise residue prediction (table in the file header) |
| `rtl/regfile.sv` | flip-flop register file, 2 read ports, 1 write port. Used twice: 32-bit data and 16-bit residues |
| `rtl/mul_checker.sv` | the four multiplier check registers and their masked comparator |
| `rtl/control_unit.sv` | valid/ready handshake, 1/3/2-cycle sequencing, control word |
| `rtl/mr_alu_top.sv` | the datapath, product registers, flags, `ok` and `alarm` |

Size at the default of 16 registers: about 1000 flip-flops (768 of them in the two register
files) and roughly 600 word-level cells after generic synthesis.

## Interface and timing

`mr_alu_top #(NREGS = 16)`: one clock, asynchronous active-low reset. Reset clears every
register to zero, which is a valid codeword.

An instruction (`instr_t`) is taken in any cycle where `instr_valid && instr_ready`. The first
cycle of each instruction works straight from the input. Multi-cycle instructions continue from
an internal copy, with `instr_ready` low.

| op | effect | cycles | checked |
|----|--------|--------|---------|
| `OP_ADD` / `OP_SUB` | rd = ra ± rb | 1 | result |
| `OP_CMP` | flags of ra − rb (`flag_z`, `flag_n`, `flag_c` = no borrow) | 1 | result |
| `OP_MOV` | rd = rb | 1 | result |
| `OP_AND` / `OP_OR` / `OP_XOR` | rd = ra op rb | 3 | operand a, then result |
| `OP_MUL` | rd = high word, rd2 = low word of ra × rb (unsigned); rd ≠ rd2 | 2 | check registers, from the next cycle on |
| `OP_LOAD` | rd = codeword (`ld_data`, `ld_res`) carried by the instruction | 1 | the loaded codeword |
| `OP_STORE` | `st_data`/`st_res` = codeword of ra, `st_valid` for one cycle | 1 | the stored codeword |

Memory is assumed to hold codewords, so loads and stores move data and residues together. `ok`
is combinational for the current cycle. `alarm` is registered and stays set until reset. The
design only reports errors: how the system reacts (reset, wiping keys, halting) is left to the
surrounding system.

## Where this design makes its own choices

Taken from the reference architecture: the moduli and 16-bit check symbol; the separate
32-bit data and 16-bit residue register files; the data ALU / residue ALU split; the
prediction formulas for and, or, xor, add and multiply; one time-shared encoder with a residue
register inside the checker; checking the result plus one operand; 3 cycles for non-native and
2 for multiply operations; the hi/lo residue split and the four masked check registers.

Chosen here, because the architecture leaves them open:

* The instruction set and its encoding, the valid/ready handshake, the flags, the load/store
  port, and the register count. The count is a parameter; 4, 8, 16 and 32 are the sizes of
  interest, and 16 is the default.
* Order of the three non-native steps, and which operand is checked (a).
* Carry/borrow correction for 32-bit wrap-around, subtraction, move.
* Unsigned multiplication. The product and p_c are registered between the two multiply cycles.
* The multiplications by 2⁻¹, 2³² and 2⁻³² mod m are written as small constant multiplies with
  reduction. A hand-optimized version can do them as bit rotations: 2³² ≡ 4 (mod 7 and
  mod 31), and multiplying by a power of two modulo 2ᵏ − 1 is a rotation.
* Field order of the residue vector: `{mod 31, mod 17, mod 7, mod 5}`, from MSB to LSB.

Not included:

* **Shifts and rotates.** No residue prediction for them is worked out here. They would need an
  auxiliary value for the bits shifted out, like the Boolean operations.
* **The condition flags are not encoded**, so a fault on a flag is not detected.
* **A linear-code variant.** The same structure can use a [48,32] binary linear code. It would
  need three encoders (xor is its only native operation) and a carry-vector output from the
  adder. A fault in the carry vector escapes detection there, which is one reason the residue
  version is preferred. The parity matrix of a suitable distance-6 code is not part of this
  design.
* **Program-flow and address-bus attacks.** These are outside the scope of a data-integrity
  scheme.

## Simulating

Every testbench in `tb/` checks itself. Each ends with `TB_RESULT checks=N failures=M` and has
a cycle watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/mr_pkg.sv tb/tb_mr_alu_top.sv --top-module tb_mr_alu_top
./obj_dir/Vtb_mr_alu_top
```

`tb_mr_alu_sizes` also needs `-y tb` to find `tb_alu_driver`.

| testbench | what it shows |
|-----------|---------------|
| `tb_mr_alu_top` | Default size. Random instruction stream against a reference model, with every written register read back through the store port. Then injected bit flips: a single bad add operand (result check), a bad loaded codeword, a bad stored register, the a+1 / b−1 two-operand error on and/or/xor (the result check misses it, the operand check catches it), and a flipped product bit in a multiply (check registers). Every mechanism is counted and must occur |
| `tb_workload_mix` | the four workload mixes back to back: exact cycle counts, results, no false alarms |
| `tb_mr_alu_sizes` | 4, 8, 16 and 32 registers side by side (each through `tb_alu_driver`), random streams with read-back, plus one injected bit flip per size |
| `tb_control_unit` | control word of every cycle of every instruction, 1/3/2-cycle handshake |
| `tb_residue_encoder`, `tb_residue_alu` | against residues computed with `%` on the true 32/64-bit results |
| `tb_data_alu`, `tb_regfile`, `tb_encoder_checker`, `tb_mul_checker` | block-level behaviour |

All of them finish in well under a second.
