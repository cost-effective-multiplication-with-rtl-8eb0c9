# Constant multiplication on preshift adders

Media kernels such as the DCT and IDCT multiply mostly by fixed constants.
This design has no multiplier. It uses a small arithmetic unit built from
*preshift adders*: 16-bit saturating adders whose first operand first passes
a 3-bit shifter. One instruction, `PSHLxADD` or `PSHRxADD`, computes
`(a << x) + b` or `(a >> x) + b` for x = 1, 2 or 3. A multiplication by a
constant becomes a short chain of such instructions. For example,
x · 11.111001001b takes five instructions in three levels of dependence:

```
r2 = PSHR3ADD(x,  x)    // 1.001b        · x
r3 = PSHL1ADD(x,  x)    // 11b           · x
r4 = PSHR3ADD(r2, r3)   // 11.001001b    · x
r5 = PSHR1ADD(x,  r3)   // 11.1b         · x
r6 = PSHR3ADD(r4, r5)   // 11.111001001b · x
```

A preshift adder is about a third of the area and a third of the delay of a
16×16 subword multiplier. It also does ordinary additions and subtractions,
which make up most of a media kernel. So four preshift adders cost about as
much as one multiplier plus one adder, and they keep all four units busy.
The unit here is built that way by default: four preshift ALUs, each working
on a 64-bit word of four 16-bit subwords.

## Data format and instructions

Operands are 64-bit words of four signed 16-bit subwords. Subword *i* is at
bits `[16i+15:16i]`. Every instruction works on the four subwords
independently, and no carry crosses a subword boundary. Constants are
fixed-point numbers. In C*I*.*F* notation, a constant has *I* integer bits
and *F* fraction bits: C2.10 and C3.12 for media work, C8.0 and C12.0 for
integers.

| opcode (`psa_pkg::op_e`) | result per subword                               | clamps |
|--------------------------|--------------------------------------------------|--------|
| `OP_PADD`                | a + b                                            | sum    |
| `OP_PSUB`                | a − b                                            | sum    |
| `OP_PSHLADD`, amt = x    | clamp(a · 2^x) + b, x = 1..3                     | preshift and sum |
| `OP_PSHRADD`, amt = x    | ⌊a / 2^x⌋ + b, x = 1..3                          | sum    |
| `OP_PSHL`, amt = n       | a << n, n = 0..15; bits shifted out are lost     | none   |
| `OP_PSHR`, amt = n       | a >>> n (arithmetic), n = 0..15                  | none   |
| `OP_PAVG`                | ⌊(a + b + 1) / 2⌋                                | cannot overflow |

"Clamp" means saturation to the signed 16-bit range: 0x7fff or 0x8000.
An instruction is the packed struct `instr_t {op_e op; logic [3:0] amt;}`.
The opcode encoding is this design's own choice.

## The preshifter: the hard part

The preshifter (`preshifter.sv`) is the only thing added to a normal adder.
Its delay and area decide whether the idea pays off, so it is kept small.
It has three parts:

* **Shift decoder** (`shift_decoder.sv`). It takes S (shift or not), LR
  (1 = left, 0 = right) and SA[1:0] (distance) and drives seven one-hot
  select lines: pass, left by 1/2/3 and right by 1/2/3. SA = 0 selects pass.
  An AND-OR multiplexer over the seven shifted copies of the input does the
  shift. Right shifts copy the sign in and drop the bits shifted out, so
  they round toward minus infinity.
* **Saturation detection** (`saturation_detect.sv`). A left shift by k
  overflows when the k bits just below the sign bit, I14 … I(15−k), are not
  all copies of the sign. For a positive input, any 1 among them sets OV1.
  For a negative input, any 0 among them sets OV0. The check needs only the
  input bits and the select lines, so it runs alongside the shift, not after it.
* **Adjustment unit** (`adjustment_unit.sv`). On OV1 it forces the result to
  0x7fff, and on OV0 to 0x8000. OV1 and OV0 never occur together, so each
  output bit needs only one gate term: the sign bit is set by OV0 and
  cleared by OV1, and every other bit is set by OV1 and cleared by OV0. The
  intended circuit is a three-transistor cell per bit. The RTL writes its
  logic function and asserts that the two flags are exclusive.

The adder behind it (`preshift_adder.sv`) forms the sum one bit wider and
clamps it. A `sub` input turns it into a subtractor, so PADD, PSUB and both
preshift-add forms share one adder. With S = 0 it is a plain saturating
adder.

## Hierarchy

```
preshift_mm_unit        NUM_ALUS issue slots, results registered (1 cycle)
└─ subword_alu          ×NUM_ALUS, four 16-bit lanes
   └─ lane_alu          ×4, decodes the instruction
      ├─ preshift_adder PADD / PSUB / PSHLxADD / PSHRxADD
      │  └─ preshifter
      │     ├─ shift_decoder
      │     ├─ saturation_detect
      │     └─ adjustment_unit
      └─ (barrel shift for PSHL/PSHR, average for PAVG)
```

`psa_pkg.sv` holds the subword width, the lane count, the opcode enum and
`instr_t`.

## Top level: `preshift_mm_unit`

| parameter  | default | meaning |
|------------|---------|---------|
| `NUM_ALUS` | 4       | preshift ALUs, one per issue slot. 4 is the "four preshift adders per subword" configuration; 2 is the half-area configuration |
| `SW`       | 16      | subword width |
| `NL`       | 4       | subwords per word |

Ports, per slot k: `issue_valid[k]`, `issue_instr[k]`, `issue_a[k]` and
`issue_b[k]` (64-bit each) go in. After the next rising edge,
`res_valid[k]`, `res[k]` and `res_sat[k]` come out (one clamp flag per
subword). Each slot takes one instruction per cycle and has a one-cycle
latency. An instruction may therefore use a result in the cycle after the
one that produced it. A chain that is L levels deep takes L cycles if no
level holds more than `NUM_ALUS` instructions. Reset (`rst_n`, active low,
synchronous) clears the valid bits and the result registers.

The register file and the scheduling of instructions are outside the unit.
The testbench supplies them. This boundary, the slot interface and the
registered one-cycle result are this design's own choices.

## How far it goes, and where it departs

* The unit does the arithmetic. Finding the shortest instruction sequence
  for a constant is a compile-time search over a graph of candidate
  instructions. It is software and is not included. The testbenches build
  plain Horner chains instead (`tb/psa_prog_pkg.sv`):
  * The integer part of a constant is taken from its top set bit down, one
    PSHLxADD per set bit. A gap over 3 bits costs an extra PSHL.
  * The fraction is taken from its lowest set bit up, one PSHRxADD per set
    bit, then shifted into place.
  * The two parts are joined by one addition.

  No fractional value is ever shifted left. The chains are longer than the
  shortest sequences and have less parallelism:

  | constants, all of the format | average length (Horner) | longest | shortest sequences, published average |
  |------------------------------|-------------------------|---------|---------------------------------------|
  | C8.0                         | 3.720                   | 7       | 3.059                                 |
  | C12.0                        | 5.940                   | 11      | 4.264                                 |
  | C2.10                        | 5.909                   | 11      | 4.277                                 |
  | C3.12                        | 7.547                   | 14      | 5.077                                 |

  | AAN 8-point kernel, 4 ALUs | instructions | cycles | shortest sequences (published figures) |
  |----------------------------|--------------|--------|----------------------------------------|
  | DCT, C2.10                 | 53           | 17     | 48 instructions, 12 cycles             |
  | DCT, C3.12                 | 58           | 17     | 51 instructions, 13 cycles             |
  | IDCT, C2.10                | 52           | 17     | 48 instructions, 12 cycles             |
  | IDCT, C3.12                | 61           | 22     | 54 instructions, 14 cycles             |

  On two ALUs (`NUM_ALUS = 2`), the same programs take 28 and 29 cycles
  (DCT) and 27 and 31 cycles (IDCT). The published figures are 24 to 27.
  The published counts assume that every adder is busy every cycle.
  The simulated counts come from a greedy list schedule over the real
  dependences.
* The integer chains never produce an intermediate value larger than the
  product. The fraction chain does: it holds up to 2|x| before its final
  shift. So the fractional tests limit the multiplicand to |x| < 2^14.
  Shortest sequences that never exceed the product would avoid this
  limit.
* The IDCT used in the test is the common AAN inverse flow. Its constants
  are 1.41421, 1.84776, 1.08239 and 2.61313. Another formulation uses
  0.76537 in place of 1.84776. Both need 29 additions and five
  multiplications.
* Choices the design makes where the arithmetic was left open: right shifts
  truncate; the sum saturates like the preshift; PSHL wraps instead of
  saturating; PAVG rounds half up; SA = 0 means no shift even when S = 1.
* The baseline configuration, one multiplier plus one adder, is not built.
* Area and delay (about 1.8 mm² and 3.3 ns for a 0.5 µm preshift adder,
  against 5.9 mm² and 9.6 ns for a multiplier) are estimates for a
  particular BiCMOS process. This RTL does not reproduce them. The
  transistor-level adjustment cell and the shifter layout are modelled
  only as logic.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference model (`tb/psa_ref_pkg.sv`)
computes every instruction on 32-bit integers, apart from the RTL's bit
slicing.

* `tb_shift_decoder`, `tb_saturation_detect` and `tb_preshifter` test every
  input exhaustively: all 65,536 inputs × all control settings for the
  latter two.
* `tb_adjustment_unit`, `tb_preshift_adder`, `tb_lane_alu` and
  `tb_subword_alu` use corner and random operands for every opcode and shift
  amount. The subword test catches any leak across lane boundaries.
* `tb_preshift_mm_unit` runs the whole unit at its default size. It
  list-schedules instruction programs onto the four slots and compares every
  result word with the reference model. It runs:
  * the five-instruction sequence above, which must take exactly 3 cycles;
  * 20 rounds each of AAN DCT and IDCT in C2.10 and C3.12 on four random
    columns. Each round is checked against the DCT definition (within 6
    LSB) and for the round trip idct(fdct(x)) = 8x (within 24 LSB). Its
    cycle count is checked against the depth and instruction-count bounds;
  * directed clamps and a 400-instruction random program.

  It counts left and right preshifts, positive and negative preshift clamps,
  sum clamps, every opcode, fully busy and partly idle cycles, and reset. It
  fails if any of them never happened.
* `tb_preshift_mm_config2` runs the same DCT/IDCT programs on a two-ALU
  unit.
* `tb_constant_multiply` multiplies by every constant of C8.0, C12.0,
  C2.10 and C3.12 on the default unit. It uses random multiplicands in all
  four subwords. It checks that:
  * integer products are exact;
  * fractional products are within the truncation bound below the exact
    value;
  * nothing saturates.

To run a testbench with Verilator, give the packages first. `-y rtl`
finds the modules. The block testbenches need only `psa_pkg` and
`psa_ref_pkg`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/psa_pkg.sv tb/psa_ref_pkg.sv tb/psa_prog_pkg.sv tb/tb_preshift_mm_unit.sv \
  --top-module tb_preshift_mm_unit -o sim
./obj_dir/sim
```

Every RTL file passes `verilator --lint-only -Wall` with no circuit
warnings. The only warnings are unused package constants in the smaller
modules.
