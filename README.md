# Pipelined ternary-logic multiplier and dynamic ternary gate family

This RTL models a family of dynamic CMOS **ternary** (three-level) logic
circuits and their main application: an N x N-bit binary multiplier whose
interior computes in a redundant radix-2 number system with digits
{0, 1, 2}. In that number system, adding two numbers needs no carry chain.
Each output digit depends only on three neighbouring digit positions of the
inputs. As a result, every adder in the reduction tree fits in one pipeline
stage, and the whole 16 x 16 multiplier has a latency of 12 stages. A
conventional binary pipelined array needs 32.

The circuits were conceived at transistor level. There are three voltage
levels: GND, 1/3 VDD and 2/3 VDD. Gates are dynamic: each has a preset phase
and an evaluate phase, driven by a non-overlapping two-phase clock phi /
phi-bar. Here, every circuit is given as synthesizable SystemVerilog that
keeps its logic function, its pipeline structure and its phase behaviour.
The electrical properties are not modelled: voltages, thresholds, charge
sharing, device counts and speed.

## Ternary signals in RTL

`tern_pkg` defines `trit_t`, a two-bit enum with the values `T0`, `T1` and
`T2`. They stand for GND, 1/3 VDD and 2/3 VDD, and also for the digits 0, 1
and 2. The code `2'b11` is never produced, and every function reads it as 2.
The package also provides:

* the inverters `sti` (2 - x), `nti` (2 only for 0) and `pti` (0 only for 2);
* `tmin` (ternary AND) and `tmax` (ternary OR);
* `literals()`, which gives the six two-state literals X^0, X^1, X^2, X^01,
  X^12 and X^02. X^a is true when X is one of the digits listed in a.

Two-state signals (literals, carries) are plain `logic`. A true value stands
for level 2.

## The multiplier (`tern_mult`)

```
a, b --> pp_gen --> tree of rpd_adder --> rpd2bin --> cla_pipe --> p
        (N/2 operands)  (log2(N/2) levels)  (A + 2B)   (4-bit slices)
```

### Partial products as positive digits (`pp_gen`)

The binary partial-product rows of multiplier bits `b[2k]` and `b[2k+1]` are
added digit by digit. Operand k then has, at weight 2^q, the digit

    s = a[q-2k]·b[2k] + a[q-2k-1]·b[2k+1]      (0, 1 or 2)

so the N binary rows become N/2 positive-digit operands without Booth
recoding. Each operand is carried as a 2N-digit vector, already shifted.

### Carry-free addition (`r2a1`, `r2a4`, `rpd_adder`)

This is the heart of the design. Two digit vectors X and Y are added in
three logical steps:

1. **R2A1**, per position i: x_i + y_i = w_i + 2·(c1_i + c2_i). Here w_i is
   the parity, c1_i = (x_i + y_i >= 2) and c2_i = (x_i = y_i = 2). The cell
   builds these from literals:
   A = not(x^02·y^02), D = not(x^1·y^1), E = not(x^2 + y^2),
   c2 = x^2·y^2, c1 = not(D·E), w = A·D.
2. v_i = w_i xor c1_{i-1} and d_i = w_i and c1_{i-1}, so that
   w_i + c1_{i-1} = v_i + 2·d_i.
3. s_i = v_i + d_{i-1} + c2_{i-1}.

The final digit never exceeds 2: c2_{i-1} = 1 forces w_{i-1} = 0 and hence
d_{i-1} = 0. Summed over all positions, the three steps preserve the value.
s_i depends only on positions i, i-1 and i-2, so there is no carry
propagation.

In the two-stage form, **R2A2** does step 2 and **R2A3**, a simple ternary
gate, does step 3, each in its own pipeline stage. **R2A4** merges steps 2
and 3 into one simple ternary differential logic
(STDL) gate. Its inputs are w_i, w_{i-1}, c1_{i-1}, c2_{i-1} and c1_{i-2}:

* its tree pulls Q to 0 when v, d and c2 are all 0;
* it pulls Q-bar low, which sets Q to 2, when v = 1 and one of d or c2 is 1;
* otherwise both nodes stay at 1.

`rpd_adder` is a row of R2A1 cells, a register, then a row of R2A4 cells. In
the multiplier, the R2A4 row of one adder level and the R2A1 row of the next
level form one pipeline stage. Its `ovf` output flags a carry lost out of
the top digit. This cannot happen inside a multiplier, and an assertion in
`tern_mult` checks that it does not.

Example: 2 + 2 in digit 0 gives w_0 = 0, c1_0 = 1 and c2_0 = 1. Digit 1 then
gets v_1 = 1 and c2_0 = 1, so s_1 = 2. The result 2·2^1 = 4 is correct.

### Back to binary (`rpd2bin`, `cla_pipe`)

Each digit is split as s_i = a_i + 2·b_i (1 → a = 1; 2 → b = 1), so the
value is A + 2B. The converter latches the carry propagate
p_i = a_i xor b_{i-1} and the carry generate g_i = a_i and b_{i-1}.
`cla_pipe` adds them with 4-bit carry-lookahead slices (`cla4`), one slice
per pipeline stage, from the least significant slice up. The other slices'
operands and finished sum bits travel along in skew registers.

### Latency and throughput

The multiplier takes one operand pair per clock. It has log2(N/2) adder
levels, one converter stage and N/2 CLA slices:

| N  | tree levels | converter | CLA slices | latency (clocks) |
|----|-------------|-----------|------------|------------------|
| 16 | 3           | 1         | 8          | 12               |
| 32 | 4           | 1         | 16         | 21               |
| 64 | 5           | 1         | 32         | 38               |

These are the stage counts the original comparison reports for this
structure. The operands are sampled at a rising `clk` edge, which loads the
first of the `LATENCY` registers. `p` and `out_valid` are valid after the
`LATENCY`-th edge, counting that first one. The handshake is only
`in_valid`/`out_valid`, with no back-pressure. `rst_n` is synchronous and
active low, and clears only the valid pipeline.

## The dynamic ternary circuits

### Phase convention

Each dynamic gate module has an `ev` input:

* While `ev` is 0 (preset), the output holds the gate's preset level: 0 for
  a negative gate (NTI, NTNAND, ...), 2 for a positive gate, 1 for a simple
  gate or an STDL.
* While `ev` is 1 (evaluate), the output is the gate's function.

A phi section evaluates while phi is low (`ev = ~phi`), and a phi-bar
section while phi is high. `c2mos_latch` is the inverting C2MOS latch stage
that closes a section. It is transparent while its section evaluates and
holds while the section presets, which is exactly when the next section
evaluates. This is why preset levels never leak forward, and it is the
race-free rule of the ternary NORA pipeline. The latch is a real
level-sensitive latch in RTL (`always_latch`). This is intended, and
synthesis reports latch bits for it.

### Gates

* `tern_inv`: NTI, PTI and STI, selected by the `KIND` parameter.
* `tern_gate2`: two-input NAND/NOR of the three kinds. The gate applies the
  kind's inverter to min (NAND) or max (NOR). For example,
  PTNAND(1,1) = PTI(1) = 2 and NTNAND(1,1) = NTI(1) = 0.
* `tern_stg`: the output stage of a simple ternary gate. It goes to 2 through
  its pull-up, to 0 through its pull-down, and otherwise stays at 1.
* `stdl_gate`: the STDL output pair Q / Q-bar. A tree path from Q to GND
  gives 0/2, a path from Q-bar gives 2/0, and no path leaves both at 1.

### Circuits built from them

* `tern_decoder`: a one-phi-section decoder of a trit into all six literals.
  An STI forms x-bar. The six branches are PTI(x), PTI(x-bar), NTI(x),
  NTI(x-bar), PTNOR(x, x-bar) and NTNAND(x-bar, x), each followed by a latch
  (giving X^2, X^0, X^12, X^01, X^02 and X^1) and a static inverter (giving
  the complementary literals). Both sets are brought out.
* `cycle_pipe`: two cascaded cycling gates (0→2, 1→0, 2→1) over
  phi / phi-bar / phi sections. `y_mid` (first gate) is valid while phi is
  high. `y` (both gates, i.e. x+1 mod 3) is valid during the next low phase
  of phi and shows the preset level 1 while phi is high.
* `stdl_kmap_example`: a three-input STDL function that shows how an STDL
  tree is read off a K-map. It takes the decoded literals of its inputs:
  Q = 0 for C=0 with A=0 or (A=1, B=0), and for A=B=0 with C=1;
  Q = 2 for C=2 with A=2 or B=2, and for A=B=2 with C=1;
  otherwise Q = 1.
* `tern_block`: the general building block of a pipelined ternary
  function. One `tern_decoder` per input forms a phi section, and the STDL
  gate (here `stdl_kmap_example`) opens the following phi-bar section. Inputs
  are sampled at the end of a low phase; Q is valid during the next high
  phase.
* `stdl_stnand3`: the three-input simple ternary NAND as an STDL. It was the
  fabricated test circuit. Q = 2 - min(x, y, z).

### Top level (`tern_top`)

The multiplier (clocked by `clk`) and the two-phase circuits (clocked by
`phi`: the decoder, the cycling pipeline, the building block and the STDL
STNAND) sit side by side, each with its own ports. Two analog parts are not
part of the RTL and have to be supplied from outside: the two-phase clock
generator, and the on-chip generators of the 1/3 VDD and 2/3 VDD levels.

## Where this RTL departs from, or goes beyond, the source design

* One "pipeline stage" is one clock period with ordinary edge-triggered
  registers. The original two-phase latch timing inside the multiplier is
  not reproduced. The gate-level circuits do keep the two phases.
* Three choices are this design's own, because the source does not give
  them: the pairing of partial-product rows (2k, 2k+1), the balanced adder
  tree, and the skewed-register form of the CLA pipeline. The tree and the
  CLA pipeline reproduce the reported stage counts.
* The two-stage adder (`rpd_adder2`: rows of R2A1, R2A2 and R2A3 cells, with
  a register after each of the first two) is the other adder structure.
  `tern_mult` uses it when `TWO_STAGE_ADD = 1`. Each adder level then costs
  two stages, so the 16 x 16 latency becomes 15. The default is the
  one-stage R2A4 form, which the reported latencies refer to.
* The STDL trees are written as their two path functions, not as the drawn
  transistor sharing. Internal precharge, transmission-gate preset and the
  dead band are electrical refinements with no logic effect.
* The AND-OR-invert / OR-AND-invert simple ternary gates are only named in
  the source and are not provided.
* Device counts (7700 / 23800 / 75200 for 16/32/64 bits) and clock rates
  (50 MHz, 75 MHz scaled) are circuit results and cannot be checked in RTL.
* `N` must be a power of two and at least 4. The default is 16, the smallest
  size evaluated.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To build one with Verilator 5 from the
project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
  rtl/tern_pkg.sv tb/tern_top_tb.sv --top-module tern_top_tb -Mdir obj
./obj/Vtern_top_tb
```

The testbenches are:

* `tern_top_tb` runs the whole design at its default parameters. It streams
  1500 random products with idle gaps, checking each product and its
  latency of 12. It drives the ternary circuits with random inputs for 400
  phi periods. It counts back-to-back products, pipeline bubbles, preset
  phases and every output level of every ternary circuit, and fails if any
  of them never occurs.
* `tern_mult_tb` checks the multiplier at N = 16, including corner operands.
  `tern_mult_two_stage_tb` does the same with the two-stage adders
  (latency 15).
* `tern_mult_sizes_tb` runs the 32 x 32 and 64 x 64 configurations and checks
  the latencies 21 and 38. Its C++ build is slow: several minutes for the
  64-bit instance.
* There is one testbench per module, named `<module>_tb`. The combinational
  gates are checked exhaustively against their truth tables.

Every testbench has a watchdog and uses only `$urandom`.
