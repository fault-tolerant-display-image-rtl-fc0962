# Fault-tolerant image data manipulation unit (DMU)

Small display systems often keep pixels in 32-bit memory words. An 8-bit or
16-bit pixel then wastes most of its word, and a 24-bit pixel wastes a quarter.
Packing the pixels densely saves frame memory and bus bandwidth. In software the
packing takes several shift and logic instructions per pixel.

This unit does the packing in hardware. It is a 64-bit barrel shifter with a
few extra paths and MUXes. Besides ordinary and SIMD-partitioned shifts, it
executes pack, unpack, expand and merge instructions in one pass.

The target is circuitry built directly on a display glass substrate
("system on panel"). Thin-film transistors there have low yield, so the shifter
is made of regular cross-point switch arrays. Every stage carries a spare switch
set that can replace a faulty one. The spare set costs mostly wiring, plus four
extra switch lines per stage.

The design follows the architecture of the original article: *Fault Tolerant
Display Image Data Manipulation Unit for SOP* (J. You, H. Lee). The article
gives the block structure, the instruction names, the extra shift distances and
the redundancy scheme of one stage. Encodings, operand conventions, timing and
the exact byte placement inside each instruction are this design's own. The
section "Where this design decides for itself" lists them.

## Instruction set

`{W1,W0}` is the 64-bit shifter operand. W2 and W3 are two more operand words
on bypass lines. Results are up to four words, `R0..R3`, and `res_cnt_o` says
how many are valid. `b[k]` is byte k of a word and `h[k]` is half-word k.

| op | result | words |
|---|---|---|
| `OP_SHL`, `OP_SHR`, `OP_SAR` | `{W1,W0}` shifted by `amt` (0..63) inside 8/16/32/64-bit partitions (`part`). Zero fill, or sign fill for `SAR`. An amount at or above the partition width leaves only fill. | 2 |
| `OP_PACK64` | `({W1,W0} >> amt)[31:0]`: a 32-bit window at any offset of the 64-bit word | 1 |
| `OP_PACK4B` | `{W3.b[sel], W2.b[sel], W1.b[sel], W0.b[sel]}` | 1 |
| `OP_PACK4HW` | `R0 = {W1.h[s], W0.h[s]}`, `R1 = {W3.h[s], W2.h[s]}`, with `s = sel[0]` | 2 |
| `OP_PUSH24P` | four 24-bit pixels `xx|8|16` become three words: `R0` = the four upper bytes `{W3[23:16]..W0[23:16]}`, `R1 = {W1[15:0], W0[15:0]}`, `R2 = {W3[15:0], W2[15:0]}` | 3 |
| `OP_POP24P` | the inverse: `Rn = {8'h00, W0.b[n], Hn}`, with `H0..H3 = W1.h0, W1.h1, W2.h0, W2.h1` | 4 |
| `OP_FPACK16` | byte `sel[0]` of each 16-bit unit of `{W1,W0}`, packed into one word | 1 |
| `OP_FPACK32` | `{W1[23:0], W0.b[sel]}`: a 24-bit pixel and one byte from another word | 1 |
| `OP_FPACKFIX` | `{W1.h[s], W0.h[s]}`: a 16-bit field from each of two words | 1 |
| `OP_EXPAND`, `OP_EXPANDS` | each 8-bit unit of W0 (16-bit if `part = PART16`) zero- or sign-extended to twice its width: a double word | 2 |
| `OP_MERGE` | the 8-bit (or 16-bit) units of W0 and W1 interleaved, W0's unit lower: a double word | 2 |

PACK4B and PACK4HW pack 8- and 16-bit pixels for the frame buffer. PUSH24P
removes the 25 % waste of 24-bit pixels. POP24P restores the one-pixel-per-word
layout that a display controller reads. The FPACK instructions, EXPAND and MERGE
prepare SIMD operands, for example for partitioned additions and
multiplications.

## Datapath

```
 W0 ─► shift_manip_stage (2^0..2^4, low)  ─┐
        ▲ stage-by-stage edge bits ▼        ├► fixed_path ─► xp_stage 2^5 ─┬► expand_merge (low word) ─┐
 W1 ─► shift_manip_stage (2^0..2^4, high) ─┘    (fixed-lane MUXes) (64 bit)  ├► expand_merge (high word)├► out_mux ─► register ─► R0..R3
 W0..W3 ───────────── bypass lines (with byte / half-word selectors for W2, W3) ─────────────────────┘
                          dmu_ctrl decodes op / amt / part / sel into all controls
```

* **`shift_manip_stage`**: five cross-point stages of distance 1, 2, 4, 8 and
  16 on one 32-bit half. There are two instances. For a 64-bit shift they
  exchange edge bits stage by stage. The high half's stage k takes the top 2^k
  input bits of the low half's stage k on a left shift. The low half takes the
  bottom bits of the high half on a right shift.
* **`fixed_path`**: MUXes on the upper four byte lanes. They add the fixed
  moves of 8, 16 and 24 bits (2^3, 2^4, 2^3+2^4) that the FPACK instructions
  need and that a partitioned shift cannot make in the same pass.
* **`xp_stage` with WIDTH 64, DIST 32**: the 2^5 stage. It serves 64-bit
  shifts and `PACK64`, and moves the word that `fixed_path` gathered down into
  the low word.
* **`expand_merge`** ×2: each builds one output word from the matching
  half-words of both halves.
* **`out_mux`**: picks and assembles the result words.
* **`dmu_ctrl`**: the decoder.

How the decoder uses the stages:

| op | 2^0..2^4 (low / high half) | fixed_path | 2^5 |
|---|---|---|---|
| SHL/SHR/SAR | `amt[4:0]`, `part` | – | `amt[5]`, `part` |
| PACK64 | right `amt[4:0]`, 64-bit | – | right if `amt[5]` |
| PACK4B / PACK4HW | right 8·sel / 16·sel[0], 32-bit partitions | – | – |
| PUSH24P | right 16, 32-bit partitions | – | – |
| FPACK16 | left 8 if `sel[0]=0`, 64-bit | lane4←1, 5←3, 6←5 | right 32 |
| FPACK32 | low half left 8·(3−sel); high half idle | lanes 7..4 ← 6..3 | right 32 |
| FPACKFIX | left 16 if `sel[0]=0`, 32-bit partitions | lanes 5..4 ← 3..2 | right 32 |
| EXPAND/MERGE/POP24P | bypass | – | bypass |

## The cross-point stage and its redundancy

`xp_stage` is the part to understand first. It shifts by a fixed distance d,
left or right, or passes its input through. It consists of four switch arrays:

* **IPR** puts input bit `IN[j]` onto a horizontal switch line.
* **RLS** holds three diagonals of switches. They connect the line of `IN[j]`
  to the output columns `O[j-d]` (right shift), `O[j]` (bypass) and `O[j+d]`
  (left shift). A switch whose path would cross a partition border (8, 16 or
  32 bits) stays open, so data never leaks into the neighbouring element.
* **ALS_IN** produces each partition's fill value: 0, or the partition's MSB
  for an arithmetic right shift.
* **BSO_C** drives that fill value onto the output positions that the shift
  vacated.

The output columns are wired-OR. An open switch therefore reads as 0, and that
is how the defect model injects faults.

There are `WIDTH + NSPARE` physical switch lines; `NSPARE` is 4. In normal
operation `IN[j]` runs on line `j+4`, called `M[j]`. When the stage's `repair`
bit is set, `IN[j]` runs on line `j`, called `RM[j]`, and a second, spare set
of IPR, RLS and BSO_C switches is used. So `M[27:0]` double as `RM[31:4]`, and
only `RM[3:0]` is new wiring.

For example, with repair set, `IN[28]` reaches `O[29]` through line `M[24]`
instead of `M[28]`. The spare switches lie on different diagonals from the
primary ones, so any set of faults in primary switches is bypassed. One repair
bit switches a whole stage, because IPR, RLS, ALS_IN and BSO_C are
interdependent.

The datapath has 11 repairable stages:

| index | stage |
|---|---|
| 0..4 | 2^0..2^4 of the low half |
| 5..9 | 2^0..2^4 of the high half |
| 10 | 2^5 |

`repair_i[10:0]` selects the spare set per stage. It is a static configuration,
for example from fuses after a panel test.

`flt_i[n]` is the defect map of stage n, a `stage_fault_t` record:

| field | bit j (or o) marks a stuck-open primary switch in |
|---|---|
| `ipr` | the IPR switch of input j |
| `rls_r`, `rls_b`, `rls_l` | the right, bypass and left RLS switches of input j |
| `bso` | the BSO_C fill switch of output o |

The defect map exists for simulation only. **Tie `flt_i` to zero in an
implementation.**

The model has these limits:

* Only stuck-open switch faults in the primary set are modelled.
* Spare switches are assumed fault-free.
* Broken lines and shorts are not modelled.
* `fixed_path`, `expand_merge`, `out_mux`, the decoder and the output register
  have no redundancy.

## Interface and timing

`dmu_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | an instruction is presented this cycle |
| `op` | in | `op_e` (4) | instruction |
| `amt` | in | 6 | shift amount |
| `part` | in | `part_e` (2) | partition / unit width |
| `sel` | in | 2 | fixed-position selector (byte or half-word) |
| `w` | in | 4×32 | operand words W0..W3 |
| `repair_i` | in | 11 | spare-set select per stage |
| `flt_i` | in | 11×`stage_fault_t` | defect maps, zero in hardware |
| `out_valid_o` | out | 1 | result valid |
| `r_o` | out | 4×32 | result words, unused ones zero |
| `res_cnt_o` | out | 3 | number of valid result words |

The datapath is combinational from operands to `out_mux`, followed by one
output register. A result appears one clock after its instruction, and one
instruction is accepted every clock. There is no back-pressure. `r_o[3][31:24]`
is constant zero, because only POP24P writes `R3` and that byte is the empty
top byte of a pixel.

## Where this design decides for itself

The article gives the block diagram, the instruction names with one-line
definitions, the shift distances of the extra paths, and the redundancy of the
2^0 stage. The following are this design's own choices:

* **Operands and results.** There are four operand words and up to four result
  words with a count. The article does not say how four-word instructions
  receive their operands on a 64-bit shifter.
* **Exact placement of each instruction.** This covers which byte or
  half-word `sel` picks, the word order inside PUSH24P/POP24P (word 0 in the
  lowest lane), zero in the unused POP24P byte, interleaving order in MERGE, and
  the signed EXPAND variant.
* **FPACK mapping.** The FPACK instructions are mapped onto a pre-shift,
  fixed-path MUXes on the upper lanes and a final 2^5 move. The article gives
  the distances 8, 16 and 24 and places the MUXes between the 2^4 and 2^5
  stages. Which lane feeds which is chosen here.
* **Redundancy in every stage.** The 2^0 stage's structure, with four spare
  lines, is reused for every stage, including the 64-bit 2^5 stage.
* **Cross-half links.** The 64-bit shifts cross between the two 32-bit blocks
  through explicit edge-bit links.
* **Border cutting.** Border data is cut by opening RLS switches. The article
  describes a block-wise path in IPR for this.
* **Timing and encoding.** This design chose the one-cycle registered
  latency, the asynchronous reset and all binary encodings.
* **Not built.** The article mentions shuffles for FFT/DCT and frame-edge
  handling as possible extensions. They are not built. Its figures of 376 extra
  interconnections and 300 2:1 MUXes are not reproduced.

## Performance context

The article compares the time to pack a frame with the unit against software
on an ARM core:

| pixels | ARM | DMU | ratio |
|---|---|---|---|
| 8-bit | 36.16 frames/s | 325.5 frames/s | 9.0 |
| 16-bit | 54.25 frames/s | 325.5 frames/s | 6.0 |

Its text says the gain is 6 times for 8-bit and 9 times for 16-bit pixels,
the reverse of what the bars give.

Its memory comparison gives 2.45, 4.91 and 9.83 Mbit per frame unpacked. That
is a 640×480 frame, which the article does not state. With PUSH24P, 24-bit
pixels take 7.37 Mbit, 75 % of 9.83 Mbit. The bar in the article is labelled
7.86.

`tb_frame_pack` streams such a frame through the unit. PACK4B, PACK4HW and
PUSH24P each take 76,800 instructions, one per clock. The packed sizes come out
at 2,457,600, 4,915,200 and 7,372,800 bits. At one instruction per clock, the
article's 325.5 frames/s corresponds to 25 M instructions/s. The article gives
no clock frequency.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.
`tb/dmu_ref_pkg.sv` holds an instruction-level reference model. It computes
each result from the instruction's definition, not from the datapath.

* `tb_xp_stage`, `tb_shift32_stage`: all directions and partitions against a
  reference shift. Random primary faults are applied with repair set, which
  must give an exact output. Targeted unrepaired faults must drop exactly the
  expected bit.
* `tb_shift_manip_stage`: every amount and partition. 64-bit mode is checked
  stage by stage with random neighbour bits. Random faults are placed in
  random stages with exactly those stages repaired.
* `tb_fixed_path`, `tb_expand_merge`, `tb_out_mux`, `tb_dmu_ctrl`: these check
  lane routing, extension rules, word assembly and decoding.
* `tb_dmu_top`: the whole unit at its default configuration.
  * It runs every instruction, partition, selector and shift amount, plus
    3,000 random instructions with idle cycles.
  * It checks the one-clock latency.
  * It then runs a fault campaign. Each of the 11 stages gets an open switch.
    The campaign checks that the fault corrupts results without repair and
    that all results are exact with that stage repaired.
  * It counts that each instruction, partition, sign fill, 64-bit border
    crossing, 2^5 shift, exposed fault and repaired fault occurred.
* `tb_frame_pack`: the 640×480 frame workload described above, including a
  POP24P round trip.

Two kinds of assertion are compiled into the RTL:

* `xp_stage` checks that exactly one switch drives every output column.
* `dmu_top` checks that each result comes one clock after its instruction,
  with one to four words.

Running a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dmu_pkg.sv tb/dmu_ref_pkg.sv tb/tb_dmu_top.sv --top-module tb_dmu_top
./obj_dir/Vtb_dmu_top
```

Replace `tb_dmu_top` by any other testbench name. Each testbench finishes in
seconds. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/dmu_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/dmu_pkg.sv` | types: instructions, partitions, controls, defect-map record |
| `rtl/xp_stage.sv` | cross-point stage with spare switch set |
| `rtl/shift_manip_stage.sv` | 2^0..2^4 block of one half |
| `rtl/fixed_path.sv` | extra 8/16/24-bit paths before the 2^5 stage |
| `rtl/expand_merge.sv` | EXPAND / MERGE word builder |
| `rtl/out_mux.sv` | result word assembly and W2/W3 selectors |
| `rtl/dmu_ctrl.sv` | instruction decoder |
| `rtl/dmu_top.sv` | the unit |
| `tb/dmu_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | testbenches |
