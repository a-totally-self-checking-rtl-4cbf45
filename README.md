# Totally self-checking decoder for SEC/DED/AUED codes

Memory words protected by a Hamming code can correct one flipped bit, but a
fault that pulls many bits the same way (a stuck line, a failing power rail)
can turn one code word into another and pass unnoticed. A SEC/DED/AUED code
corrects any single error, detects any double error, and detects **all
unidirectional errors** (any number of bits that all went 0→1, or all 1→0).
It does this by appending a weight-based check symbol to a Hamming code word.

The circuit here is the decoder for such a code, built so that the decoder
itself is **totally self-checking (TSC)**. Its verdict is a two-rail pair
`(q0, q1)`:

- `q0 != q1`: the word was correct or has been corrected.
- `q0 == q1`: the error can only be detected, not corrected.

A single stuck-at fault inside the decoder either does not change the result,
or sooner or later shows up as `q0 == q1` (or `z0 == z1`). A few decoder
faults are never exercised by normal traffic. A built-in self-exercising mode
catches those: a small shift register and r XOR trees feed the decoder
2(2^r − 1) test patterns.

The RTL is parameterised by the number of information bits `K`. The defaults
are for k = 8. k = 4, 16, 32 and 64 are also supported and simulated.

## The code

A code word is `X B1 B2`.

**X: a shortened Hamming code with r check bits.** Bits are numbered by
Hamming position 1 … 2^r − 1. The parity-check column of a position is its
binary value, so the syndrome of a single error is the position of the bad
bit. Positions 1, 2, 4, 8, … are check bits; all others carry data. For k = 8
the complete (15,11) code is shortened by deleting positions 6, 9 and 15. That
leaves 12 positions: 1 2 3 4 5 7 8 10 11 12 13 14. An N-bit vector `x[N-1:0]`
holds them in that ascending order, so `x[0]` is position 1 and `x[11]` is
position 14.

The deleted columns are not arbitrary. The all-ones word must stay a code
word, because the self-test patterns and the full self-test of the weight
counter depend on it. That is the case exactly when every row of the deleted
columns holds an even number of ones. The rule used for each size
(`secded_aued_pkg::col_removed`):

| k  | r | n = k + r | deleted columns                                       | register length |
|----|---|-----------|-------------------------------------------------------|-----------------|
| 4  | 3 | 7         | none (complete code)                                  | 7               |
| 8  | 4 | 12        | 6, 9, 15                                              | 15              |
| 16 | 5 | 21        | the 10 columns of weight 3 (3-out-of-5)               | 31              |
| 32 | 6 | 38        | 20 columns of weight 3, plus 3, 6, 12, 24, 17 (25)    | 63              |
| 64 | 7 | 71        | 35 columns of weight 3 and 21 of weight 5 (56)        | 127             |

The column sets for k = 32 and 64 are this design's own choice. Any set that
meets the even-row rule works.

**B1 B2: the check symbol.** This implementation fixes the check symbol as
follows:

- B1 is the bitwise complement of the L-bit count of ones in X, with
  L = ⌈log2(n + 1)⌉.
- B2 is a copy of B1.
- For k = 8 that makes 4 + 4 bits, so a full code word has 20 bits.

Two properties make the code work:

- **Unidirectional errors are caught.** A Berger-style complemented count
  moves the opposite way to any unidirectional error. Say bits fall 1→0. The
  data weight drops, so its complemented count rises. Meanwhile 1→0 errors in
  the stored check symbol can only lower it. The two can never meet again.
- **Different symbols are far apart.** Because of the duplication, the check
  symbols of two different weights differ in at least two bits. So one
  flipped check bit can be corrected and two can be detected.

This symbol was checked exhaustively for k = 8:

- every single and every double error of all 256 code words;
- about 9 000 random unidirectional errors.

If you substitute another weight-dependent symbol, the rest of the circuit is
unchanged. Only `weight_generator` and the width of B change.

## How a word is checked

```
           X ──► S1 ──pairs──► M (XOR) ──syndrome──► SD ──one-hot──► EC ──► X'
                  │                                                   ▲      │
                  └──pairs, one rail inverted──► C1 ──(F0,F1)         Y      ├─► S2 ─► C2 ──(Z0,Z1)
                                                   │                         └─► G ──► B1'B2'
        B1 B2 ─────────────────────────────────────┴──► CC ◄── B1'B2'
                                                        │
                                         (Z0,Z1) + CC pair ─► two-rail checker ─► (Q0,Q1)
```

- **S1 / S2** (`syndrome_pair_gen`) compute each syndrome bit as a pair of
  signals. `a[i]` is the received check bit of row i. `b[i]` is the parity of
  the data bits that row covers. The pair is equal exactly when syndrome bit
  i is 0. S2 is the same circuit applied to the corrected word.
- **M** (`syndrome_xor`) XORs each pair into the syndrome.
- **C1 / C2** (`two_rail_checker`) receive `(a[i], ~b[i])`. That pair has
  different rails when syndrome bit i is 0. A tree of standard two-pair cells
  (`two_rail_cell`) reduces the pairs to one.
  - C1 gives (F0, F1). F0 != F1 means the received X had a zero syndrome.
  - C2 gives (Z0, Z1). Z0 != Z1 means the corrected X' is a code word.
- **SD** (`syndrome_decoder`) raises one output per bit of X, when the syndrome
  equals that bit's position. A zero syndrome raises nothing. So does a
  syndrome equal to a deleted position.
- **EC** (`error_corrector`) XORs the decoder outputs into the word.
- **G** (`weight_generator`) recomputes the check symbol from X' with a
  network of full and half adders.
- **CC** (`second_order_comparator`) compares the received B with the
  recomputed B'. Its output pair is a code value in two cases:
  - B = B';
  - B and B' differ in exactly one bit, and C1 reports that nothing was
    corrected in X. That is a single error in the check symbol; the output
    B' is then the corrected symbol.
  Any other difference, or a one-bit difference together with a correction
  in X, gives (0,0).
- The final **two-rail checker** merges (Z0, Z1) with the CC pair into
  (Q0, Q1).

What each kind of error does:

| received word                           | F0,F1   | SD/EC            | CC pair    | Z      | Q                   |
|-----------------------------------------|---------|------------------|------------|--------|---------------------|
| code word                               | differ  | nothing          | code       | code   | code, X'B' = word   |
| one error in X                          | equal   | corrects it      | code (B=B')| code   | code, corrected     |
| one error in B                          | differ  | nothing          | code (D=1) | code   | code, B' corrected  |
| one in X, one in B                      | equal   | corrects X       | non-code   | code   | **detected**        |
| two in X, syndrome names a kept bit     | equal   | miscorrects      | non-code   | code   | **detected**        |
| two in X, syndrome of a deleted column  | equal   | nothing          | —          | non-code | **detected**      |
| two in B                                | differ  | nothing          | non-code   | code   | **detected**        |
| unidirectional, 3 or more bits          | any     | any              | non-code, or Z non-code | — | **detected** |

All of this is combinational. There is no clock in the checking path, so
results are valid one propagation delay after the inputs change.

## Self-exercising test mode

Normal traffic leaves some faults unexercised:

- Faults in M, SD and EC are only exercised by words that carry a single
  error, which are rare.
- Some SD faults are never exercised at all. An example is an output that
  also fires for a syndrome no single error produces.

`test_pattern_gen` provides the periodic test:

- A circular register of 2^r − 1 stages Z1 … Z(2^r−1), one per position of the
  complete Hamming code, deleted positions included.
- It is preset asynchronously by one of two strobes:
  - `load_one` loads a single 1 at position 1;
  - `load_many` loads a single 0 at position 1.
- While `t` is high it rotates one place per clock.
- Each preset is the first of its 2^r − 1 rotations. Two presets and
  2 × (2^r − 2) shifts therefore give all 2(2^r − 1) patterns: 30 patterns in
  28 clocks for k = 8.
- In test mode the register drives both data inputs of the decoder:
  - **Y** (the word EC corrects) takes the stages of the kept positions.
  - **X** (the word S1 sees) takes the same stages, except that each check
    position 2^i is replaced by Z(2^i) XOR the deleted-position stages that
    row i covers. For k = 8:
    - P1 = Z1⊕Z9⊕Z15
    - P2 = Z2⊕Z6⊕Z15
    - P4 = Z4⊕Z6⊕Z15
    - P8 = Z8⊕Z9⊕Z15

  The syndrome of X is then the syndrome of the whole register in the
  complete code. That is simply the position of the odd bit, because the
  all-ones word is a code word. EC therefore either removes the odd bit from Y
  or, when the odd bit sits at a deleted position, must leave Y alone. Either
  way a fault-free decoder ends with X' = all zeros (weight-one pattern) or
  X' = all ones (the other pattern). Both are code words, so `z0 != z1`.
  `z0 == z1` on any pattern reveals a fault.

A test sequence on `tsc_ecd_top`:

1. Set `t = 1`.
2. Pulse `load_one`; check `z0 != z1`.
3. Clock 14 times, checking after each clock.
4. Pulse `load_many` and repeat.
5. Return `t` to 0.

`data_b` is not driven by the register, so `q0/q1` mean nothing in test mode.
There is deliberately no test sequencer: the mechanism consists only of the
register and the XOR trees. Scheduling the test is left to the surrounding
system.

## Modules

| file                              | role                                                      |
|-----------------------------------|-----------------------------------------------------------|
| `rtl/secded_aued_pkg.sv`          | code constants: r for k, kept positions, row masks        |
| `rtl/tsc_ecd_top.sv`              | top: decoder plus test pattern generator, mode select     |
| `rtl/tsc_ecd_core.sv`             | the checking data path (S1 … output checker)               |
| `rtl/syndrome_pair_gen.sv`        | S1, S2                                                    |
| `rtl/syndrome_xor.sv`             | M                                                         |
| `rtl/two_rail_checker.sv`         | C1, C2, output checker (tree of cells)                    |
| `rtl/two_rail_cell.sv`            | two-pair two-rail checker cell                            |
| `rtl/syndrome_decoder.sv`         | SD                                                        |
| `rtl/error_corrector.sv`          | EC                                                        |
| `rtl/weight_generator.sv`         | G (network of adder cells)                                |
| `rtl/full_adder.sv`               | full adder cell of G                                      |
| `rtl/half_adder.sv`               | half adder cell of G                                      |
| `rtl/second_order_comparator.sv`  | CC                                                        |
| `rtl/test_pattern_gen.sv`         | self-exercising shift register and XOR trees              |

Top ports, for k = 8:

- `data_x[11:0]` and `data_b[7:0]`: the received word.
- `corr_x` and `corr_b`: the corrected word.
- `q0`, `q1`: the verdict.
- `z0`, `z1`: the test-mode verdict.
- `t`: test mode.
- `clk`, `load_one`, `load_many`: the register's clock and preset strobes.

No encoder is included. To make a code word:

1. Put the data bits in the non-power-of-two positions.
2. Set each check bit so that the syndrome is zero.
3. Append the complemented count of ones, twice.

`tb/tb_ref_pkg.sv` has a reference `encode` for k = 8.

## Simulating

Every testbench prints one `TB_RESULT checks=N failures=M` line. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/secded_aued_pkg.sv tb/tb_tsc_ecd_top.sv --top-module tb_tsc_ecd_top
./obj_dir/Vtb_tsc_ecd_top
```

The testbenches:

- **`tb_tsc_ecd_top`** runs the full design at the default size:
  - all 256 words, clean and with every single error;
  - random double and unidirectional errors;
  - the complete self-test, with its clock count;
  - a forced stuck-at-0 and stuck-at-1 on each decoder output line, each of
    which the self-test must catch.

  It counts each mechanism and fails if one never happened: X correction,
  B correction, double detection, unidirectional detection, both presets,
  patterns with a deleted-column syndrome, and mode switches.
- **`tb_tsc_ecd_core`** applies every single and double error to all 256 code
  words exhaustively.
- **`tb_tsc_ecd_sizes`** (with helper `tb/ecd_size_check.sv`) instantiates the
  top at k = 4, 8, 16, 32 and 64. Each size gets random traffic and its full
  self-test.
- **`tb_tsc_fault_campaign`** injects single stuck-at faults, one at a
  time, in three sets:
  - each bit of every line between the blocks of the decoder, held at 0 and
    at 1 (196 faults);
  - inside the syndrome decoder, one input of an output's AND gate stuck at
    its active value (48 faults);
  - the sum or carry output of each adder cell of G, held at 0 and at 1
    (40 faults).

  Each fault gets all code words, single errors and the full self-test.
  Results at k = 8:
  - every fault is detected;
  - every adder-cell fault is already detected by code words;
  - no fault ever yields a wrong code word flagged as good (fault secure);
  - 12 of the decoder-internal faults are caught **only** by the
    self-exercising test. These are the gates that would also fire for a
    deleted column's syndrome, which is the reason the test mode exists.

  One effect to be aware of: a fault on the weight generator can leave a
  wrong B1' B2' while q0 != q1. The output word is then not a code word, so
  a checker on the output bus catches it, but q0/q1 alone do not.
- **`tb_tsc_test_sets`** checks, at k = 8, that error-free traffic delivers
  every two-rail cell of C1, C2 and the output checker all four code input
  combinations. It also checks that every XOR gate of M and EC sees all its
  input combinations over code words and single errors. Every full and half
  adder of G must see all its input combinations from code words alone.
- **`tb_tsc_cell_coverage`** (with helpers `tb/cell_cov_check.sv`,
  `tb/trc_cov.sv`, `tb/adder_cov.sv` and `tb/tb_cov_pkg.sv`) repeats the
  cell-level part of that check at every size, k = 4 to 64. Every two-rail
  cell must see its four code input combinations, and every adder cell all
  of its input combinations. Only error-free code words are applied: all of
  them up to k = 16, and 20 000 random words of varying density of ones at
  k = 32 and 64. All cells pass at all sizes: 9, 17, 27, 46 and 80 cells.
- The other `tb_<module>` files test one module each, most of them
  exhaustively.

## Where this design makes its own choices

The block structure, the meaning of every signal, the shortening rule, the
k = 8 column set, the register and its XOR trees follow the published
circuit. These points are this implementation's own:

- **The check symbol** (duplicated complemented weight), described above.
- **Pair split in S1/S2.** Each pair is check bit vs. data parity, and the
  inverted rail going into C1/C2 is the data-parity one.
- **CC gates.** The comparator's output is
  - (B[0], ¬B[0]) when B = B',
  - (F0, F1) when they differ in one bit,
  - (0, 0) otherwise.

  The first case takes its phase from the check symbol, not from (F0, F1).
  (Z0, Z1) follows the same phase as (F0, F1) on error-free words, so this
  keeps the two inputs of the output checker independent. That checker then
  receives all four code combinations during normal operation. The
  comparator's inner gates were not designed further for self-testing.

- **The weight counter's structure.** It is a network of full and half
  adders, as the circuit calls for, but its arrangement is this design's own.
  It is a carry-save column compressor. In each column, a full adder takes
  the next three bits of equal weight and puts its sum back in line, and a
  final pair goes through a half adder. The carries form the next column. The
  data bits enter in a strided order, bit (j·S mod n), where S is the smallest
  number ≥ 2 that shares no factor with n (S = 5 for n = 12). In plain order,
  two groups of three bits always have equal parity on code words. The cell
  adding those groups would then never see some of its inputs, and the
  counter would not be self-testing. With the strided order,
  `tb_tsc_test_sets` shows that all 10 cells at k = 8 see every input
  combination from the 256 code words. `tb_tsc_cell_coverage` shows the same
  for every size from k = 4 to 64. The top cells need words of weight
  near n for their last combinations, which is one reason the all-ones word
  is kept a code word.
- **Circuits written at word level.** The SD outputs are equality compares,
  and CC is written as word-level expressions. TSC properties hold for a
  specific gate network, and synthesis may restructure these modules. A gate-level
  TSC implementation must keep the intended structure, such as the adder
  cells and the two-rail cells as separate cells.
- **Mode select.** The pass transistors that select between normal and test
  inputs are modelled as multiplexers.
- **Register details.**
  - The register rotates on every clock while `t` is high.
  - The odd bit of both presets is at position 1.
  - One preset strobe drives the flip-flops' asynchronous set/reset, with
    `load_many` selecting the polarity.
- **Larger sizes.** The deleted columns for k = 32 and 64 are this design's
  choice.
