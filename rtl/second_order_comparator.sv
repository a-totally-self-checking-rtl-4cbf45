// Second order comparator CC.
//
// It compares the received check symbol b with the regenerated one bp and
// takes the pair (f0, f1) from two-rail checker C1, whose rails differ when
// the received Hamming word had a zero syndrome. Its output pair (c0, c1) is a
// two-rail code value when
//   - b and bp are equal, or
//   - they differ in exactly one bit and no bit of X was corrected
//     (f0 != f1): a single error in the check symbol, corrected by taking bp.
// Otherwise (two or more differing bits, or one differing bit together with a
// correction in X) c0 == c1 flags an uncorrectable error. That rule is the
// published one; the gate structure is this design's: with no difference the
// output is (b[0], ~b[0]), with one difference it is (f0, f1), and otherwise
// (0, 0). Taking the phase of the first case from the check symbol rather
// than from (f0, f1) keeps it independent of the pair (Z0, Z1) it meets in
// the output checker, so that checker receives all four code combinations
// from error-free words. Combinational.
module second_order_comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] bp,
  input  logic         f0,
  input  logic         f1,
  output logic         c0,
  output logic         c1
);
  logic [W-1:0] diff;
  logic         none, one;

  assign diff = b ^ bp;
  assign none = (diff == '0);
  assign one  = !none && ((diff & (diff - W'(1))) == '0);

  assign c0 = (none & b[0])  | (one & f0);
  assign c1 = (none & ~b[0]) | (one & f1);
endmodule
