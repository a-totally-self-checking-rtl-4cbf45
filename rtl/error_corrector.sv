// Error correction module EC: a row of N two-input XOR gates.
//
// XOR gate j takes bit j of the word y and decoder output d[j], so the one bit
// the decoder points at is inverted and all others pass unchanged. Follows the
// published description. Combinational.
module error_corrector #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0] y,
  input  logic [N-1:0] d,
  output logic [N-1:0] xc
);
  assign xc = y ^ d;
endmodule
