// Generator of syndrome pairs (S1 and S2 of the error C/D circuit).
//
// It holds r parity checkers, one per row of the parity check matrix. Row i
// gives a pair (a[i], b[i]): a[i] is the received check bit of the row (the bit
// at Hamming position 2^i) and b[i] is the parity of the information bits the
// row covers. Their XOR is syndrome bit i, so the pair is equal exactly when
// that syndrome bit is zero. The same module serves as S1 (on the received
// word) and as S2 (on the corrected word). That S1 and S2 are r parity
// checkers giving pairs follows the published circuit; splitting each row into
// "check bit" and "information bits" is this design's choice.
//
// Interface: x is the N-bit word in Hamming position order (see
// secded_aued_pkg); a and b are R bits each. Purely combinational.
module syndrome_pair_gen #(
  parameter int unsigned K = 8
) (
  input  logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0] x,
  output logic [secded_aued_pkg::r_for_k(K)-1:0]                            a,
  output logic [secded_aued_pkg::r_for_k(K)-1:0]                            b
);
  import secded_aued_pkg::*;

  localparam int unsigned R = r_for_k(K);
  localparam int unsigned N = code_len(R);

  for (genvar i = 0; i < R; i++) begin : g_row
    localparam logic [MAXPOS-1:0] MASK = info_row_mask(R, N, i);
    localparam int unsigned       CIDX = check_index(R, N, i);
    assign a[i] = x[CIDX];
    assign b[i] = ^(x & MASK[N-1:0]);
  end
endmodule
