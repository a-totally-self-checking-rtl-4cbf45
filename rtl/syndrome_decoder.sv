// Syndrome decoder SD: an r-to-n decoder.
//
// Output d[j] is 1 when the syndrome s equals the Hamming position of bit j of
// the word, i.e. when a single error in bit j would give this syndrome. The
// output for the all-zeros syndrome and the outputs for the positions removed
// by shortening are left out, so those syndromes raise no output. Follows the
// published description. Combinational.
module syndrome_decoder #(
  parameter int unsigned K = 8
) (
  input  logic [secded_aued_pkg::r_for_k(K)-1:0]                            s,
  output logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0] d
);
  import secded_aued_pkg::*;

  localparam int unsigned R = r_for_k(K);
  localparam int unsigned N = code_len(R);

  for (genvar j = 0; j < N; j++) begin : g_out
    localparam int unsigned POS = kept_pos(R, j);
    assign d[j] = (s == POS[R-1:0]);
  end
endmodule
