// Built-in self-exercising test pattern generator.
//
// A circular shift register of 2^r - 1 flip-flops, one per position of the
// complete Hamming code (Z1 .. Z(2^r-1)), plus r XOR trees. The register is
// preset to one of two vectors through asynchronous set/reset: load_one gives
// weight one (a single 1 at position 1) and load_many gives weight 2^r - 2 (a
// single 0 at position 1); load_many wins if both are high. While test mode t is high it rotates by one
// position per clock, Z(p) taking Z(p-1) and Z1 taking the last stage, so each
// vector visits all 2^r - 1 rotations: 2(2^r - 1) test vectors in all.
//
// Outputs, N bits in Hamming position order:
//   y = the register stages of the positions kept by the shortened code;
//   x = the same, except that check position 2^i carries
//       P(2^i) = Z(2^i) XOR (the stages of the removed positions that row i
//       covers). The syndrome of x is then the syndrome of the whole register
//       in the complete code, which reaches the decoder outputs that ordinary
//       single errors never select.
// The register, its length, the two vector weights, the XOR trees and the
// mapping onto X and Y follow the published mechanism; the bit that carries
// the odd value and the rotation while t is high are this design's choices.
module test_pattern_gen #(
  parameter int unsigned K = 8
) (
  input  logic                                                              clk,
  input  logic                                                              t,
  input  logic                                                              load_one,
  input  logic                                                              load_many,
  output logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0] x,
  output logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0] y
);
  import secded_aued_pkg::*;

  localparam int unsigned R   = r_for_k(K);
  localparam int unsigned N   = code_len(R);
  localparam int unsigned LEN = (1 << R) - 1;

  localparam logic [LEN:1] VEC_ONE  = LEN'(1);
  localparam logic [LEN:1] VEC_MANY = ~LEN'(1);

  logic [LEN:1] z;
  logic         preset;

  // Either load strobe presets the register asynchronously; load_many selects
  // which stages are set and which are reset.
  assign preset = load_one | load_many;

  always_ff @(posedge clk or posedge preset) begin
    if (preset)  z <= load_many ? VEC_MANY : VEC_ONE;
    else if (t)  z <= {z[LEN-1:1], z[LEN]};
  end

  for (genvar j = 0; j < N; j++) begin : g_bit
    localparam int unsigned POS = kept_pos(R, j);
    assign y[j] = z[POS];
    if ((POS & (POS - 1)) == 0) begin : g_check
      localparam int unsigned       ROW  = $clog2(POS);
      localparam logic [MAXPOS-1:0] MASK = removed_row_mask(R, ROW);
      assign x[j] = z[POS] ^ (^({z, 1'b0} & MASK[LEN:0]));
    end else begin : g_info
      assign x[j] = z[POS];
    end
  end
endmodule
