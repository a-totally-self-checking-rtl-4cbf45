// Totally self-checking error correcting/detecting circuit for a SEC/DED/AUED
// code (the circuit without its test pattern generator).
//
// Data path, all combinational:
//   S1  syndrome_pair_gen   r pairs (a, b) from the received word X
//   M   syndrome_xor        syndrome s = a ^ b
//   C1  two_rail_checker    pairs (a, ~b) -> (F0, F1); F0 != F1 iff s == 0
//   SD  syndrome_decoder    s -> one-hot over the N bit positions
//   EC  error_corrector     X' = Y ^ SD output
//   S2  syndrome_pair_gen   pairs from X'
//   C2  two_rail_checker    -> (Z0, Z1); Z0 != Z1 iff X' is a Hamming code word
//   G   weight_generator    check symbol B1' B2' regenerated from X'
//   CC  second_order_comparator  received B1 B2 against B1' B2', with (F0, F1)
//   output two-rail checker (Z0, Z1) and the CC pair -> (Q0, Q1)
// When Q0 != Q1 the outputs X' B1' B2' are the corrected code word; Q0 == Q1
// means an error the code can only detect (a double error or a unidirectional
// error of any multiplicity). In test mode (t = 1) the word to correct is
// taken from the separate input y instead of x; in normal mode y is ignored and
// both S1 and EC see x, which models the pass transistor of the published
// schematic that joins the two inputs while t is low. In test mode Z0 == Z1
// reveals a stuck-at fault. Structure, block order and the meaning of every
// output follow the published circuit; which rail of each syndrome pair is
// inverted, and the inner gates of SD, G and CC, are this design's choices.
module tsc_ecd_core #(
  parameter int unsigned K = 8
) (
  input  logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0]   x,
  input  logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0]   y,
  input  logic                                                                t,
  input  logic [2*$clog2(secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))+1)-1:0] b,
  output logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0]   xc,
  output logic [2*$clog2(secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))+1)-1:0] bc,
  output logic                                                                z0,
  output logic                                                                z1,
  output logic                                                                q0,
  output logic                                                                q1
);
  import secded_aued_pkg::*;

  localparam int unsigned R = r_for_k(K);
  localparam int unsigned N = code_len(R);
  localparam int unsigned L = $clog2(N + 1);

  logic [R-1:0] s1_a, s1_b, s2_a, s2_b, syn;
  logic [N-1:0] dec, y_eff;
  logic [L-1:0] b1p, b2p;
  logic         f0, f1, c0, c1;

  assign y_eff = t ? y : x;

  syndrome_pair_gen #(.K(K)) u_s1 (.x(x), .a(s1_a), .b(s1_b));
  syndrome_xor      #(.R(R)) u_m  (.a(s1_a), .b(s1_b), .s(syn));
  two_rail_checker  #(.P(R)) u_c1 (.r0(s1_a), .r1(~s1_b), .f0(f0), .f1(f1));
  syndrome_decoder  #(.K(K)) u_sd (.s(syn), .d(dec));
  error_corrector   #(.N(N)) u_ec (.y(y_eff), .d(dec), .xc(xc));
  syndrome_pair_gen #(.K(K)) u_s2 (.x(xc), .a(s2_a), .b(s2_b));
  two_rail_checker  #(.P(R)) u_c2 (.r0(s2_a), .r1(~s2_b), .f0(z0), .f1(z1));
  weight_generator  #(.N(N)) u_g  (.x(xc), .b1(b1p), .b2(b2p));

  assign bc = {b1p, b2p};

  second_order_comparator #(.W(2*L)) u_cc (
    .b(b), .bp(bc), .f0(f0), .f1(f1), .c0(c0), .c1(c1)
  );

  two_rail_checker #(.P(2)) u_out (
    .r0({c0, z0}), .r1({c1, z1}), .f0(q0), .f1(q1)
  );
endmodule
