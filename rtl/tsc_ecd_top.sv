// Error correcting/detecting circuit for a SEC/DED/AUED code together with its
// built-in self-exercising mechanism.
//
// Normal mode (t = 0): the received word, Hamming part data_x and check symbol
// data_b, goes to the checker core; corr_x / corr_b carry the corrected code
// word, valid when q0 != q1. q0 == q1 flags an error that can only be
// detected. Everything in this path is combinational.
// Test mode (t = 1): the X and Y inputs of the core are driven by the test
// pattern generator. Pulse load_one or load_many (asynchronous) to preset the
// shift register, then keep t high: each rising clk edge moves to the next of
// the 2^r - 1 rotations. z0 == z1 on any of the 2(2^r - 1) vectors reveals a
// stuck-at fault in the core. data_b is still compared in test mode, so q0/q1
// are meaningless there.
// The split of the mechanism into core and register and the test-mode data
// selection follow the published circuit; the port set is this design's.
module tsc_ecd_top #(
  parameter int unsigned K = 8
) (
  input  logic                                                                clk,
  input  logic                                                                t,
  input  logic                                                                load_one,
  input  logic                                                                load_many,
  input  logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0]   data_x,
  input  logic [2*$clog2(secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))+1)-1:0] data_b,
  output logic [secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))-1:0]   corr_x,
  output logic [2*$clog2(secded_aued_pkg::code_len(secded_aued_pkg::r_for_k(K))+1)-1:0] corr_b,
  output logic                                                                z0,
  output logic                                                                z1,
  output logic                                                                q0,
  output logic                                                                q1
);
  import secded_aued_pkg::*;

  localparam int unsigned R = r_for_k(K);
  localparam int unsigned N = code_len(R);

  logic [N-1:0] tpg_x, tpg_y, core_x;

  test_pattern_gen #(.K(K)) u_tpg (
    .clk(clk), .t(t), .load_one(load_one), .load_many(load_many),
    .x(tpg_x), .y(tpg_y)
  );

  assign core_x = t ? tpg_x : data_x;

  tsc_ecd_core #(.K(K)) u_core (
    .x(core_x), .y(tpg_y), .t(t), .b(data_b),
    .xc(corr_x), .bc(corr_b), .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );
endmodule
