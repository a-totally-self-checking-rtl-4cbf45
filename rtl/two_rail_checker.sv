// Two-rail checker: a tree of two-pair-input two-rail checker cells.
//
// It reduces P input pairs (r0[i], r1[i]) to one output pair (f0, f1). The
// output pair has different rails only when every input pair has different
// rails. The tree is laid out like a heap of 2P-1 nodes: node P-1+i holds
// input pair i, and each inner node i is a two_rail_cell fed by nodes 2i+1
// and 2i+2; node 0 is the output. This gives P-1 cells for any P and a depth
// of clog2(P). The tree of two-pair cells follows the published description
// of C1; the heap arrangement is this design's choice. Used as C1, C2 and the
// output checker. Combinational.
module two_rail_checker #(
  parameter int unsigned P = 4
) (
  input  logic [P-1:0] r0,
  input  logic [P-1:0] r1,
  output logic         f0,
  output logic         f1
);
  logic [2*P-2:0] n0, n1;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    assign n0[P-1+i] = r0[i];
    assign n1[P-1+i] = r1[i];
  end

  for (genvar i = 0; i < P - 1; i++) begin : g_cell
    two_rail_cell u_cell (
      .x0(n0[2*i+1]), .x1(n1[2*i+1]), .y0(n0[2*i+2]), .y1(n1[2*i+2]),
      .z0(n0[i]), .z1(n1[i])
    );
  end

  assign f0 = n0[0];
  assign f1 = n1[0];
endmodule
