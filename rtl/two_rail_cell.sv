// Two-pair-input two-rail checker module, the building cell of every two-rail
// checker of the design.
//
// Inputs are two pairs (x0,x1) and (y0,y1); a pair is a code value when its
// two rails differ. The outputs z0 = x0&y0 | x1&y1 and z1 = x0&y1 | x1&y0 form
// a code value exactly when both input pairs do, so an error on either input
// reaches the output as z0 == z1. This is the classic cell of totally
// self-checking two-rail checkers; the published circuit names it without
// drawing its gates. Combinational.
module two_rail_cell (
  input  logic x0,
  input  logic x1,
  input  logic y0,
  input  logic y1,
  output logic z0,
  output logic z1
);
  assign z0 = (x0 & y0) | (x1 & y1);
  assign z1 = (x0 & y1) | (x1 & y0);
endmodule
