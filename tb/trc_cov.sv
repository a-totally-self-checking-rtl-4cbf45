// Coverage probe bound into two_rail_cell: reports each combination of the
// cell's inputs {x0, x1, y0, y1} to tb_cov_pkg. The cell's test set is the
// four combinations in which both input pairs are code values (01 or 10):
// 0101, 0110, 1001 and 1010.
module trc_cov (
  input logic [3:0] v
);
  import tb_cov_pkg::*;

  localparam logic [15:0] NEED = 16'h0660;

  always @(v or tb_cov_pkg::enable) tb_cov_pkg::note($sformatf("%m"), NEED, v);
endmodule
