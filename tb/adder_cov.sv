// Coverage probe bound into the adder cells: reports each input combination
// of the enclosing cell to tb_cov_pkg, also when recording is switched on
// while the inputs stand still. A full adder (NIN = 3) must see all eight
// combinations, a half adder (NIN = 2) all four.
module adder_cov #(
  parameter int unsigned NIN = 3
) (
  input logic [2:0] v
);
  import tb_cov_pkg::*;

  localparam logic [15:0] NEED = (NIN == 3) ? 16'h00ff : 16'h000f;

  always @(v or tb_cov_pkg::enable) tb_cov_pkg::note($sformatf("%m"), NEED, {1'b0, v});
endmodule
