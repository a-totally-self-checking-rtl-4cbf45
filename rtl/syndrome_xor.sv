// Module M of the error C/D circuit: a row of r two-input XOR gates.
//
// Gate i combines the two outputs of parity checker i of the syndrome pair
// generator into syndrome bit s[i] = a[i] ^ b[i]. With code words at the
// input every gate sees (0,0) and (1,1); with single errors it also sees (0,1)
// and (1,0), so each gate is exercised exhaustively. Module and gate type are
// as in the published circuit. Combinational.
module syndrome_xor #(
  parameter int unsigned R = 4
) (
  input  logic [R-1:0] a,
  input  logic [R-1:0] b,
  output logic [R-1:0] s
);
  assign s = a ^ b;
endmodule
