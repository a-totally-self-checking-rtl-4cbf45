// One-bit full adder, the main cell of the weight generator's adder tree.
// s = a ^ b ^ ci, co = majority(a, b, ci). Combinational.
// The weight generator is a network of full and half adders, as the
// published circuit prescribes; this cell is the plain textbook gate form.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
