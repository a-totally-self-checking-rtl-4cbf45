// One-bit half adder, used by the weight generator's adder tree where a
// column is left with two bits. s = a ^ b, co = a & b. Combinational.
// The weight generator is a network of full and half adders, as the
// published circuit prescribes; this cell is the plain textbook gate form.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
