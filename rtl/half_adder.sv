// half_adder: one-bit half adder, the first cell of the ripple-carry adder.
//
// Purely combinational: s = a xor b, co = a and b. The gate form is the
// textbook one; only the cell's function is taken from the original design.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
