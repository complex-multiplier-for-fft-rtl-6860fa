// full_adder: one-bit full adder, the cell from which the ripple-carry adder,
// the subtractor and the multiplier array are built.
//
// Purely combinational: s = a xor b xor ci, co = majority(a, b, ci), i.e. the
// truth table of the original cell. The sum uses two cascaded XORs and the
// carry the usual AND-OR form; the exact gate netlist is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
