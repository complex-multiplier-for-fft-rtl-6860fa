// ripple_carry_subtractor: W-bit ripple-carry subtractor; in the complex
// multiplier it forms the real part AC - BD.
//
// Two's complement subtraction a - b = a + ~b + 1: every bit of b is inverted
// and a chain of W full adders adds it to a with the carry into bit 0 tied to
// 1. d is the difference modulo 2^W; co is the carry out of the top bit
// (1 means no borrow for unsigned operands). Purely combinational. The 8-bit
// ripple structure is the original design's; the invert-and-carry-in method
// is this design's reading of it.
module ripple_carry_subtractor #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] d,
  output logic         co
);
  logic [W:0]   c;
  logic [W-1:0] nb;

  assign nb   = ~b;
  assign c[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(nb[i]), .ci(c[i]), .s(d[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
