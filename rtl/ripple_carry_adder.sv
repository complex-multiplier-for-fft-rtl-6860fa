// ripple_carry_adder: W-bit ripple-carry adder; in the complex multiplier it
// forms the imaginary part AD + BC.
//
// Bit 0 is a half adder (there is no carry input); bits 1..W-1 are full adders,
// each taking the carry of the bit below, so the carry ripples from bit 0 to
// bit W-1. s is the sum modulo 2^W, which for two's complement operands is the
// wrapped signed sum; co is the carry out of the top bit. Purely
// combinational. The 8-bit width and the half-adder/full-adder chain follow
// the original design.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(s[0]), .co(c[1]));
  assign c[0] = 1'b0;

  for (genvar i = 1; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
