// complex_multiplier: registered complex multiplier, the basic arithmetic unit
// of a radix-4 FFT butterfly.
//
// Computes (A + jB)(C + jD) = (AC - BD) + j(AD + BC) for N-bit two's
// complement parts. Four input buffer registers (fifo) each hold the operand
// pair of one signed_multiplier: {A,C}, {B,D}, {A,D}, {B,C}. The four 2N-bit
// products feed a ripple_carry_subtractor (AC - BD) and a ripple_carry_adder
// (AD + BC), whose results are captured by two output buffer registers.
// The path from the input registers through a multiplier and the subtractor
// to the output registers is the single combinational stage, so the clock
// period must cover register delay + multiplier + subtractor.
//
// Timing: operands applied before clock edge k are captured at edge k; the
// product appears on re/im just after edge k+1 (two-edge latency) and a new
// operand set is accepted every cycle. rst_n is active low and synchronous; it
// clears all six registers, so re/im read 0 after a reset edge.
//
// Results are 2N bits and wrap modulo 2^(2N). The only operand set that does
// not fit is A = B = C = D = -2^(N-1), whose imaginary part 2^(2N-1) wraps to
// -2^(2N-1); the real part always fits.
//
// The unit mix (six 2N-bit buffers, four multipliers, one adder, one
// subtractor), N = 4 and the 2N = 8-bit datapath follow the original design.
// The assignment of the six buffers to operand pairs and results is this
// design's own reading.
module complex_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [N-1:0]  a,     // real part of the first operand
  input  logic signed [N-1:0]  b,     // imaginary part of the first operand
  input  logic signed [N-1:0]  c,     // real part of the second operand
  input  logic signed [N-1:0]  d,     // imaginary part of the second operand
  output logic signed [2*N-1:0] re,   // AC - BD, registered
  output logic signed [2*N-1:0] im    // AD + BC, registered
);
  localparam int unsigned W = 2 * N;

  // Operand pairs of the four multipliers: index 0 = AC, 1 = BD, 2 = AD, 3 = BC.
  logic [W-1:0] pair_d [4];
  logic [W-1:0] pair_q [4];
  logic [W-1:0] prod   [4];

  assign pair_d[0] = {a, c};
  assign pair_d[1] = {b, d};
  assign pair_d[2] = {a, d};
  assign pair_d[3] = {b, c};

  for (genvar m = 0; m < 4; m++) begin : g_mul
    fifo #(.W(W)) u_in (.clk(clk), .rst_n(rst_n), .d(pair_d[m]), .q(pair_q[m]));
    signed_multiplier #(.N(N)) u_mul (
      .x(pair_q[m][W-1:N]),
      .y(pair_q[m][N-1:0]),
      .z(prod[m])
    );
  end

  logic [W-1:0] re_d, im_d;
  // Carries out of the top bit. They are left unused on purpose: results wrap
  // modulo 2^(2N), and for two's complement operands a carry out is not an
  // overflow flag.
  logic         re_co, im_co;

  ripple_carry_subtractor #(.W(W)) u_sub (.a(prod[0]), .b(prod[1]), .d(re_d), .co(re_co));
  ripple_carry_adder      #(.W(W)) u_add (.a(prod[2]), .b(prod[3]), .s(im_d), .co(im_co));

  fifo #(.W(W)) u_out_re (.clk(clk), .rst_n(rst_n), .d(re_d), .q(re));
  fifo #(.W(W)) u_out_im (.clk(clk), .rst_n(rst_n), .d(im_d), .q(im));
endmodule
