// signed_multiplier: N x N two's complement array multiplier (Baugh-Wooley).
//
// The unsigned shift-and-add array is made signed by two changes. The partial
// products that combine exactly one sign bit with a non-sign bit,
// x[N-1]&y[j] and x[i]&y[N-1] for i, j < N-1, are inverted (NAND instead of
// AND), and a constant 1 is added in columns N and 2N-1. With these the plain
// unsigned sum of the bit matrix, taken modulo 2^(2N), equals the signed
// product x*y, so z is the exact 2N-bit product for every operand pair
// (-2^(N-1) * -2^(N-1) included).
//
// Row 0 of the matrix, together with the two constant ones (which fall in
// columns it leaves empty), seeds the accumulation. Each further row j is
// added by a carry-ripple row of full adders spanning columns j..2N-1; columns
// below j pass straight through. Purely combinational.
//
// The algorithm, the inverted terms and the constant ones follow the original
// design, as does N = 4; the row-by-row full-adder arrangement is this
// design's own. N must be at least 2.
module signed_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic signed [N-1:0]   x,
  input  logic signed [N-1:0]   y,
  output logic signed [2*N-1:0] z
);
  localparam int unsigned P = 2 * N;

  // pp[j][i]: partial product of x[i] and y[j], Baugh-Wooley inverted where
  // exactly one of i, j is the sign position.
  logic [N-1:0] pp [N];
  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if ((i == N - 1) != (j == N - 1)) pp[j][i] = ~(x[i] & y[j]);
        else                              pp[j][i] =   x[i] & y[j];
      end
    end
  end

  // acc[j]: running sum after rows 0..j.
  logic [P-1:0] acc [N];

  for (genvar k = 0; k < P; k++) begin : g_seed
    if (k < N) begin : g_pp
      assign acc[0][k] = pp[0][k];
    end else begin : g_const
      assign acc[0][k] = (k == N) || (k == P - 1);
    end
  end

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [P-1:0] sum;
    logic [P-1:j] cy;  // carry into column k; the carry out of column P-1 is dropped
    assign cy[j] = 1'b0;
    for (genvar k = 0; k < P; k++) begin : g_col
      if (k < j) begin : g_pass
        assign sum[k] = acc[j-1][k];
      end else begin : g_add
        logic ppb;
        if (k - j < N) begin : g_pp
          assign ppb = pp[j][k-j];
        end else begin : g_zero
          assign ppb = 1'b0;
        end
        logic co;
        full_adder u_fa (.a(acc[j-1][k]), .b(ppb), .ci(cy[k]), .s(sum[k]), .co(co));
        if (k < P - 1) begin : g_carry
          assign cy[k+1] = co;
        end

      end
    end
    assign acc[j] = sum;
  end

  assign z = signed'(acc[N-1]);
endmodule
