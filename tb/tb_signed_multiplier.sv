// tb_signed_multiplier: exhaustive self-checking test of the 4x4 signed
// Baugh-Wooley multiplier: every operand pair from -8 to 7, product compared
// with integer multiplication. The pairs shown in the original simulation
// (0*-8, -3*-5, -3*3, -3*2, -4*2, -8*-8 ...) are among them.
module tb_signed_multiplier;
  localparam int N = 4;
  logic signed [N-1:0]   x, y;
  logic signed [2*N-1:0] z;
  int checks = 0, failures = 0;

  signed_multiplier #(.N(N)) dut (.x(x), .y(y), .z(z));

  initial begin
    for (int i = -(1 << (N-1)); i < (1 << (N-1)); i++) begin
      for (int j = -(1 << (N-1)); j < (1 << (N-1)); j++) begin
        x = N'(i); y = N'(j);
        #1;
        checks++;
        if (int'(z) !== i * j) begin
          failures++; $display("FAIL %0d * %0d -> %0d", i, j, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
