// tb_ripple_carry_subtractor: exhaustive self-checking test of the 8-bit
// ripple-carry subtractor: all 65536 operand pairs, difference compared with
// integer subtraction modulo 256 and carry out with "no borrow" (a >= b).
module tb_ripple_carry_subtractor;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, d;
  logic co;
  int checks = 0, failures = 0;

  ripple_carry_subtractor #(.W(W)) dut (.a(a), .b(b), .d(d), .co(co));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (d !== W'(i - j) || co !== (i >= j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d - %0d -> co=%b d=%0d", i, j, co, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
