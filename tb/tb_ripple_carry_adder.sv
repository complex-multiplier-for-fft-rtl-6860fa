// tb_ripple_carry_adder: exhaustive self-checking test of the 8-bit
// ripple-carry adder: all 65536 operand pairs, sum and carry out compared with
// integer addition.
module tb_ripple_carry_adder;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, s;
  logic co;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if ({co, s} !== (W+1)'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> co=%b s=%0d", i, j, co, s);
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
