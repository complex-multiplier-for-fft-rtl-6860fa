// tb_dflipflop: self-checking test of the reset D flip-flop.
// Drives random d and rst_n for 200 cycles and compares q after each rising
// edge with a reference bit updated by the same rule (reset wins, else load d).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dflipflop;
  logic clk = 1'b0, rst_n, d, q;
  logic expq;
  int checks = 0, failures = 0;

  dflipflop dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; d = 1'b1;
    @(posedge clk); #1;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset: q=%b", q); end
    for (int i = 0; i < 200; i++) begin
      rst_n = ($urandom % 5) != 0;
      d     = $urandom % 2;
      expq  = rst_n ? d : 1'b0;
      @(posedge clk); #1;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL cycle %0d: q=%b exp=%b", i, q, expq); end
      // q holds between edges
      d = ~d; #3;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL hold %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
