// tb_fifo: self-checking test of the W-bit buffer register.
// First walks all 2^W data patterns through the register (the exhaustive
// pattern test of the original component), checking the one-cycle delay, then
// applies random data with random resets and checks that a reset edge clears
// all bits.
module tb_fifo;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n;
  logic [W-1:0] d, q, expq;
  int checks = 0, failures = 0;

  fifo #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; d = '1;
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst_n = 1'b1;
    for (int v = 0; v < (1 << W); v++) begin
      d = W'(v);
      @(posedge clk); #1;
      checks++;
      if (q !== W'(v)) begin failures++; $display("FAIL pattern %h: q=%h", v, q); end
    end
    for (int i = 0; i < 300; i++) begin
      rst_n = ($urandom % 6) != 0;
      d     = W'($urandom);
      expq  = rst_n ? d : '0;
      @(posedge clk); #1;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL cycle %0d: q=%h exp=%h", i, q, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
