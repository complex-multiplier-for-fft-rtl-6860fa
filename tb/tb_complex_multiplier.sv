// tb_complex_multiplier: end-to-end self-checking test of the registered
// complex multiplier at its default size (4-bit parts, 8-bit results).
//
// 1. Latency: after a reset a single operand set is applied, followed by zeros;
//    the result must appear exactly two clock edges after the operands.
// 2. Throughput and function: all 2^16 operand sets (A, B, C, D each -8..7)
//    are streamed back to back, one per cycle, in a scrambled order, with
//    occasional reset pulses. A reference model of the two register stages,
//    using integer arithmetic, predicts re = AC - BD and im = AD + BC (wrapped
//    to 8 bits) after every edge.
// Mechanisms counted and required to occur: reset pulses during streaming,
// the one wrapping result (A=B=C=D=-8 gives im = +128 -> -128), negative and
// positive results on both outputs.
module tb_complex_multiplier;
  localparam int N = 4;
  localparam int W = 2 * N;
  localparam int NSETS = 1 << (4 * N);

  logic clk = 1'b0, rst_n;
  logic signed [N-1:0] a, b, c, d;
  logic signed [W-1:0] re, im;

  int checks = 0, failures = 0;
  int n_reset = 0, n_wrap = 0, n_re_neg = 0, n_im_neg = 0, n_re_pos = 0, n_im_pos = 0;

  complex_multiplier dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .d(d), .re(re), .im(im));

  always #5 clk = ~clk;

  // Reference model state: operands held in the input stage and the results
  // held in the output stage.
  int in_a, in_b, in_c, in_d;
  int exp_re, exp_im;

  function automatic int wrap(input int v);
    logic [W-1:0] t;
    t = W'(v);
    return int'(signed'(t));
  endfunction

  task automatic step(input bit rst, input int va, input int vb, input int vc, input int vd);
    rst_n = !rst;
    a = N'(va); b = N'(vb); c = N'(vc); d = N'(vd);
    @(posedge clk);
    if (rst) begin
      n_reset++;
      exp_re = 0; exp_im = 0;
      in_a = 0; in_b = 0; in_c = 0; in_d = 0;
    end else begin
      exp_re = wrap(in_a * in_c - in_b * in_d);
      exp_im = wrap(in_a * in_d + in_b * in_c);
      if (exp_im != in_a * in_d + in_b * in_c) n_wrap++;
      in_a = va; in_b = vb; in_c = vc; in_d = vd;
    end
    #1;
    checks++;
    if (int'(re) != exp_re || int'(im) != exp_im) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t re=%0d im=%0d exp %0d %0d", $time, re, im, exp_re, exp_im);
    end
  endtask

  function automatic int sx(input logic [N-1:0] v);  // 4-bit field to signed int
    return int'(signed'(v));
  endfunction

  initial begin
    int edges;
    in_a = 0; in_b = 0; in_c = 0; in_d = 0; exp_re = 0; exp_im = 0;

    // --- latency ---
    step(1, 0, 0, 0, 0);
    step(1, 0, 0, 0, 0);
    rst_n = 1'b1;
    a = 3; b = -2; c = 5; d = 1;           // (3-2j)(5+j) = 17 - 7j
    edges = 0;
    @(posedge clk); edges++; #1;
    a = 0; b = 0; c = 0; d = 0;
    checks++;
    if (re != 0 || im != 0) begin failures++; $display("FAIL latency: result after one edge"); end
    @(posedge clk); edges++; #1;
    checks++;
    if (re != 17 || im != -7 || edges != 2) begin
      failures++; $display("FAIL latency: re=%0d im=%0d after %0d edges", re, im, edges);
    end
    in_a = 0; in_b = 0; in_c = 0; in_d = 0;

    // --- exhaustive back-to-back stream ---
    for (int k = 0; k < NSETS; k++) begin
      int v, va, vb, vc, vd;
      bit rst;
      v  = (k * 40503 + 12345) % NSETS;    // odd multiplier: a permutation
      va = sx(N'(v >> 12)); vb = sx(N'(v >> 8)); vc = sx(N'(v >> 4)); vd = sx(N'(v));
      rst = ($urandom % 4000) == 0;
      step(rst, va, vb, vc, vd);
      if (exp_re < 0) n_re_neg++; else if (exp_re > 0) n_re_pos++;
      if (exp_im < 0) n_im_neg++; else if (exp_im > 0) n_im_pos++;
    end
    // finish with a reset pulse and the wrapping operand set applied directly
    step(1, 0, 0, 0, 0);
    step(0, -8, -8, -8, -8);
    step(0, 0, 0, 0, 0);
    checks++;
    if (re != 0 || im != -128) begin failures++; $display("FAIL wrap: re=%0d im=%0d", re, im); end

    $display("mechanisms: resets=%0d wraps=%0d re<0:%0d re>0:%0d im<0:%0d im>0:%0d",
             n_reset, n_wrap, n_re_neg, n_re_pos, n_im_neg, n_im_pos);
    if (n_reset == 0 || n_wrap == 0 || n_re_neg == 0 || n_re_pos == 0 || n_im_neg == 0 || n_im_pos == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSETS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
