// fifo: W-bit buffer register used at the inputs and outputs of the complex
// multiplier.
//
// Despite its name the component is a single register stage: W dflipflop
// cells side by side, sharing clock and active-low synchronous reset. Data on
// d appears on q one clock edge later; a low rst_n clears all bits on the
// edge. There are no pointers or full/empty flags. The width of 8 cells is the
// original design's; composing it from individual flip-flop cells mirrors its
// schematic.
module fifo #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    dflipflop u_ff (.clk(clk), .rst_n(rst_n), .d(d[i]), .q(q[i]));
  end
endmodule
