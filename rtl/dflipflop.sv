// dflipflop: one-bit storage cell of the FIFO buffer registers.
//
// A positive-edge D flip-flop whose active-low reset is sampled on the clock
// edge (synchronous): while rst_n is low the next edge loads 0, otherwise it
// loads d. q is valid from just after the edge until the next one.
//
// The behaviour (posedge capture, active-low reset to 0) follows the cell of
// the original design. That cell also had a complementary clock input, which
// only serves its transistor-level circuit; it has no logic function and is
// not modelled here.
module dflipflop (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end
endmodule
