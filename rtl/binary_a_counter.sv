// binary_a_counter: the "binary-A counter" of the fine phase tuner.
//
// It counts 0, 1, ..., A-1 and starts again at 0, one step per clock, so
// its output C repeats with a period of A clocks. A is read every cycle;
// if A changes, or the count is already at or beyond A-1, the next count
// is 0. A of 0 or 1 holds the count at 0. Reset (asynchronous, active low)
// clears the count. The counting sequence is the document's; the reset and
// the handling of a changed A are choices of this design.
module binary_a_counter #(
  parameter int unsigned W = nco_pkg::FT_W   // width of A and of the count
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] den_a,   // denominator A
  output logic [W-1:0] count_c  // C: current count, 0..A-1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count_c <= '0;
    else if ({1'b0, count_c} + 1'b1 >= {1'b0, den_a})
      count_c <= '0;
    else
      count_c <= count_c + 1'b1;
  end

endmodule
