// bit_converter: turns the numerator B into the select vector E of the
// sequence selector.
//
// Select bit E[W-1-i] passes pulse line D[i], and D[i] pulses w(i) times per
// A clocks, w(i) being the number of rises of counter bit i in one 0..A-1
// count (see nco_pkg for the formula). E must therefore pick a set of lines whose
// weights add up to B. The weights never grow with i and each is at most
// one more than the sum of all later ones, so a greedy choice always finds
// such a set for every B in 0..A-1: lines are visited from the largest
// weight down, taking a line whenever its weight still fits in what is left
// of B. Among lines of equal weight the more significant counter bit is
// visited first; with A = 6 this gives E[3:1] = 111, 100 and 001 for B = 5,
// 3 and 1, the codes the document lists. Lines of weight 0 are never taken.
// A value of B of A or more cannot be reached; E then holds the largest
// reachable sum and bad_b is raised.
//
// The document gives what the converter must produce, not its circuit; the
// greedy search is this design's. It is combinational, recomputed from A
// and B; in use both are static configuration.
module bit_converter #(
  parameter int unsigned W = nco_pkg::FT_W
) (
  input  logic [W-1:0] den_a,   // denominator A
  input  logic [W-1:0] num_b,   // numerator B, expected below A
  output logic [W-1:0] sel_e,   // E
  output logic         bad_b    // B could not be represented
);

  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;  // line index width

  always_comb begin
    logic [W-1:0] wgt [W];   // pulses per A clocks on line D[i], < A
    logic [W-1:0] visited;
    logic [W-1:0] rest;
    logic [IW-1:0] best;
    logic         found;

    // w(i) = floor((A-1)/2^i) - floor((A-1)/2^(i+1)), in W-bit arithmetic
    for (int i = 0; i < W; i++)
      wgt[i] = (den_a == '0) ? '0 : ((den_a - 1'b1) >> i) - ((den_a - 1'b1) >> (i + 1));
    visited = '0;
    rest    = num_b;
    sel_e   = '0;
    for (int step = 0; step < W; step++) begin
      best  = 0;
      found = 1'b0;
      for (int i = W - 1; i >= 0; i--)
        if (!visited[i] && (!found || wgt[i] > wgt[best])) begin
          best  = IW'(i);
          found = 1'b1;
        end
      visited[best] = 1'b1;
      if (wgt[best] != 0 && wgt[best] <= rest) begin
        sel_e[IW'(W - 1) - best] = 1'b1;
        rest            = rest - wgt[best];
      end
    end
    bad_b = (rest != 0);
  end

endmodule
