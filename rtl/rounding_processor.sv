// rounding_processor: reduces the L-bit accumulator phase to M bits with
// first-order noise shaping of the truncation error.
//
//   y_M(n) = trunc_{L-M}[ x_L(n) + sum_{k=0..n} x_{L-M}(k) ]
//
// An (L-M)-bit adder and register accumulate the discarded low bits of the
// phase; the running sum, including the present sample, is added to the
// full phase and the low L-M bits of that sum are dropped. Both the L-M bit
// accumulator and the final addition wrap (modulo 2^(L-M) and 2^L): only
// the remainder of the running sum matters, and phase is modulo one turn.
// The output is combinational from the phase and the running-sum register
// (no added latency). Structure and equation are the document's; the width
// of the running sum (L-M bits) and the reset to 0 are this design's
// reading of them.
module rounding_processor #(
  parameter int unsigned L = nco_pkg::L_BITS,
  parameter int unsigned M = nco_pkg::M_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] phase_x,   // x_L(n)
  output logic [M-1:0] phase_y    // y_M(n)
);

  localparam int unsigned D = L - M;  // discarded bits

  logic [D-1:0] err_q, err_sum;
  logic [D:0]   low_sum;   // low bits of x_L plus the running sum, with carry

  assign err_sum = err_q + phase_x[D-1:0];
  assign low_sum = {1'b0, phase_x[D-1:0]} + {1'b0, err_sum};
  assign phase_y = phase_x[L-1:D] + M'(low_sum[D]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_q <= '0;
    else        err_q <= err_sum;
  end

endmodule
