// rising_edge_detector: one-clock pulses on the rising edges of the counter
// bits.
//
// A register holds the counter value of the previous clock; each output bit
// D[i] is C[i] AND NOT (previous C[i]), so D[i] is 1 for exactly the one
// clock period in which C[i] has just gone from 0 to 1. This is the
// register-plus-AND structure of the document's fine phase tuner. The
// register is cleared by the asynchronous active-low reset (this design's
// choice), matching a counter that also resets to 0, so no edge is seen
// after reset.
module rising_edge_detector #(
  parameter int unsigned W = nco_pkg::FT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] bits_c,   // C: signals to watch
  output logic [W-1:0] pulse_d   // D: rising-edge pulses, one clock wide
);

  logic [W-1:0] bits_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits_q <= '0;
    else        bits_q <= bits_c;
  end

  assign pulse_d = bits_c & ~bits_q;

endmodule
