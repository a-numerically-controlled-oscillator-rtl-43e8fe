// fine_phase_tuner: supplies the fractional part B/A of the phase increment
// as a carry-in of 1 on exactly B of every A clocks.
//
// The binary-A counter repeats 0..A-1; the rising-edge detector turns the
// rises of each counter bit into one-clock pulses D (at most one line pulses
// per clock); the bit converter chooses, from B, which pulse lines E should
// pass; the sequence selector ANDs and ORs them into the fine phase. The
// structure is the document's. The fine phase is a combinational function
// of registers and is meant as the carry-in of the phase adder in the same
// clock. A and B are configuration inputs; B must be below A (bad_b flags a
// B that cannot be produced). After reset the first window of A clocks
// already holds B pulses. An assertion checks that at most one pulse line
// is active per clock; it is disabled while rst_n is low, before the
// registers have been cleared, so rst_n is used both as the asynchronous
// reset and inside the assertion (a lint note about that is expected).
module fine_phase_tuner #(
  parameter int unsigned W = nco_pkg::FT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] den_a,      // denominator A
  input  logic [W-1:0] num_b,      // numerator B
  output logic         fine_phase, // 1 on B of every A clocks
  output logic         bad_b       // B not reachable for this A
);

  logic [W-1:0] count_c, pulse_d, sel_e;

  binary_a_counter #(.W(W)) u_counter (
    .clk, .rst_n, .den_a, .count_c
  );

  rising_edge_detector #(.W(W)) u_edge (
    .clk, .rst_n, .bits_c(count_c), .pulse_d
  );

  bit_converter #(.W(W)) u_conv (
    .den_a, .num_b, .sel_e, .bad_b
  );

  sequence_selector #(.W(W)) u_sel (
    .pulse_d, .sel_e, .fine_phase
  );

  // The counter only steps by one or returns to 0, so at most one counter
  // bit rises per clock and the selector never ORs two pulses together.
  a_one_pulse: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pulse_d))
    else $error("more than one rising-edge pulse in a clock: %b", pulse_d);

endmodule
