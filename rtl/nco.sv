// nco: numerically controlled oscillator with a fine phase tuner and a
// rounding processor.
//
// The output frequency is Fclk * (S + B/A) / 2^L. The phase accumulator adds
// the integer increment S every clock, and the fine phase tuner adds a carry
// of 1 on B of every A clocks, so the fractional part B/A is produced
// exactly, also when A is not a power of two. The rounding processor cuts
// the L-bit phase to M bits with first-order noise shaping, and the
// quarter-wave sine table maps the M-bit phase to an N-bit two's-complement
// sample.
//
// Timing: S, A and B are configuration inputs sampled every clock. The
// phase register and the tuner's registers update on the rising clock edge;
// the rounded phase and the sample are combinational from those registers,
// so the sample of clock n is sin(2*pi*phase(n)/2^L) with phase(0) = 0
// after the asynchronous active-low reset. The block structure is the
// document's; reset, output format and exposing the internal phases as
// outputs are this design's choices.
module nco #(
  parameter int unsigned L  = nco_pkg::L_BITS,  // phase accumulator bits
  parameter int unsigned M  = nco_pkg::M_BITS,  // sine table address bits
  parameter int unsigned N  = nco_pkg::N_BITS,  // output sample bits
  parameter int unsigned FW = nco_pkg::FT_W     // fine tuner A/B width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [L-1:0]        phase_inc,   // S (integer part)
  input  logic [FW-1:0]       den_a,       // A (fraction denominator)
  input  logic [FW-1:0]       num_b,       // B (fraction numerator, B < A)
  output logic signed [N-1:0] sine_out,    // sine sample
  output logic [L-1:0]        phase,       // accumulator phase x_L
  output logic [M-1:0]        phase_round, // rounded phase y_M
  output logic                fine_phase,  // carry-in of this clock
  output logic                bad_b        // B cannot be produced for A
);

  fine_phase_tuner #(.W(FW)) u_tuner (
    .clk, .rst_n, .den_a, .num_b, .fine_phase, .bad_b
  );

  phase_accumulator #(.L(L)) u_acc (
    .clk, .rst_n, .phase_inc, .cin(fine_phase), .phase
  );

  rounding_processor #(.L(L), .M(M)) u_round (
    .clk, .rst_n, .phase_x(phase), .phase_y(phase_round)
  );

  sine_lut #(.M(M), .N(N)) u_lut (
    .phase_y(phase_round), .sine(sine_out)
  );

endmodule
