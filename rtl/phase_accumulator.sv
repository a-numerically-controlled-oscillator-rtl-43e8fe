// phase_accumulator: L-bit phase adder and phase register.
//
// Every clock the register takes phase + S + cin, modulo 2^L, where S is
// the integer phase increment and cin the fine phase from the fine phase
// tuner. The output is the register itself, so the phase of clock n is the
// sum of the increments of clocks 0..n-1. The adder-with-carry-in and
// register structure is the document's; the asynchronous active-low reset
// to phase 0 is this design's choice.
module phase_accumulator #(
  parameter int unsigned L = nco_pkg::L_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] phase_inc,  // S
  input  logic         cin,        // fine phase
  output logic [L-1:0] phase       // x_L
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + phase_inc + L'(cin);
  end

endmodule
