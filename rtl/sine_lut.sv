// sine_lut: quarter-wave sine look-up table with quadrant logic.
//
// The M-bit phase y addresses one turn in 2^M steps. Only the first
// quadrant is stored: 2^(M-2) words of N bits (64 x 8 by default), word k
// holding round(AMP * sin(2*pi*(k+1)/2^M)), i.e. the phases 0 < theta <=
// pi/2. AMP = 2^(N-1)-1, so the output is an N-bit two's-complement sample
// in -AMP..+AMP and the top bit of each stored word is 0. With q the two
// phase MSBs and a the remaining M-2 bits:
//   q=0: a==0 ? 0 : word[a-1]      q=1: word[~a]
//   q=2: -(q=0 value)              q=3: -word[~a]
// which is exact symmetry, since sin(pi/2 + x) = sin(pi/2 - x).
// The table is built at elaboration from the formula above; the output is
// combinational from the address (no added latency).
//
// The quarter-wave table, its 64 x 8 size and the 0 < theta <= pi/2 range
// follow the document; the amplitude, the rounding of the words and the
// two's-complement output format are this design's choices.
module sine_lut #(
  parameter int unsigned M = nco_pkg::M_BITS,  // phase address bits
  parameter int unsigned N = nco_pkg::N_BITS   // sample bits
) (
  input  logic [M-1:0]        phase_y,  // y_M
  output logic signed [N-1:0] sine      // sample
);

  localparam int unsigned QA = M - 2;      // address bits within a quadrant
  localparam int unsigned QN = 1 << QA;    // stored words

  function automatic logic [N-1:0] quarter_word(input int unsigned k);
    real amp, th;
    amp = real'((1 << (N - 1)) - 1);
    th  = 2.0 * 3.14159265358979323846 * real'(k + 1) / real'(1 << M);
    return N'($rtoi($floor(amp * $sin(th) + 0.5)));
  endfunction

  logic [N-1:0] rom [QN];

  for (genvar k = 0; k < QN; k++) begin : g_rom
    assign rom[k] = quarter_word(k);
  end

  logic [1:0]    quad;
  logic [QA-1:0] addr;
  logic [N-1:0]  mag;

  assign quad = phase_y[M-1:M-2];
  assign addr = phase_y[QA-1:0];

  always_comb begin
    if (quad[0])             mag = rom[~addr];
    else if (addr == '0)     mag = '0;
    else                     mag = rom[addr - 1'b1];
    sine = quad[1] ? -signed'(mag) : signed'(mag);
  end

endmodule
