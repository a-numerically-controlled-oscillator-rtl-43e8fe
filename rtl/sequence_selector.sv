// sequence_selector: picks which rising-edge pulse lines reach the fine
// phase output.
//
// Fine phase = D[W-1]&E[0] | D[W-2]&E[1] | ... | D[0]&E[W-1]: select bit
// E[j] enables pulse line D[W-1-j]. The pulse lines are never high together
// (each counter step raises one bit at most), so the OR passes the selected
// pulses one by one. Purely combinational; the pairing of D and E bits is
// the document's.
module sequence_selector #(
  parameter int unsigned W = nco_pkg::FT_W
) (
  input  logic [W-1:0] pulse_d,   // D from the rising-edge detector
  input  logic [W-1:0] sel_e,     // E from the bit converter
  output logic         fine_phase // carry-in for the phase adder
);

  logic [W-1:0] sel_rev;

  always_comb begin
    for (int j = 0; j < W; j++) sel_rev[W-1-j] = sel_e[j];
  end

  assign fine_phase = |(pulse_d & sel_rev);

endmodule
