// tb_sequence_selector: exhaustive check of the AND-OR selection
// D[3]&E[0] | D[2]&E[1] | D[1]&E[2] | D[0]&E[3] over all 256 inputs.
module tb_sequence_selector;
  logic [3:0] pulse_d, sel_e;
  logic fine_phase;
  int checks = 0, failures = 0;

  sequence_selector #(.W(4)) dut (.pulse_d, .sel_e, .fine_phase);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expd;
    for (int v = 0; v < 256; v++) begin
      {pulse_d, sel_e} = 8'(v);
      #1;
      expd = (pulse_d[3] & sel_e[0]) | (pulse_d[2] & sel_e[1]) |
             (pulse_d[1] & sel_e[2]) | (pulse_d[0] & sel_e[3]);
      checks++;
      if (fine_phase != expd) begin
        failures++;
        $display("D=%b E=%b: out %b expected %b", pulse_d, sel_e, fine_phase, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
