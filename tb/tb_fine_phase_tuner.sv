// tb_fine_phase_tuner: for every A in 1..15 and B in 0..A-1 the tuner is
// reset and run for 4*A clocks; every window of A clocks starting at reset
// must hold exactly B fine-phase pulses. For A = 6 the pulse pattern of one
// window is also compared with the one the counter, edge detector and the
// document's codes give: B=5 -> clocks 1,2,3,4,5; B=3 -> 1,3,5; B=1 -> 4.
module tb_fine_phase_tuner;
  logic clk = 0, rst_n = 0;
  logic [3:0] den_a = '0, num_b = '0;
  logic fine_phase, bad_b;
  int checks = 0, failures = 0;

  fine_phase_tuner #(.W(4)) dut (.clk, .rst_n, .den_a, .num_b, .fine_phase, .bad_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int b, output logic [15:0] pattern);
    int cnt;
    rst_n = 0;
    den_a = 4'(a);
    num_b = 4'(b);
    @(negedge clk);
    rst_n = 1;
    pattern = '0;
    for (int w = 0; w < 4; w++) begin
      cnt = 0;
      for (int n = 0; n < a; n++) begin
        if (fine_phase) begin
          cnt++;
          if (w == 0) pattern[n] = 1'b1;
        end
        @(negedge clk);
      end
      checks++;
      if (cnt != b) begin
        failures++;
        $display("A=%0d B=%0d window %0d: %0d pulses", a, b, w, cnt);
      end
    end
    checks++;
    if (bad_b) begin
      failures++;
      $display("A=%0d B=%0d: bad_b raised", a, b);
    end
  endtask

  initial begin
    logic [15:0] pat;
    for (int a = 1; a < 16; a++)
      for (int b = 0; b < a; b++) run(a, b, pat);
    run(6, 5, pat); checks++; if (pat != 16'b0011_1110) begin failures++; $display("A=6 B=5 pattern %b", pat); end
    run(6, 3, pat); checks++; if (pat != 16'b0010_1010) begin failures++; $display("A=6 B=3 pattern %b", pat); end
    run(6, 1, pat); checks++; if (pat != 16'b0001_0000) begin failures++; $display("A=6 B=1 pattern %b", pat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
