// tb_sine_lut: exhaustive check of the 256 phase addresses (M = 8, N = 8)
// against round(127 * sin(2*pi*y/256)), computed here with $sin, rounding
// halves away from zero.
module tb_sine_lut;
  logic [7:0] phase_y;
  logic signed [7:0] sine;
  int checks = 0, failures = 0;

  sine_lut #(.M(8), .N(8)) dut (.phase_y, .sine);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    int expd;
    for (int y = 0; y < 256; y++) begin
      phase_y = 8'(y);
      #1;
      v = 127.0 * $sin(2.0 * 3.14159265358979 * y / 256.0);
      expd = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      checks++;
      if (int'(sine) != expd) begin
        failures++;
        $display("y=%0d: sine %0d expected %0d", y, sine, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
