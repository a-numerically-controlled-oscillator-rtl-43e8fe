// tb_rising_edge_detector: drives random 4-bit words and checks that each
// output bit is 1 exactly when that input bit is 1 now and was 0 on the
// previous clock (previous value 0 right after reset).
module tb_rising_edge_detector;
  logic clk = 0, rst_n = 0;
  logic [3:0] bits_c = '0, pulse_d, prev;
  int checks = 0, failures = 0;

  rising_edge_detector #(.W(4)) dut (.clk, .rst_n, .bits_c, .pulse_d);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] expd;
    @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int n = 0; n < 1000; n++) begin
      bits_c = 4'($urandom);
      #1;
      for (int i = 0; i < 4; i++) expd[i] = (bits_c[i] == 1'b1) && (prev[i] == 1'b0);
      checks++;
      if (pulse_d != expd) begin
        failures++;
        $display("n=%0d C=%b prev=%b: D=%b expected %b", n, bits_c, prev, pulse_d, expd);
      end
      @(posedge clk);
      prev = bits_c;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
