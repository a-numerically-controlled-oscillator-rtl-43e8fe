// tb_phase_accumulator: drives random increments S and carry-ins and checks
// the 13-bit phase register against a running sum kept modulo 8192. The
// phase must change in the clock after the increment is applied.
module tb_phase_accumulator;
  logic clk = 0, rst_n = 0;
  logic [12:0] phase_inc = '0, phase;
  logic cin = 0;
  int checks = 0, failures = 0;

  phase_accumulator #(.L(13)) dut (.clk, .rst_n, .phase_inc, .cin, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    @(negedge clk);
    rst_n = 1;
    sum = 0;
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (longint'(phase) != sum % 8192) begin
        failures++;
        $display("n=%0d phase %0d expected %0d", n, phase, sum % 8192);
      end
      phase_inc = (n < 1000) ? 13'($urandom) : 13'(2604);
      cin = 1'($urandom);
      sum += longint'(phase_inc) + longint'(cin);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
