// tb_binary_a_counter: checks that the binary-A counter repeats 0..A-1.
// For every A from 0 to 15 the counter is reset and run for 3*A+5 clocks;
// each count is compared with (clocks since reset) mod A (0 for A <= 1).
module tb_binary_a_counter;
  logic clk = 0, rst_n = 0;
  logic [3:0] den_a = '0, count_c;
  int checks = 0, failures = 0;

  binary_a_counter #(.W(4)) dut (.clk, .rst_n, .den_a, .count_c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    for (int a = 0; a < 16; a++) begin
      rst_n = 0;
      den_a = 4'(a);
      @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < 3 * a + 5; n++) begin
        exp_c = (a <= 1) ? 0 : n % a;
        checks++;
        if (count_c != 4'(exp_c)) begin
          failures++;
          $display("A=%0d n=%0d: count %0d, expected %0d", a, n, count_c, exp_c);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
