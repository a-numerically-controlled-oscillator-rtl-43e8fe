// tb_rounding_processor: checks y(n) = floor((x(n) + R(n)) / 32) mod 256,
// with R(n) the sum of the five low phase bits of samples 0..n taken
// modulo 32 (L = 13, M = 8). Part one drives random phases and compares each
// clock. Part two holds each of several constant phases x for 32 clocks and
// checks the noise-shaping property: the 32 outputs add up to exactly x,
// i.e. on average the rounded phase equals the full-precision phase.
module tb_rounding_processor;
  logic clk = 0, rst_n = 0;
  logic [12:0] phase_x = '0;
  logic [7:0]  phase_y;
  int checks = 0, failures = 0;

  rounding_processor #(.L(13), .M(8)) dut (.clk, .rst_n, .phase_x, .phase_y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, expd, total;
    static int xs [6] = '{13'd100, 13'd1, 13'd31, 13'd4096 + 13'd16, 13'd8191, 13'd2604};
    @(negedge clk);
    rst_n = 1;
    acc = 0;
    for (int n = 0; n < 3000; n++) begin
      phase_x = 13'($urandom);
      #1;
      acc += longint'(phase_x) % 32;
      expd = ((longint'(phase_x) + acc % 32) / 32) % 256;
      checks++;
      if (longint'(phase_y) != expd) begin
        failures++;
        $display("n=%0d x=%0d: y %0d expected %0d", n, phase_x, phase_y, expd);
      end
      @(negedge clk);
    end
    foreach (xs[j]) begin
      rst_n = 0;
      #1 rst_n = 1;
      phase_x = 13'(xs[j]);
      total = 0;
      for (int n = 0; n < 32; n++) begin
        // Add y unwrapped around x/32, so a wrap 255 -> 0 counts as 256.
        #1 total += longint'(xs[j] / 32) + longint'(8'(phase_y - 8'(xs[j] / 32)));
        @(negedge clk);
      end
      checks++;
      if (total != longint'(xs[j])) begin
        failures++;
        $display("x=%0d: 32 outputs sum to %0d", xs[j], total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
