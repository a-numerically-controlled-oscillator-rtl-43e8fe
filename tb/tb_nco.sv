// tb_nco: end-to-end test of the NCO at its default sizes (L = 13, M = 8,
// N = 8, 4-bit fine tuner), with the three cdma2000 3X carrier settings at
// a 9.8304 MHz clock: 0.625 MHz (S = 520, B/A = 5/6), 1.875 MHz (1562 3/6)
// and 3.125 MHz (2604 1/6). Each setting runs from reset for 6 * 8192
// clocks, one full repeat of the phase sequence, and is checked for:
//   - phase every A clocks equal to n*S + (n/A)*B mod 8192 (exact B/A),
//   - the number of phase wraps, i.e. output cycles, equal to
//     Fout/Fclk * 49152 = 3125, 9375 and 15625,
//   - B * 8192 fine-phase carries,
//   - the rounded phase against floor((x + R)/32), R being the sum of all
//     low phase bits so far modulo 32, and the sample against
//     round(127*sin(2*pi*y/256)) computed here.
// It also switches settings, raises bad_b once with B >= A, and counts how
// often each mechanism happened (fine carries, round-ups by the rounding
// processor, each quadrant, phase wraps, setting switches, bad_b); one that
// never happened is a failure. Finally it compares the mean square error of
// the sample against the ideal sine for the rounding processor with that of
// plain truncation and with the variant that adds the running sum of the
// previous clock; the rounding processor must beat truncation.
module tb_nco;
  logic clk = 0, rst_n = 0;
  logic [12:0] phase_inc = '0;
  logic [3:0]  den_a = 4'd6, num_b = '0;
  logic signed [7:0] sine_out;
  logic [12:0] phase;
  logic [7:0]  phase_round;
  logic fine_phase, bad_b;
  int checks = 0, failures = 0;

  localparam int NCYC = 6 * 8192;
  localparam real PI = 3.14159265358979;

  nco dut (.clk, .rst_n, .phase_inc, .den_a, .num_b, .sine_out, .phase,
           .phase_round, .fine_phase, .bad_b);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_fine = 0, n_roundup = 0, n_wrap = 0, n_switch = 0, n_bad = 0;
  int n_quad [4] = '{0, 0, 0, 0};

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  function automatic int sample_of(input longint y);
    real v;
    v = 127.0 * $sin(2.0 * PI * real'(y) / 256.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  task automatic run_setting(input int s, input int a, input int b, input int exp_wraps);
    longint err_sum, prev_sum, expd_y, pf;
    int wraps, fines, expd_s, ideal_num;
    logic [12:0] last_phase;
    real ideal, e_prop, e_trunc, e_prev;
    rst_n = 0;
    phase_inc = 13'(s);
    den_a = 4'(a);
    num_b = 4'(b);
    n_switch++;
    @(negedge clk);
    rst_n = 1;
    err_sum = 0;
    wraps = 0;
    fines = 0;
    e_prop = 0.0;
    e_trunc = 0.0;
    e_prev = 0.0;
    last_phase = '0;
    for (int n = 0; n < NCYC; n++) begin
      if (n > 0 && phase < last_phase) wraps++;
      last_phase = phase;
      if (n % a == 0) begin
        pf = (longint'(n) * s + longint'(n / a) * b) % 8192;
        checks++;
        if (longint'(phase) != pf) fail($sformatf("S=%0d n=%0d: phase %0d expected %0d", s, n, phase, pf));
      end
      prev_sum = err_sum;
      err_sum = (err_sum + longint'(phase) % 32) % 32;
      expd_y = ((longint'(phase) + err_sum) / 32) % 256;
      checks++;
      if (longint'(phase_round) != expd_y)
        fail($sformatf("S=%0d n=%0d: rounded phase %0d expected %0d", s, n, phase_round, expd_y));
      expd_s = sample_of(expd_y);
      checks++;
      if (int'(sine_out) != expd_s)
        fail($sformatf("S=%0d n=%0d: sample %0d expected %0d", s, n, sine_out, expd_s));
      if (fine_phase) begin fines++; n_fine++; end
      if (phase_round != phase[12:5]) n_roundup++;
      n_quad[phase_round[7:6]]++;
      ideal_num = int'((longint'(n) * (a * s + b)) % (a * 8192));
      ideal = 127.0 * $sin(2.0 * PI * real'(ideal_num) / real'(a * 8192));
      e_prop  += (real'(sine_out) - ideal) ** 2;
      e_trunc += (real'(sample_of(longint'(phase[12:5]))) - ideal) ** 2;
      e_prev  += (real'(sample_of(((longint'(phase) + prev_sum) / 32) % 256)) - ideal) ** 2;
      @(negedge clk);
    end
    if (phase < last_phase) wraps++;
    n_wrap += wraps;
    checks++;
    if (wraps != exp_wraps) fail($sformatf("S=%0d: %0d wraps, expected %0d", s, wraps, exp_wraps));
    checks++;
    if (fines != b * 8192) fail($sformatf("S=%0d: %0d fine carries, expected %0d", s, fines, b * 8192));
    checks++;
    if (phase != 0) fail($sformatf("S=%0d: phase %0d after a full period", s, phase));
    e_prop /= NCYC;
    e_trunc /= NCYC;
    e_prev /= NCYC;
    $display("S=%0d B/A=%0d/%0d: MSE (LSB^2) rounding processor %f, truncation %f, previous-sum variant %f; %0.2f dB better than truncation",
             s, b, a, e_prop, e_trunc, e_prev, 10.0 * $log10(e_trunc / e_prop));
    checks++;
    if (!(e_prop < e_trunc)) fail($sformatf("S=%0d: rounding processor MSE not below truncation", s));
  endtask

  initial begin
    run_setting(520, 6, 5, 3125);
    run_setting(1562, 6, 3, 9375);
    run_setting(2604, 6, 1, 15625);
    num_b = 4'd7;
    #1;
    checks++;
    if (!bad_b) fail("bad_b not raised for B = 7, A = 6");
    else n_bad++;
    checks++; if (n_fine == 0)    fail("no fine-phase carry seen");
    checks++; if (n_roundup == 0) fail("rounding processor never rounded up");
    checks++; if (n_wrap == 0)    fail("phase never wrapped");
    checks++; if (n_switch < 2)   fail("setting never switched");
    checks++; if (n_bad == 0)     fail("bad_b never raised");
    foreach (n_quad[q]) begin
      checks++;
      if (n_quad[q] == 0) fail($sformatf("quadrant %0d never used", q));
    end
    $display("events: fine carries %0d, round-ups %0d, wraps %0d, switches %0d, bad_b %0d, quadrants %0d/%0d/%0d/%0d",
             n_fine, n_roundup, n_wrap, n_switch, n_bad, n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
