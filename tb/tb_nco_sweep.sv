// tb_nco_sweep: spectral and error evaluation of the NCO for the 3.125 MHz
// carrier (Fclk 9.8304 MHz, S = 2604, B/A = 1/6, L = 13), sweeping the sine
// table address bits M = 6..10 at N = 8 output bits, and the output bits
// N = 4..12 at M = 8. Fourteen NCO instances run side by side from reset for
// 49152 clocks, exactly one repeat of the whole state sequence, so the
// spectrum is computed without a window: a 49152-point DFT done as three
// 16384-point radix-2 FFTs and a radix-3 combining step.
//
// For every size the testbench
//   - checks each sample of the NCO against round(amp*sin(2*pi*y/2^M)),
//     amp = 2^(N-1)-1, with y the rounded phase worked out here from the
//     phase register and the running sum of its low L-M bits;
//   - computes, from the same phase sequence, the samples of plain
//     truncation and of the variant that adds the previous clock's running
//     sum instead of the present one;
//   - reports for all three the largest spectral line other than the
//     carrier, in dB relative to the carrier, and the mean square error
//     against the ideal sine in dB relative to full scale.
// The rounding processor must give a lower largest spur and a lower mean
// square error than truncation at every size; at N = 4 the amplitude
// quantisation dominates, so only the spur is required there.
module tb_nco_sweep;
  localparam int NCYC = 6 * 8192;
  localparam int NF   = 16384;          // NCYC / 3
  localparam int NCFG = 14;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic [12:0] phase_inc = 13'd2604;
  logic [3:0]  den_a = 4'd6, num_b = 4'd1;
  int checks = 0, failures = 0;

  logic signed [15:0] samp [NCFG];
  logic [12:0]        ph   [NCFG];

  for (genvar i = 0; i < 5; i++) begin : g_m
    logic signed [7:0] so;
    logic [6+i-1:0]    yr;
    logic              fp, bb;
    nco #(.M(6 + i)) u_nco (.clk, .rst_n, .phase_inc, .den_a, .num_b, .sine_out(so),
                            .phase(ph[i]), .phase_round(yr), .fine_phase(fp), .bad_b(bb));
    assign samp[i] = so;
  end

  for (genvar j = 0; j < 9; j++) begin : g_n
    logic signed [4+j-1:0] so;
    logic [7:0]            yr;
    logic                  fp, bb;
    nco #(.N(4 + j)) u_nco (.clk, .rst_n, .phase_inc, .den_a, .num_b, .sine_out(so),
                            .phase(ph[5+j]), .phase_round(yr), .fine_phase(fp), .bad_b(bb));
    assign samp[5+j] = so;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    #1000000;   // room for the spectra
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xs [NCYC];
  int  rtl_s [NCFG][NCYC];
  real xbuf [NCYC];
  real fr [3][NF];
  real fi [3][NF];
  real ct [NCYC];
  real st [NCYC];

  function automatic int quant(input int amp, input longint y, input int m);
    real v;
    v = real'(amp) * $sin(2.0 * PI * real'(y) / real'(longint'(1) << m));
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // In-place radix-2 FFT of fr[r], fi[r] (length NF).
  function automatic void fft(input int r);
    int j, bits, half, step;
    real tr, ti, wr, wi, ur, ui;
    bits = $clog2(NF);
    for (int i = 0; i < NF; i++) begin
      j = 0;
      for (int b = 0; b < bits; b++) j |= ((i >> b) & 1) << (bits - 1 - b);
      if (j > i) begin
        tr = fr[r][i]; fr[r][i] = fr[r][j]; fr[r][j] = tr;
        ti = fi[r][i]; fi[r][i] = fi[r][j]; fi[r][j] = ti;
      end
    end
    for (int len = 2; len <= NF; len *= 2) begin
      half = len / 2;
      step = (NF / len) * 3;             // twiddle index in the NCYC table
      for (int s = 0; s < NF; s += len)
        for (int k = 0; k < half; k++) begin
          wr = ct[k * step];
          wi = -st[k * step];
          ur = fr[r][s + k + half] * wr - fi[r][s + k + half] * wi;
          ui = fr[r][s + k + half] * wi + fi[r][s + k + half] * wr;
          fr[r][s + k + half] = fr[r][s + k] - ur;
          fi[r][s + k + half] = fi[r][s + k] - ui;
          fr[r][s + k] += ur;
          fi[r][s + k] += ui;
        end
    end
  endfunction

  // Largest line other than the carrier bins, relative to the carrier, in dB.
  function automatic real spur_dbc(input int kc);
    real carrier, worst, re, im, p;
    int idx;
    for (int r = 0; r < 3; r++) begin
      for (int m = 0; m < NF; m++) begin
        fr[r][m] = xbuf[3 * m + r];
        fi[r][m] = 0.0;
      end
      fft(r);
    end
    carrier = 0.0;
    worst = 0.0;
    for (int k = 0; k < NCYC; k++) begin
      re = 0.0;
      im = 0.0;
      for (int r = 0; r < 3; r++) begin
        idx = int'((longint'(r) * k) % NCYC);
        re += fr[r][k % NF] * ct[idx] + fi[r][k % NF] * st[idx];
        im += fi[r][k % NF] * ct[idx] - fr[r][k % NF] * st[idx];
      end
      p = re * re + im * im;
      if (k == kc) carrier = p;
      else if (k != NCYC - kc && p > worst) worst = p;
    end
    return 10.0 * $log10(worst / carrier);
  endfunction

  initial begin
    static int cm [NCFG] = '{6, 7, 8, 9, 10, 8, 8, 8, 8, 8, 8, 8, 8, 8};
    static int cn [NCFG] = '{8, 8, 8, 8, 8, 4, 5, 6, 7, 8, 9, 10, 11, 12};
    int kc, m, n, d, amp, x, sp, st_, sq, bad;
    longint e, e_prev, yp, yt, yq;
    real ideal, mse_p, mse_t, mse_q, spur_p, spur_t, spur_q;

    for (int k = 0; k < NCYC; k++) begin
      ct[k] = $cos(2.0 * PI * real'(k) / real'(NCYC));
      st[k] = $sin(2.0 * PI * real'(k) / real'(NCYC));
    end
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NCYC; t++) begin
      xs[t] = int'(ph[0]);
      for (int c = 0; c < NCFG; c++) rtl_s[c][t] = int'(samp[c]);
      @(negedge clk);
    end
    checks++;
    if (ph[0] != 0) begin
      failures++;
      $display("phase did not return to 0 after %0d clocks", NCYC);
    end

    kc = (6 * 2604 + 1) % NCYC;
    $display("   M   N | largest spur dBc: trunc  prev-sum  proposed | MSE dBFS: trunc  prev-sum  proposed");
    for (int c = 0; c < NCFG; c++) begin
      m = cm[c];
      n = cn[c];
      d = 13 - m;
      amp = (1 << (n - 1)) - 1;
      e = 0;
      bad = 0;
      mse_p = 0.0; mse_t = 0.0; mse_q = 0.0;
      for (int t = 0; t < NCYC; t++) begin
        x = xs[t];
        e_prev = e;
        e = (e + longint'(x) % (longint'(1) << d)) % (longint'(1) << d);
        yp = ((longint'(x) + e) >> d) % (longint'(1) << m);
        yt = longint'(x) >> d;
        yq = ((longint'(x) + e_prev) >> d) % (longint'(1) << m);
        sp = quant(amp, yp, m);
        st_ = quant(amp, yt, m);
        sq = quant(amp, yq, m);
        checks++;
        if (rtl_s[c][t] != sp) begin
          failures++;
          bad++;
          if (bad < 5) $display("M=%0d N=%0d t=%0d: sample %0d expected %0d", m, n, t, rtl_s[c][t], sp);
        end
        ideal = $sin(2.0 * PI * real'((longint'(t) * (6 * 2604 + 1)) % NCYC) / real'(NCYC));
        mse_p += (real'(rtl_s[c][t]) / amp - ideal) ** 2;
        mse_t += (real'(st_) / amp - ideal) ** 2;
        mse_q += (real'(sq) / amp - ideal) ** 2;
        xbuf[t] = real'(st_);
      end
      spur_t = spur_dbc(kc);
      // previous-sum variant
      e = 0;
      for (int t = 0; t < NCYC; t++) begin
        e_prev = e;
        e = (e + longint'(xs[t]) % (longint'(1) << d)) % (longint'(1) << d);
        xbuf[t] = real'(quant(amp, ((longint'(xs[t]) + e_prev) >> d) % (longint'(1) << m), m));
      end
      spur_q = spur_dbc(kc);
      for (int t = 0; t < NCYC; t++) xbuf[t] = real'(rtl_s[c][t]);
      spur_p = spur_dbc(kc);
      mse_p = 10.0 * $log10(mse_p / NCYC);
      mse_t = 10.0 * $log10(mse_t / NCYC);
      mse_q = 10.0 * $log10(mse_q / NCYC);
      $display("%4d %3d |                 %7.2f  %7.2f  %7.2f  |          %7.2f  %7.2f  %7.2f",
               m, n, spur_t, spur_q, spur_p, mse_t, mse_q, mse_p);
      checks++;
      if (!(spur_p < spur_t)) begin
        failures++;
        $display("M=%0d N=%0d: largest spur not below truncation", m, n);
      end
      if (n > 4) begin
        checks++;
        if (!(mse_p < mse_t)) begin
          failures++;
          $display("M=%0d N=%0d: MSE not below truncation", m, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
