// tb_bit_converter: for every denominator A (1..15) and numerator B the
// selected pulse lines must carry exactly B pulses per A clocks. The pulse
// count of each line is found here by stepping a 0..A-1 count and counting
// the rises of each bit. For A = 6 the codes E[3:1] for B = 5, 3, 1 must be
// 111, 100 and 001. B >= A must raise bad_b.
module tb_bit_converter;
  logic [3:0] den_a, num_b, sel_e;
  logic bad_b;
  int checks = 0, failures = 0;

  bit_converter #(.W(4)) dut (.den_a, .num_b, .sel_e, .bad_b);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("A=%0d B=%0d E=%b bad=%b: %s", den_a, num_b, sel_e, bad_b, what);
    end
  endtask

  initial begin
    int rises [4];
    int total, cur, nxt;
    for (int a = 1; a < 16; a++) begin
      foreach (rises[i]) rises[i] = 0;
      for (int k = 0; k < a; k++) begin
        cur = k;
        nxt = (k + 1) % a;
        for (int i = 0; i < 4; i++)
          if (((cur >> i) & 1) == 0 && ((nxt >> i) & 1) == 1) rises[i]++;
      end
      for (int b = 0; b < 16; b++) begin
        den_a = 4'(a);
        num_b = 4'(b);
        #1;
        total = 0;
        for (int i = 0; i < 4; i++) if (sel_e[3-i]) total += rises[i];
        if (b < a) begin
          check(total == b, "selected pulses do not add up to B");
          check(!bad_b, "bad_b raised for a valid B");
        end else begin
          check(bad_b, "bad_b not raised for B >= A");
        end
      end
    end
    den_a = 6;
    num_b = 5; #1 check(sel_e[3:1] == 3'b111, "A=6 B=5 code");
    num_b = 3; #1 check(sel_e[3:1] == 3'b100, "A=6 B=3 code");
    num_b = 1; #1 check(sel_e[3:1] == 3'b001, "A=6 B=1 code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
