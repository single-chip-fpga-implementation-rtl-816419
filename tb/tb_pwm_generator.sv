// tb_pwm_generator: checks the PWM counter in sawtooth and triangle modes
// against a reference counter, the period length of each mode, and the
// upper/lower outputs (upper = TCNT < D, lower = complement, both low when
// servo is off) for random compare values.
module tb_pwm_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic servo, mode;
  logic [11:0] per, ca, cb, cc, tcnt;
  logic ps;
  logic [2:0] up, lo;

  pwm_generator dut (.clk, .rst_n, .servo, .pwm_mode(mode), .pwm_period(per),
                     .cmp_a(ca), .cmp_b(cb), .cmp_c(cc), .tcnt, .period_start(ps),
                     .upper(up), .lower(lo));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_cnt; bit ref_dn; int last_ps, nper;
  initial begin
    servo = 0; mode = 0; per = 12'd20; ca = 5; cb = 10; cc = 15;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // sawtooth
    ref_cnt = 1; last_ps = -1; nper = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      check(tcnt == 12'(ref_cnt), $sformatf("saw tcnt %0d exp %0d", tcnt, ref_cnt));
      if (ps) begin
        if (last_ps >= 0) begin check(t - last_ps == 21, "saw period"); nper++; end
        last_ps = t;
      end
      for (int i = 0; i < 3; i++) begin
        int c; c = (i == 0) ? ca : (i == 1) ? cb : cc;
        check(up[i] == (servo && (ref_cnt < c)), "saw upper");
        check(lo[i] == (servo && !(ref_cnt < c)), "saw lower");
      end
      if (t == 50) servo = 1;
      if (t % 37 == 0) begin ca = 12'($urandom_range(0, 22)); cb = 12'($urandom_range(0, 22)); end
      ref_cnt = (ref_cnt >= 20) ? 0 : ref_cnt + 1;
    end
    check(nper >= 8, "saw periods seen");
    // switch to triangle at a period start
    @(negedge clk); while (!ps) @(negedge clk);
    mode = 1;
    ref_cnt = 0; ref_dn = 0; last_ps = -1; nper = 0;
    @(negedge clk);
    ref_cnt = 1;
    for (int t = 1; t < 300; t++) begin
      check(tcnt == 12'(ref_cnt), $sformatf("tri tcnt %0d exp %0d t=%0d", tcnt, ref_cnt, t));
      if (ps) begin
        if (last_ps >= 0) begin check(t - last_ps == 40, "tri period"); nper++; end
        last_ps = t;
      end
      for (int i = 0; i < 3; i++) begin
        int c; c = (i == 0) ? ca : (i == 1) ? cb : cc;
        check(up[i] == (ref_cnt < c), "tri upper");
        check(lo[i] == !(ref_cnt < c), "tri lower");
      end
      if (t % 53 == 0) cc = 12'($urandom_range(0, 22));
      if (!ref_dn) begin if (ref_cnt >= 20) begin ref_dn = 1; ref_cnt--; end else ref_cnt++; end
      else begin if (ref_cnt <= 1) begin ref_dn = 0; ref_cnt = 0; end else ref_cnt--; end
      @(negedge clk);
    end
    check(nper >= 5, "tri periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
