// tb_spwm_modulator: signed duties through the modulator in both PWM modes.
// Per period it checks: no leg ever has both gates on; after a gate turns
// off the other gate of its leg stays off for at least `deadtime` cycles;
// the upper gate's on-time equals the number of cycles with
// TCNT < duty + period/2 (clamped to 0..period) minus the deadtime; duties
// loaded mid-period take effect at the next period start; applied_* shows
// them one period later; the period is 2*period (triangle) or period+1
// (sawtooth) cycles; servo off turns all gates off.
module tb_spwm_modulator;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic servo, pwm_mode, duty_load, period_start;
  logic [11:0] pwm_period, tcnt;
  logic [6:0] deadtime;
  s16_t duty_a, duty_b, duty_c, ap_a, ap_b, ap_c;
  logic [5:0] pwm;

  spwm_modulator dut (.clk, .rst_n, .servo, .pwm_mode, .pwm_period, .deadtime, .duty_load,
    .duty_a, .duty_b, .duty_c, .applied_a(ap_a), .applied_b(ap_b), .applied_c(ap_c),
    .period_start, .tcnt, .pwm);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int shoot, off_cnt [6], dt_viol;
  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < 6; g++) begin
      if (pwm[g])              off_cnt[g] = -1;
      else if (off_cnt[g] < 0) off_cnt[g] = 0;
      else                     off_cnt[g]++;
    end
    for (int g = 0; g < 6; g++)
      if (pwm[g] && off_cnt[g ^ 1] >= 0 && off_cnt[g ^ 1] < int'(deadtime)) dt_viol++;
    if ((pwm[0] && pwm[1]) || (pwm[2] && pwm[3]) || (pwm[4] && pwm[5])) shoot++;
  end

  function automatic int cmpv(s16_t d);
    int v = int'(d) + int'(pwm_period) / 2;
    if (v < 0) v = 0;
    if (v > int'(pwm_period)) v = pwm_period;
    return v;
  endfunction

  s16_t nxt [3];
  int on_up [3], on_ref [3], plen;
  initial begin
    servo = 0; pwm_mode = 1; pwm_period = 12'd200; deadtime = 7'd6; duty_load = 0;
    duty_a = 0; duty_b = 0; duty_c = 0;
    for (int g = 0; g < 6; g++) off_cnt[g] = 1000;
    shoot = 0; dt_viol = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); servo = 1;
    for (int t = 0; t < 40; t++) begin
      if (t == 20) pwm_mode = 0;
      for (int i = 0; i < 3; i++) nxt[i] = 16'($signed($urandom_range(0, 260)) - 130);
      if (t % 7 == 3) nxt[0] = 16'sd400;    // clamps high: gate always on
      if (t % 7 == 5) nxt[1] = -16'sd400;   // clamps low: gate always off
      // load mid-period: must not act before the next period start
      while (int'(tcnt) != 50) @(negedge clk);
      duty_a = nxt[0]; duty_b = nxt[1]; duty_c = nxt[2];
      duty_load = 1; @(negedge clk); duty_load = 0;
      while (!period_start) @(negedge clk);
      @(negedge clk);
      while (!period_start) @(negedge clk);
      // active since the last period start; applied_* still shows the previous duties
      for (int i = 0; i < 3; i++) begin on_up[i] = 0; on_ref[i] = 0; end
      plen = 0;
      do begin
        for (int i = 0; i < 3; i++) begin
          if (pwm[2*i]) on_up[i]++;
          if (int'(tcnt) < cmpv(nxt[i])) on_ref[i]++;
        end
        plen++;
        @(negedge clk);
      end while (!period_start);
      check(ap_a == nxt[0] && ap_b == nxt[1] && ap_c == nxt[2], "applied after one full period");
      check(plen == (pwm_mode ? 2 * int'(pwm_period) : int'(pwm_period) + 1), $sformatf("period %0d", plen));
      for (int i = 0; i < 3; i++) begin
        automatic int e = (on_ref[i] == 0) ? 0 : (on_ref[i] == plen) ? plen : on_ref[i] - int'(deadtime);
        if (e < 0) e = 0;
        check(on_up[i] == e, $sformatf("t %0d phase %0d on %0d exp %0d (ref %0d)", t, i, on_up[i], e, on_ref[i]));
      end
    end
    check(shoot == 0, $sformatf("shoot-through %0d", shoot));
    check(dt_viol == 0, $sformatf("deadtime violations %0d", dt_viol));
    servo = 0; repeat (3) @(negedge clk);
    check(pwm == 6'b0, "servo off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
