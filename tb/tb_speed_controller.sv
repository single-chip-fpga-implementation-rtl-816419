// tb_speed_controller: random speed errors against an integer reference of
// the PI law (Q10 gains, integrator and output limited to +/-SLim); checks
// u, the integrator state through the next result, the 6-cycle latency, and
// that both the anti-windup and the output limit are exercised.
module tb_speed_controller;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, preset, done, busy;
  s16_t w_ref, w_fb, kp, ki, lim, preset_val, u;

  speed_controller dut (.clk, .rst_n, .start, .w_ref, .w_fb, .kp, .ki, .lim,
                        .preset, .preset_val, .u, .done, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lm(longint v, longint l);
    return v > l ? l : (v < -l ? -l : v);
  endfunction

  longint integ, e, p, uexp;
  int lat, n_isat, n_usat;
  initial begin
    start = 0; preset = 0; preset_val = 0;
    kp = 16'sd2048; ki = 16'sd300; lim = 16'sd1500;
    w_ref = 0; w_fb = 0;
    integ = 0; n_isat = 0; n_usat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      if (n % 100 == 0) begin
        kp = 16'($urandom_range(0, 4096)); ki = 16'($urandom_range(0, 1024));
        lim = 16'($urandom_range(100, 3000));
      end
      w_ref = 16'($urandom_range(0, 2800));
      w_fb  = (n % 7 == 0) ? 16'(-$urandom_range(0, 30000)) : 16'(w_ref + $signed($urandom_range(0, 400)) - 200);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      e = longint'(w_ref) - longint'(w_fb);
      e = lm(e, 32767);
      integ = lm(integ + ((ki * e) >>> 10), lim);
      if (integ == lim || integ == -lim) n_isat++;
      p = (kp * e) >>> 10;
      uexp = lm(p + integ, lim);
      if (uexp == lim || uexp == -lim) n_usat++;
      check(longint'(u) == uexp, $sformatf("u=%0d exp=%0d", u, uexp));
      check(lat == 6, $sformatf("latency %0d", lat));
    end
    // preset loads the integrator
    @(negedge clk); preset = 1; preset_val = 16'sd123; @(negedge clk); preset = 0;
    kp = 0; ki = 0; lim = 16'sd2000; w_ref = 5; w_fb = 5;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(u == 16'sd123, "preset");
    check(n_isat > 5 && n_usat > 5, $sformatf("limits hit isat=%0d usat=%0d", n_isat, n_usat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
