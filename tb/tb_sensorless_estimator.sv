// tb_sensorless_estimator:
//  1. Bit-exact check: random duties, currents, back-EMF values and speed
//     against an integer reference of
//       dpsi = (C*D - i<<3)*A - (i(k)-i(k-1))<<14        (Q14)
//       dtheta = alpha*w - (B*((dpsi_a*eb>>9)+(dpsi_b*ec>>9)+(dpsi_c*ea>>9)))>>10
//       theta = (theta + dtheta) mod 8000<<14
//     with the 16-cycle latency, and the init load.
//  2. Tracking: a rotor turning at 20 counts per sample, and then at 80
//     counts per sample (2000 rpm at 20 kHz with 6 pole pairs, the speed of
//     the published estimator simulation), is fed as the flux increments its
//     motion would produce, with the estimator's own back-EMF functions
//     taken from a sine of its estimated angle. The estimate must stay
//     within 67 counts (3 electrical degrees) of the true angle over 1200
//     samples at each speed; the estimator starts 20 counts off.
module tb_sensorless_estimator;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, init, done, busy;
  logic [12:0] theta_init, theta;
  s16_t da, db, dc, ia, ib, ic, ea, eb, ec, w_hat, ca, cb, cc, alpha;
  logic signed [31:0] dtheta_q;

  sensorless_estimator dut (.clk, .rst_n, .start, .init, .theta_init, .da, .db, .dc,
    .ia, .ib, .ic, .ea, .eb, .ec, .w_hat, .coef_a(ca), .coef_b(cb), .coef_c(cc), .alpha,
    .theta, .dtheta_q, .done, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint MODQ = 64'd8000 << 14;
  longint thq, pia, pib, pic;
  int lat;

  task automatic run_one();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  function automatic longint t32(longint v);   // 32-bit two's complement wrap
    return longint'($signed(32'(v)));
  endfunction

  real th_true, err, maxerr;
  task automatic track(input real spd);
    alpha = 0; w_hat = 0; ia = 0; ib = 0; ic = 0;
    theta_init = 13'd520;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    th_true = 500.0; maxerr = 0.0;
    for (int n = 0; n < 1200; n++) begin
      real kpsi, g, ta, tb2;
      // A*C in real units is (100/2048)*(53/8); B is 193/1024 with the 0.75 folded in
      kpsi = 1.0 / (0.75 * 193.0 / 1024.0);
      g = kpsi * spd / ((100.0 / 2048.0) * (53.0 / 8.0));
      ta = th_true + spd / 2.0;   // mid-interval angle
      da = 16'($rtoi(g * $sin(2.0 * 3.14159265358979 * ta / 8000.0)));
      db = 16'($rtoi(g * $sin(2.0 * 3.14159265358979 * (ta - 2666.667) / 8000.0)));
      dc = 16'($rtoi(g * $sin(2.0 * 3.14159265358979 * (ta + 2666.667) / 8000.0)));
      tb2 = real'(theta);
      ea = 16'($rtoi(512.0 * $sin(2.0 * 3.14159265358979 * tb2 / 8000.0)));
      eb = 16'($rtoi(512.0 * $sin(2.0 * 3.14159265358979 * (tb2 - 2666.667) / 8000.0)));
      ec = 16'($rtoi(512.0 * $sin(2.0 * 3.14159265358979 * (tb2 + 2666.667) / 8000.0)));
      run_one();
      th_true = th_true + spd;
      if (th_true >= 8000.0) th_true -= 8000.0;
      err = real'(theta) - th_true;
      if (err > 4000.0) err -= 8000.0;
      if (err < -4000.0) err += 8000.0;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    $display("tracking at %0.0f counts/sample: max error %0.1f counts", spd, maxerr);
    check(maxerr < 67.0, $sformatf("tracking error %0.1f counts at %0.0f", maxerr, spd));
  endtask

  initial begin
    start = 0; init = 0; theta_init = 0;
    {da, db, dc, ia, ib, ic, ea, eb, ec, w_hat} = '0;
    ca = 16'sd100; cb = 16'sd193; cc = 16'sd53; alpha = 16'sd105;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // init load
    theta_init = 13'd1234; ia = 16'sd10; ib = -16'sd4; ic = -16'sd6;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    check(theta == 13'd1234, "init theta");
    thq = 64'd1234 << 14; pia = 10; pib = -4; pic = -6;
    // 1. bit-exact
    for (int n = 0; n < 300; n++) begin
      longint xa, xb, xc, fa, fb, fc, s, dth;
      da = 16'($signed($urandom_range(0, 1000)) - 500);
      db = 16'($signed($urandom_range(0, 1000)) - 500);
      dc = 16'($signed($urandom_range(0, 1000)) - 500);
      ia = 16'($signed($urandom_range(0, 4000)) - 2000);
      ib = 16'($signed($urandom_range(0, 4000)) - 2000);
      ic = -ia - ib;
      ea = 16'($signed($urandom_range(0, 1024)) - 512);
      eb = 16'($signed($urandom_range(0, 1024)) - 512);
      ec = 16'($signed($urandom_range(0, 1024)) - 512);
      w_hat = 16'($signed($urandom_range(0, 6000)) - 3000);
      run_one();
      xa = longint'(cc) * da - (longint'(ia) <<< 3);
      xb = longint'(cc) * db - (longint'(ib) <<< 3);
      xc = longint'(cc) * dc - (longint'(ic) <<< 3);
      fa = t32(xa * ca - ((ia - pia) <<< 14));
      fb = t32(xb * ca - ((ib - pib) <<< 14));
      fc = t32(xc * ca - ((ic - pic) <<< 14));
      s  = t32(t32((fa * eb) >>> 9) + t32((fb * ec) >>> 9) + t32((fc * ea) >>> 9));
      dth = t32(longint'(alpha) * w_hat - t32((s * cb) >>> 10));
      thq = thq + dth;
      if (thq >= MODQ) thq -= MODQ; else if (thq < 0) thq += MODQ;
      pia = ia; pib = ib; pic = ic;
      check(longint'(dtheta_q) == dth, $sformatf("n=%0d dtheta %0d exp %0d", n, dtheta_q, dth));
      check(longint'(theta) == (thq >> 14), $sformatf("n=%0d theta %0d exp %0d", n, theta, thq >> 14));
      check(lat == 16, $sformatf("latency %0d", lat));
    end
    // 2. tracking with flux increments of a turning rotor, lambda = 1 (alpha = 0)
    track(20.0);
    track(80.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
