// tb_sensorless_ic_top: end-to-end run of the whole controller at its
// default sizes (40 MHz clock, 1 ms test-vector intervals, 20 kHz PWM,
// 2 kHz speed loop, 115200-baud host line).
//
// The testbench plays the host, the A/D converter (ads7844_model) and a
// simple inverter + motor model. The host writes the start-up settings over
// the serial line and sets run. During detection the DC-link current of each
// test vector is 1500 + 300*cos(vector angle - rotor angle), so the vector
// nearest the rotor must be found. In open loop the model rotor follows the
// open-loop angle; after the hand-over it keeps turning at the hand-over
// speed. Phase currents follow i += A*(C*D - i - e) once per PWM period, in
// A/D counts, with D measured from the gate signals and the back-EMF e sized
// so that the flux term of the estimator accounts for the rotor's motion.
// Checked: detected vector, each phase of the start-up, position and speed
// tracking in closed loop, register read-back, gate safety (no leg
// shoot-through, deadtime gaps), and that every mechanism happened:
// test vectors, DC-link and phase samples, open loop, hand-over, speed PI
// runs, speed-command ramp steps, duty limit, both PWM modes, host reads,
// and a sequence overrun (none at 20 kHz, some in the half-length sawtooth
// period).
module tb_sensorless_ic_top;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;    // 40 MHz
  int checks = 0, failures = 0;
  localparam int BD = 347;
  localparam real PI2 = 6.283185307179586;

  logic rxd, txd, adc_clk, adc_cs_n, adc_din, adc_dout;
  logic [5:0] pwm;
  mode_e mode;
  logic [12:0] theta_est;
  s16_t speed_est;
  logic [3:0] init_pos;
  logic [11:0] adc_value [8];
  logic [7:0] last_ctrl;
  int frames;

  sensorless_ic_top dut (.clk, .rst_n, .rxd, .txd, .adc_clk, .adc_cs_n, .adc_din, .adc_dout,
    .pwm, .mode, .theta_est, .speed_est, .init_pos);

  ads7844_model adc (.dclk(adc_clk), .cs_n(adc_cs_n), .din(adc_din), .dout(adc_dout),
    .value(adc_value), .last_ctrl, .frames);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    #200_000_000;   // 200 ms
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host line ----------------
  task automatic send_byte(input logic [7:0] b);
    rxd = 0; repeat (BD) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BD) @(posedge clk); end
    rxd = 1; repeat (BD) @(posedge clk);
  endtask
  task automatic recv_byte(output logic [7:0] b);
    while (txd) @(posedge clk);
    repeat (BD + BD / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = txd; repeat (BD) @(posedge clk); end
  endtask
  task automatic wr(input reg_addr_e a, input logic [15:0] d);
    send_byte({1'b0, a}); send_byte(d[15:8]); send_byte(d[7:0]);
    repeat (4) @(posedge clk);
  endtask
  int n_reads = 0;
  task automatic rd(input reg_addr_e a, output logic [15:0] d);
    logic [7:0] h, l;
    fork
      send_byte({1'b1, a});
      begin recv_byte(h); recv_byte(l); end
    join
    d = {h, l};
    n_reads++;
  endtask

  // ---------------- gate monitor ----------------
  int shoot = 0, dt_gaps = 0, vec_seen = 0;
  logic [5:0] pwm_d;
  int off_len [6];
  always @(posedge clk) begin
    pwm_d <= pwm;
    if ((pwm[0] && pwm[1]) || (pwm[2] && pwm[3]) || (pwm[4] && pwm[5])) shoot++;
    if (mode == MODE_DETECT && pwm != 0 && pwm_d == 0) vec_seen++;
    for (int g = 0; g < 6; g++) begin
      if (pwm[g]) begin
        if (!pwm_d[g] && mode != MODE_DETECT && !pwm[g ^ 1] && off_len[g ^ 1] >= 40) dt_gaps++;
        off_len[g] = 0;
      end else off_len[g]++;
    end
  end

  // ---------------- motor and inverter model ----------------
  real th0, th_true, w_true, ia_m, ib_m, ic_m, ke;
  real kflux;
  int  on_up [3], per_len, n_open_per, n_closed_per, n_asym_per, n_sym_per, n_sat;
  logic was_closed;

  function automatic real duty_from(int on, int len, int per, int dt);
    if (len > per + 1) return (real'(on + dt) / 2.0) - real'(per) / 2.0;   // triangle
    else               return real'(on + dt) - real'(per) / 2.0;          // sawtooth
  endfunction

  // DC-link current of test vector n for the rotor at th0
  function automatic int idc_of(int n);
    return 1500 + $rtoi(300.0 * $cos(PI2 * (real'(n) * 8000.0 / 12.0 - th0) / 8000.0));
  endfunction

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) if (pwm[2*i]) on_up[i]++;
    per_len++;
    if (dut.period_start) begin
      real d [3];
      real e [3];
      for (int i = 0; i < 3; i++) d[i] = (mode == MODE_OPEN || mode == MODE_CLOSED)
                                         ? duty_from(on_up[i], per_len, 1000, 40) : 0.0;
      if (per_len > 1200) n_sym_per++; else if (per_len > 900) n_asym_per++;
      // rotor motion
      if (mode == MODE_OPEN) begin
        real nt;
        nt = real'(dut.u_startup.theta_ol);
        w_true = nt - th_true; if (w_true < -4000.0) w_true += 8000.0;
        th_true = nt;
        n_open_per++;
      end else if (mode == MODE_CLOSED) begin
        th_true = th_true + w_true;
        if (th_true >= 8000.0) th_true -= 8000.0;
        n_closed_per++;
      end
      for (int i = 0; i < 3; i++)
        e[i] = ke * w_true * $sin(PI2 * (th_true - real'(i) * 8000.0 / 3.0) / 8000.0);
      if (mode == MODE_OPEN || mode == MODE_CLOSED) begin
        ia_m = ia_m + (100.0 / 2048.0) * ((53.0 / 8.0) * d[0] - ia_m - e[0]);
        ib_m = ib_m + (100.0 / 2048.0) * ((53.0 / 8.0) * d[1] - ib_m - e[1]);
      end else begin
        ia_m = 0.0; ib_m = 0.0;
      end
      adc_value[0] = 12'(2048 + $rtoi(ia_m));
      adc_value[1] = 12'(2048 + $rtoi(ib_m));
      for (int i = 0; i < 3; i++) on_up[i] = 0;
      per_len = 0;
    end
    if (mode == MODE_DETECT) begin
      int n;
      n = int'(dut.u_detect.cnt2);
      adc_value[2] = 12'(idc_of(n));
    end
    if (dut.u_cc.done && (dut.u_cc.da == dut.cfg.clim || dut.u_cc.da == -dut.cfg.clim)) n_sat++;
  end

  // ---------------- mechanism counters ----------------
  int n_det_cycles = 0;
  always @(posedge clk) if (mode == MODE_DETECT) n_det_cycles++;
  int n_idc = 0, n_iph = 0, n_spd_pi = 0, n_cmd_steps = 0, n_handover = 0;
  s16_t cmd_d;
  always @(posedge clk) begin
    cmd_d <= dut.spd_cmd;
    if (dut.adc_valid && mode == MODE_DETECT) n_idc++;
    if (dut.valid_a || dut.valid_b) n_iph++;
    if (dut.spd_done) n_spd_pi++;
    if (mode == MODE_CLOSED && dut.spd_cmd != cmd_d) n_cmd_steps++;
    if (dut.handover) n_handover++;
  end

  int expect_pos, cyc0;
  real err, werr, maxerr;
  logic [15:0] d16;
  initial begin
    rxd = 1;
    for (int i = 0; i < 8; i++) adc_value[i] = 12'd2048;
    for (int i = 0; i < 6; i++) off_len[i] = 0;
    th0 = real'($urandom_range(0, 7999));
    th_true = th0; w_true = 0.0; ia_m = 0.0; ib_m = 0.0;
    n_open_per = 0; n_closed_per = 0; n_asym_per = 0; n_sym_per = 0; n_sat = 0;
    // back-EMF size so that the flux term gives (1 - 10*alpha) of the motion
    kflux = 1.0 - 10.0 * 105.0 / 16384.0;
    ke = kflux / (0.75 * (193.0 / 1024.0) * (100.0 / 2048.0));
    expect_pos = $rtoi(th0 / (8000.0 / 12.0) + 0.5) % 12;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    // start-up settings
    wr(REG_OL_ACCEL, 16'd100);
    wr(REG_OL_SWITCH, 16'd80);
    wr(REG_SLOW, 16'd0);
    wr(REG_SPD_TGT, 16'd100);
    wr(REG_ACCEL, 16'd1);
    wr(REG_OL_ISTART, 16'd200);
    rd(REG_OL_SWITCH, d16); check(d16 == 16'd80, "read back");
    wr(REG_CTRL, 16'h0003);            // run, symmetric PWM
    // detection
    while (mode != MODE_OPEN) @(posedge clk);
    cyc0 = n_det_cycles;
    check(cyc0 >= 12 * 40000 && cyc0 < 12 * 40000 + 100, $sformatf("detection took %0d cycles", cyc0));
    check(int'(init_pos) == expect_pos, $sformatf("init_pos %0d exp %0d (rotor %0.0f)", init_pos, expect_pos, th0));
    check(mode == MODE_OPEN, "open loop after detection");
    $display("detected vector %0d for rotor at %0.0f counts", init_pos + 1, th0);
    // open loop until hand-over
    while (mode == MODE_OPEN) @(posedge clk);
    check(mode == MODE_CLOSED, "closed loop reached");
    $display("closed loop at %0.2f counts/sample after %0d open-loop periods", w_true, n_open_per);
    // closed loop
    maxerr = 0;
    for (int p = 0; p < 400; p++) begin
      @(posedge clk); while (!dut.period_start) @(posedge clk);
      if (p > 200) begin
        err = real'(theta_est) - th_true;
        if (err > 4000.0) err -= 8000.0; if (err < -4000.0) err += 8000.0;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
      end
    end
    werr = real'(speed_est) - 10.0 * w_true;
    $display("closed loop: max position error %0.1f counts, speed %0d (true %0.1f)", maxerr, speed_est, 10.0 * w_true);
    check(maxerr < 200.0, $sformatf("position tracking error %0.1f counts", maxerr));
    check(werr < 10.0 && werr > -10.0, $sformatf("speed estimate %0d vs %0.1f", speed_est, 10.0 * w_true));
    rd(REG_STATUS, d16);
    check(d16[1:0] == 2'(MODE_CLOSED) && d16[7:4] == init_pos, $sformatf("status %h", d16));
    check(dut.overruns == 0, $sformatf("overruns at 20 kHz triangle PWM %0d", dut.overruns));
    // switch to the sawtooth PWM mode
    wr(REG_CTRL, 16'h0001);
    repeat (30000) @(posedge clk);
    check(n_asym_per > 5, $sformatf("sawtooth periods %0d", n_asym_per));
    // a sawtooth period of PWM_PER counts is half as long: the control
    // sequence no longer fits and the skipped periods are counted
    check(dut.overruns > 0, "overrun counted in the short sawtooth period");
    $display("overruns in sawtooth mode: %0d", dut.overruns);
    rd(REG_THETA, d16);
    check(mode == MODE_CLOSED, "still closed loop");
    // stop
    wr(REG_CTRL, 16'h0000);
    repeat (10) @(posedge clk);
    check(mode == MODE_IDLE && pwm == 0, "stopped");
    // gates and mechanisms
    check(shoot == 0, $sformatf("shoot-through %0d", shoot));
    check(vec_seen == 12, $sformatf("test vectors %0d", vec_seen));
    check(n_idc == 12, $sformatf("DC-link samples %0d", n_idc));
    check(n_iph > 1000, $sformatf("phase samples %0d", n_iph));
    check(n_open_per > 10, "open-loop periods");
    check(n_handover == 1, "hand-over");
    check(n_closed_per > 400, "closed-loop periods");
    check(n_spd_pi > 40, $sformatf("speed PI runs %0d", n_spd_pi));
    check(n_cmd_steps > 5, $sformatf("speed command steps %0d", n_cmd_steps));
    check(n_sym_per > 100, "triangle periods");
    check(dt_gaps > 100, $sformatf("deadtime gaps %0d", dt_gaps));
    check(n_sat > 0, $sformatf("duty limit reached %0d", n_sat));
    check(n_reads == 3, "host reads");
    $display("mechanisms: vectors=%0d idc=%0d iph=%0d open=%0d handover=%0d closed=%0d spdpi=%0d cmdsteps=%0d sym=%0d asym=%0d dtgaps=%0d sat=%0d reads=%0d",
             vec_seen, n_idc, n_iph, n_open_per, n_handover, n_closed_per, n_spd_pi, n_cmd_steps,
             n_sym_per, n_asym_per, dt_gaps, n_sat, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
