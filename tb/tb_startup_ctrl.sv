// tb_startup_ctrl: walks the start-up sequence. Checks: run starts the
// detection, the detected vector index n gives the initial angle
// round(n*8000/12) and an estimator load, the open-loop angle advances by
// the open-loop speed every current tick with the speed rising by ol_accel
// every speed tick (reference in Q8 arithmetic), the hand-over to closed loop
// happens on the first speed tick whose speed reaches ol_switch, and run low
// returns to idle.
module tb_startup_ctrl;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic run, tick_cur, tick_spd, det_done, det_start, est_init, handover;
  logic [3:0] det_pos;
  logic [15:0] ol_accel;
  s16_t ol_switch, ol_speed;
  mode_e mode;
  logic [12:0] theta_init, theta_ol;

  startup_ctrl #(.CUR_PER_SPD(10)) dut (.clk, .rst_n, .run, .tick_cur, .tick_spd, .det_done,
    .det_pos, .ol_accel, .ol_switch, .mode, .det_start, .est_init, .theta_init, .theta_ol,
    .ol_speed, .handover);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint thq, om;
  int n_ticks, ho_seen, got_start, got_init;
  initial begin
    run = 0; tick_cur = 0; tick_spd = 0; det_done = 0; det_pos = 0;
    ol_accel = 16'd10; ol_switch = 16'sd200;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      got_start = 0; got_init = 0;
      @(negedge clk); run = 1;
      repeat (3) begin @(negedge clk); if (det_start) got_start++; end
      check(got_start == 1, "one detection start");
      check(mode == MODE_DETECT, "in detection");
      det_pos = 4'($urandom_range(0, 11));
      det_done = 1; @(negedge clk); det_done = 0;
      if (est_init) got_init++;
      check(got_init == 1, "estimator load");
      check(int'(theta_init) == (int'(det_pos) * 8000 + 6) / 12, $sformatf("theta_init %0d", theta_init));
      check(mode == MODE_OPEN, "open loop");
      thq = longint'(theta_init) << 8; om = 0; ho_seen = 0; n_ticks = 0;
      check(theta_ol == theta_init, "open loop starts at detected angle");
      while (mode == MODE_OPEN && n_ticks < 100000) begin
        n_ticks++;
        tick_cur = 1;
        tick_spd = (n_ticks % 10 == 0);
        @(negedge clk); tick_cur = 0; tick_spd = 0;
        thq = thq + om; if (thq >= (64'd8000 << 8)) thq -= (64'd8000 << 8);
        if (n_ticks % 10 == 0) om = om + ol_accel;
        check(longint'(theta_ol) == (thq >> 8), $sformatf("theta_ol %0d exp %0d", theta_ol, thq >> 8));
        check(longint'(ol_speed) == ((om * 10) >> 8), "ol_speed");
        @(negedge clk);
        if (handover) ho_seen++;
      end
      check(mode == MODE_CLOSED, "closed loop reached");
      check(ho_seen == 1, "one hand-over");
      check(((om * 10) >> 8) >= 200 && (((om - ol_accel) * 10) >> 8) < 200, "switch speed");
      run = 0; @(negedge clk); @(negedge clk);
      check(mode == MODE_IDLE, "idle after run low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
