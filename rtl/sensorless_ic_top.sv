// sensorless_ic_top: single-chip sensorless speed controller for a
// permanent-magnet synchronous motor.
//
// The chip drives a three-phase inverter (gates pwm[0..5] = S1..S6), reads
// the phase currents ia, ib and the DC-link current through a serial A/D
// converter, and is set up by a host over a serial line (rxd/txd). Inside:
//   host_reg_if        configuration registers over the serial line
//   startup_ctrl       idle -> initial position detection -> open loop -> closed loop
//   init_pos_detect    twelve-vector DC-link current test at standstill
//   control_sequencer  20 kHz current loop / 2 kHz speed loop timing
//   adc_serial_if      A/D converter frames (ia = CH0, ib = CH1, DC link = CH2)
//   offset_scaling     raw codes -> signed currents, ic = -(ia+ib)
//   sensorless_estimator + bemf_generator + speed_calc   position and speed
//   command_generator  speed command ramp
//   speed_controller   speed PI -> torque (current amplitude) command I*
//   current_controller I* x e, two current PIs -> duties Da, Db, Dc
//   spwm_modulator     three-phase PWM with deadtime
// Two back-EMF generators are used: one for the estimator's own position
// feedback and one for the current references, whose angle is the open-loop
// angle during start-up and the estimated angle in closed loop (in closed loop
// both look up the same angle). In the detection phase the gates come from
// init_pos_detect and the A/D converter samples the DC link for it.
// The top is purely structural apart from these multiplexers.
module sensorless_ic_top
  import pmsm_pkg::*;
#(
  parameter int unsigned CLK_DIV     = 10,     // A/D clock = clk / (2*CLK_DIV)
  parameter int unsigned BAUD_DIV    = 347,    // 115200 baud at 40 MHz
  parameter int unsigned INTERVAL    = 40000,  // test-vector interval, 1 ms at 40 MHz
  parameter int unsigned CUR_PER_SPD = 10      // current samples per speed sample
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic        txd,
  output logic        adc_clk,
  output logic        adc_cs_n,
  output logic        adc_din,
  input  logic        adc_dout,
  output logic [5:0]  pwm,
  output mode_e       mode,
  output logic [THETA_W-1:0] theta_est,
  output s16_t        speed_est,
  output logic [3:0]  init_pos
);
  localparam logic [2:0] CH_IA = 3'd0, CH_IB = 3'd1, CH_IDC = 3'd2;

  cfg_t cfg;

  // ---------------- start-up and detection ----------------
  logic det_start, det_done, det_active, det_adc_req, est_init, handover;
  logic [5:0]  det_pwm;
  logic [11:0] det_peak;
  logic [THETA_W-1:0] theta_init, theta_ol;
  s16_t ol_speed;
  logic cur_tick, spd_tick;
  logic in_loop, closed;

  assign in_loop = (mode == MODE_OPEN) || (mode == MODE_CLOSED);
  assign closed  = (mode == MODE_CLOSED);

  // ---------------- A/D ----------------
  logic        adc_req, seq_adc_req, adc_valid, adc_busy;
  logic [2:0]  adc_ch, seq_adc_ch;
  logic [11:0] adc_data;

  assign adc_req = (mode == MODE_DETECT) ? det_adc_req : seq_adc_req;
  assign adc_ch  = (mode == MODE_DETECT) ? CH_IDC      : seq_adc_ch;

  // ---------------- loop signals ----------------
  logic valid_a, valid_b, est_start, est_done, est_busy, bemf_start;
  logic bemf_est_done, bemf_ctl_done, spd_start, spd_done, spd_busy;
  logic cc_start, cc_done, cc_busy, duty_load, period_start;
  logic [15:0] overruns;
  s16_t ia, ib, ic;
  s16_t ea_est, eb_est, ec_est, ea_ctl, eb_ctl, ec_ctl;
  s16_t spd_cmd, istar_pi, istar;
  s16_t da, db, dc, ap_a, ap_b, ap_c;
  logic [11:0] tcnt;
  logic [5:0]  spwm_pwm;
  logic signed [31:0] dtheta_q;
  logic [THETA_W-1:0] theta_ctl;

  host_reg_if #(.BAUD_DIV(BAUD_DIV)) u_host (
    .clk, .rst_n, .rxd, .txd,
    .theta_rd({3'b000, theta_est}),
    .speed_rd(speed_est),
    .status_rd({8'h00, init_pos, 2'b00, mode}),
    .cfg
  );

  startup_ctrl #(.CUR_PER_SPD(CUR_PER_SPD)) u_startup (
    .clk, .rst_n, .run(cfg.run), .tick_cur(cur_tick), .tick_spd(spd_tick),
    .det_done, .det_pos(init_pos), .ol_accel(cfg.ol_accel), .ol_switch(cfg.ol_switch),
    .mode, .det_start, .est_init, .theta_init, .theta_ol, .ol_speed, .handover
  );

  init_pos_detect #(.INTERVAL(INTERVAL)) u_detect (
    .clk, .rst_n, .start(det_start), .v1_time(cfg.v1_time), .v2_time(cfg.v2_time),
    .idc(adc_data), .idc_valid(adc_valid && (mode == MODE_DETECT)),
    .pwm(det_pwm), .active(det_active), .adc_req(det_adc_req), .done(det_done),
    .init_pos, .peak(det_peak)
  );

  adc_serial_if #(.CLK_DIV(CLK_DIV)) u_adc (
    .clk, .rst_n, .req(adc_req), .ch(adc_ch),
    .adc_clk, .adc_cs_n, .adc_din, .adc_dout,
    .data(adc_data), .valid(adc_valid), .busy(adc_busy)
  );

  control_sequencer #(.CUR_PER_SPD(CUR_PER_SPD), .CH_IA(CH_IA), .CH_IB(CH_IB)) u_seq (
    .clk, .rst_n, .enable(in_loop), .spd_enable(closed), .period_start,
    .adc_valid, .est_done, .bemf_done(bemf_est_done), .spd_done, .cc_done,
    .adc_req(seq_adc_req), .adc_ch(seq_adc_ch), .valid_a, .valid_b,
    .est_start, .bemf_start, .cur_tick, .spd_tick, .spd_start, .cc_start,
    .duty_load, .overruns
  );

  offset_scaling u_scale (
    .clk, .rst_n, .raw(adc_data), .valid_a, .valid_b,
    .offs_a(cfg.offs_a), .offs_b(cfg.offs_b), .gain(cfg.iscale),
    .ia, .ib, .ic
  );

  sensorless_estimator u_est (
    .clk, .rst_n, .start(est_start), .init(est_init), .theta_init,
    .da(ap_a), .db(ap_b), .dc(ap_c), .ia, .ib, .ic,
    .ea(ea_est), .eb(eb_est), .ec(ec_est), .w_hat(speed_est),
    .coef_a(cfg.est_a), .coef_b(cfg.est_b), .coef_c(cfg.est_c), .alpha(cfg.est_alpha),
    .theta(theta_est), .dtheta_q, .done(est_done), .busy(est_busy)
  );

  bemf_generator u_bemf_est (
    .clk, .rst_n, .start(bemf_start), .theta(theta_est),
    .ea(ea_est), .eb(eb_est), .ec(ec_est), .done(bemf_est_done)
  );

  assign theta_ctl = closed ? theta_est : theta_ol;

  bemf_generator u_bemf_ctl (
    .clk, .rst_n, .start(bemf_start), .theta(theta_ctl),
    .ea(ea_ctl), .eb(eb_ctl), .ec(ec_ctl), .done(bemf_ctl_done)
  );

  speed_calc u_ddt (
    .clk, .rst_n, .sample(spd_tick), .init(est_init), .theta(theta_est), .speed(speed_est)
  );

  command_generator u_cmd (
    .clk, .rst_n, .tick(spd_tick && closed), .target(cfg.spd_target),
    .shigh(cfg.shigh), .slow(cfg.slow), .accel(cfg.accel), .decel(cfg.decel),
    .preset(handover), .preset_val(ol_speed), .cmd(spd_cmd)
  );

  speed_controller u_spd (
    .clk, .rst_n, .start(spd_start), .w_ref(spd_cmd), .w_fb(speed_est),
    .kp(cfg.skp), .ki(cfg.ski), .lim(cfg.slim),
    .preset(handover), .preset_val(cfg.ol_istart),
    .u(istar_pi), .done(spd_done), .busy(spd_busy)
  );

  assign istar = closed ? istar_pi : cfg.ol_istart;

  current_controller u_cc (
    .clk, .rst_n, .start(cc_start), .init(est_init), .istar,
    .ea(ea_ctl), .eb(eb_ctl), .ia, .ib,
    .kp(cfg.ckp), .ki(cfg.cki), .lim(cfg.clim),
    .da, .db, .dc, .done(cc_done), .busy(cc_busy)
  );

  spwm_modulator u_spwm (
    .clk, .rst_n, .servo(in_loop), .pwm_mode(cfg.pwm_mode), .pwm_period(cfg.pwm_period),
    .deadtime(cfg.deadtime), .duty_load, .duty_a(da), .duty_b(db), .duty_c(dc),
    .applied_a(ap_a), .applied_b(ap_b), .applied_c(ap_c),
    .period_start, .tcnt, .pwm(spwm_pwm)
  );

  assign pwm = (mode == MODE_DETECT) ? det_pwm : spwm_pwm;
endmodule
