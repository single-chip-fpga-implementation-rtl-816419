// pmsm_pkg: types, constants and the configuration-register map shared by the
// blocks of the sensorless PMSM speed-control core.
//
// Angle convention: one electrical revolution is 8000 counts (0..7999), as in
// the estimator description; the normalized back-EMF functions are Q9 values
// read from a 500-point sine table (16 angle counts per table step).
// Speed is expressed in angle counts per speed-loop period (2 kHz), so with
// 6 pole pairs one count is 2.5 rpm. The register map and its reset values
// are this design's own choice; estimator constants default to the values
// used in the reference simulation (A=100 Q11, B=193 Q10, C=53 Q3, alpha=105 Q14).
package pmsm_pkg;

  localparam int unsigned THETA_COUNTS = 8000;   // counts per electrical revolution
  localparam int unsigned THETA_W      = 13;     // bits to hold 0..7999
  localparam int unsigned SINE_POINTS  = 500;    // back-EMF table length
  localparam int unsigned THETA_FRAC   = 14;     // fractional bits of the position accumulator
  localparam int unsigned THETA_120    = 2667;   // 120 electrical degrees in counts (rounded)

  typedef logic signed [15:0] s16_t;

  // Start-up phases of Fig. 5: estimation, open loop, closed loop.
  typedef enum logic [1:0] {
    MODE_IDLE   = 2'd0,
    MODE_DETECT = 2'd1,
    MODE_OPEN   = 2'd2,
    MODE_CLOSED = 2'd3
  } mode_e;

  // Register addresses (16-bit registers).
  typedef enum logic [6:0] {
    REG_CTRL      = 7'h00,  // [0] run, [1] PWM mode (1 = symmetric up-down)
    REG_PWM_PER   = 7'h01,  // PWM_period, 12 bits
    REG_DEADTIME  = 7'h02,  // deadtime, 7 bits, in clock cycles
    REG_SPD_TGT   = 7'h03,  // speed command target
    REG_SHIGH     = 7'h04,  // speed command upper limit
    REG_SLOW      = 7'h05,  // speed command lower limit
    REG_ACCEL     = 7'h06,  // acceleration step per speed period
    REG_DECEL     = 7'h07,  // deceleration step per speed period
    REG_SKP       = 7'h08,  // speed PI Kp, Q10
    REG_SKI       = 7'h09,  // speed PI Ki, Q10
    REG_SLIM      = 7'h0A,  // speed PI limits (integrator and output)
    REG_CKP       = 7'h0B,  // current PI Kp, Q10
    REG_CKI       = 7'h0C,  // current PI Ki, Q10
    REG_CLIM      = 7'h0D,  // current PI limits (integrator and duty)
    REG_EST_A     = 7'h0E,  // estimator A, Q11
    REG_EST_B     = 7'h0F,  // estimator B magnitude, Q10
    REG_EST_C     = 7'h10,  // estimator C, Q3
    REG_EST_ALPHA = 7'h11,  // estimator alpha, Q14
    REG_V1_TIME   = 7'h12,  // on-time of odd test vectors, clock cycles
    REG_V2_TIME   = 7'h13,  // on-time of even test vectors, clock cycles
    REG_OFFS_A    = 7'h14,  // ADC offset phase a
    REG_OFFS_B    = 7'h15,  // ADC offset phase b
    REG_ISCALE    = 7'h16,  // current scaling gain, Q8
    REG_OL_ISTART = 7'h17,  // open-loop current command
    REG_OL_ACCEL  = 7'h18,  // open-loop acceleration, Q8 counts per sample per speed period
    REG_OL_SWITCH = 7'h19,  // speed at which the closed loop takes over
    REG_THETA     = 7'h20,  // read only: estimated position
    REG_SPEED     = 7'h21,  // read only: estimated speed
    REG_STATUS    = 7'h22   // read only: [1:0] mode, [7:4] initial vector index
  } reg_addr_e;

  localparam int unsigned NUM_CFG_REGS = 26;

  typedef struct packed {
    logic        run;
    logic        pwm_mode;
    logic [11:0] pwm_period;
    logic [6:0]  deadtime;
    s16_t        spd_target;
    s16_t        shigh;
    s16_t        slow;
    logic [15:0] accel;
    logic [15:0] decel;
    s16_t        skp;
    s16_t        ski;
    s16_t        slim;
    s16_t        ckp;
    s16_t        cki;
    s16_t        clim;
    s16_t        est_a;
    s16_t        est_b;
    s16_t        est_c;
    s16_t        est_alpha;
    logic [15:0] v1_time;
    logic [15:0] v2_time;
    logic [11:0] offs_a;
    logic [11:0] offs_b;
    s16_t        iscale;
    s16_t        ol_istart;
    logic [15:0] ol_accel;
    s16_t        ol_switch;
  } cfg_t;

  // Saturate a wide signed value to +/- lim (lim taken as non-negative).
  function automatic logic signed [31:0] limit32(input logic signed [31:0] v,
                                                 input logic signed [15:0] lim);
    logic signed [31:0] l;
    l = {{16{lim[15]}}, lim};
    if (v > l)       return l;
    else if (v < -l) return -l;
    else             return v;
  endfunction

endpackage
