// spwm_modulator: the sinusoidal PWM modulator with deadtime.
//
// Takes the signed duties Da, Db, Dc from the current controller (centred on
// zero, in timer counts), adds half the PWM period to make the compare values,
// clamps them to 0..pwm_period, and drives the three-phase PWM core and six
// deadtime generators. Outputs pwm[0..5] are the gates S1..S6: S1/S2 upper/lower
// of phase a, S3/S4 of phase b, S5/S6 of phase c.
// Duties written with duty_load are held in a shadow register and take effect
// at the next period start; duty_applied holds the duties that were in force
// during the period that has just ended, for the position estimator (its
// phase voltage is taken from the duty). The offset, the clamping and the
// shadow registers are this design's choices.
module spwm_modulator
  import pmsm_pkg::*;
#(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          servo,
  input  logic          pwm_mode,
  input  logic [CW-1:0] pwm_period,
  input  logic [6:0]    deadtime,
  input  logic          duty_load,
  input  s16_t          duty_a,
  input  s16_t          duty_b,
  input  s16_t          duty_c,
  output s16_t          applied_a,
  output s16_t          applied_b,
  output s16_t          applied_c,
  output logic          period_start,
  output logic [CW-1:0] tcnt,
  output logic [5:0]    pwm
);
  s16_t shadow [3];
  s16_t active [3];
  s16_t applied [3];
  logic [CW-1:0] cmp [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        shadow[i]  <= '0;
        active[i]  <= '0;
        applied[i] <= '0;
      end
    end else begin
      if (duty_load) begin
        shadow[0] <= duty_a;
        shadow[1] <= duty_b;
        shadow[2] <= duty_c;
      end
      if (period_start) begin
        for (int i = 0; i < 3; i++) begin
          applied[i] <= active[i];
          active[i]  <= shadow[i];
        end
      end
    end
  end

  assign applied_a = applied[0];
  assign applied_b = applied[1];
  assign applied_c = applied[2];

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      logic signed [17:0] v;
      v = 18'(active[i]) + 18'(signed'({1'b0, pwm_period[CW-1:1]}));
      if (v < 0)                                 cmp[i] = '0;
      else if (v > 18'(signed'({1'b0, pwm_period}))) cmp[i] = pwm_period;
      else                                       cmp[i] = v[CW-1:0];
    end
  end

  logic [2:0] up, lo;

  pwm_generator #(.CW(CW)) u_pwm (
    .clk, .rst_n, .servo, .pwm_mode, .pwm_period,
    .cmp_a(cmp[0]), .cmp_b(cmp[1]), .cmp_c(cmp[2]),
    .tcnt, .period_start, .upper(up), .lower(lo)
  );

  for (genvar g = 0; g < 3; g++) begin : g_leg
    deadtime_gen u_dt_hi (.clk, .rst_n, .pwm_in(up[g]), .deadtime, .pwm_out(pwm[2*g]));
    deadtime_gen u_dt_lo (.clk, .rst_n, .pwm_in(lo[g]), .deadtime, .pwm_out(pwm[2*g+1]));
  end
endmodule
