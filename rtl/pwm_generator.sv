// pwm_generator: 12-bit three-phase complementary PWM core.
//
// A timer counter TCNT counts 0..pwm_period. In asymmetric mode (pwm_mode=0)
// it counts up and wraps to 0 (sawtooth); in symmetric mode (pwm_mode=1) it
// counts up to pwm_period and back down to 0 (triangle). Each phase compares
// TCNT with its compare register: the upper output is high while TCNT < D,
// the lower output is its complement. When servo is low both outputs of every
// leg are forced low. This follows the counter / Less_Than / two-multiplexer
// structure of the described PWM circuit; the comparison is combinational
// from registered TCNT and compare values.
// period_start pulses for one cycle when TCNT is 0 (start of a PWM period, the
// sampling instant of the control loops).
module pwm_generator #(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          servo,
  input  logic          pwm_mode,
  input  logic [CW-1:0] pwm_period,
  input  logic [CW-1:0] cmp_a,
  input  logic [CW-1:0] cmp_b,
  input  logic [CW-1:0] cmp_c,
  output logic [CW-1:0] tcnt,
  output logic          period_start,
  output logic [2:0]    upper,
  output logic [2:0]    lower
);
  logic down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0;
      down <= 1'b0;
    end else if (!pwm_mode) begin
      down <= 1'b0;
      tcnt <= (tcnt >= pwm_period) ? '0 : tcnt + 1'b1;
    end else if (!down) begin
      if (tcnt >= pwm_period) begin
        down <= 1'b1;
        tcnt <= (pwm_period == '0) ? '0 : tcnt - 1'b1;
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end else begin
      if (tcnt == '0 || tcnt == CW'(1)) begin
        down <= 1'b0;
        tcnt <= '0;
      end else begin
        tcnt <= tcnt - 1'b1;
      end
    end
  end

  assign period_start = (tcnt == '0);

  logic [2:0] lt;
  assign lt = {tcnt < cmp_c, tcnt < cmp_b, tcnt < cmp_a};

  always_comb begin
    upper = servo ? lt  : 3'b000;
    lower = servo ? ~lt : 3'b000;
  end
endmodule
