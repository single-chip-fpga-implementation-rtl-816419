// speed_controller: 16-bit digital PI speed regulator
//   e[k] = w*[k] - w^[k]
//   I[k] = Lim( Ki*e[k] + I[k-1] )      (anti-windup limit on the integrator)
//   u[k] = Lim( Kp*e[k] + I[k] )        (output limit = maximum torque command)
// Kp and Ki are Q10. A small state machine shares one multiplier and one
// adder across the steps, as the document's scheduling strategy prescribes:
//   S0: e = w* - w^            (adder, result saturated to 16 bits)
//   S1: m = Ki*e               (multiplier)
//   S2: I = Lim(I + m>>10)     (adder)   and  m = Kp*e  (multiplier)
//   S3: s = (m>>10) + I        (adder)
//   S4: u = Lim(s), done
// done pulses in the cycle u is valid, six cycles after start. Using the one
// SLim value for both limiters, the step order and `preset` (loads the
// integrator, used for a bumpless hand-over from open-loop start-up) are this
// design's choices.
module speed_controller
  import pmsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  s16_t w_ref,
  input  s16_t w_fb,
  input  s16_t kp,
  input  s16_t ki,
  input  s16_t lim,
  input  logic preset,
  input  s16_t preset_val,
  output s16_t u,
  output logic done,
  output logic busy
);
  typedef enum logic [2:0] {IDLE, S0, S1, S2, S3, S4} state_e;
  state_e state;

  s16_t               err;
  logic signed [31:0] integ, mreg, sum;

  // shared arithmetic units
  logic signed [15:0] mul_x, mul_y;
  logic signed [31:0] mul_p;
  logic signed [31:0] add_x, add_y, add_s;
  assign mul_p = mul_x * mul_y;
  assign add_s = add_x + add_y;

  always_comb begin
    mul_x = err;
    mul_y = ki;
    add_x = 32'(w_ref);
    add_y = -32'(w_fb);
    case (state)
      S1:      begin mul_y = ki; end
      S2:      begin mul_y = kp; add_x = integ; add_y = mreg >>> 10; end
      S3:      begin add_x = mreg >>> 10; add_y = integ; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      err   <= '0;
      integ <= '0;
      mreg  <= '0;
      sum   <= '0;
      u     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) state <= S0;
        S0: begin
          err   <= 16'(limit32(add_s, 16'sh7fff));
          state <= S1;
        end
        S1: begin
          mreg  <= mul_p;
          state <= S2;
        end
        S2: begin
          integ <= limit32(add_s, lim);
          mreg  <= mul_p;
          state <= S3;
        end
        S3: begin
          sum   <= add_s;
          state <= S4;
        end
        S4: begin
          u     <= 16'(limit32(sum, lim));
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (preset) integ <= 32'(preset_val);
    end
  end

  assign busy = (state != IDLE);
endmodule
