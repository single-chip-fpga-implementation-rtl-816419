// control_sequencer: timing of one sampling period of the control loops.
//
// Every PWM period start (20 kHz) it runs, one after another:
//   convert ia (A/D channel CH_IA), convert ib (CH_IB), let the
//   offset/scaling stage register them, run the position estimator,
//   look up the back-EMF functions for the new position, and - on every
//   CUR_PER_SPD-th period (2 kHz speed loop) - sample the speed, step the
//   speed command and run the speed PI; then run the current controller and
//   hand the new duties to the PWM modulator, which applies them at the next
//   period start. Each step is started with a one-cycle pulse and waits for
//   the block's done/valid pulse. The sequence runs while `enable` is high
//   (open or closed loop); the speed PI step only while `spd_enable` is
//   high; spd_tick (speed sampling) pulses once per speed period in both
//   loops. cur_tick pulses once per executed period. A period start that arrives while a sequence is still running is
//   skipped and counted in `overruns`.
// The loop rates follow the document; the step order and handshakes are this
// design's choice.
module control_sequencer #(
  parameter int unsigned CUR_PER_SPD = 10,
  parameter logic [2:0]  CH_IA       = 3'd0,
  parameter logic [2:0]  CH_IB       = 3'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        spd_enable,
  input  logic        period_start,
  input  logic        adc_valid,
  input  logic        est_done,
  input  logic        bemf_done,
  input  logic        spd_done,
  input  logic        cc_done,
  output logic        adc_req,
  output logic [2:0]  adc_ch,
  output logic        valid_a,
  output logic        valid_b,
  output logic        est_start,
  output logic        bemf_start,
  output logic        cur_tick,
  output logic        spd_tick,
  output logic        spd_start,
  output logic        cc_start,
  output logic        duty_load,
  output logic [15:0] overruns
);
  typedef enum logic [3:0] {IDLE, CONV_A, CONV_B, SCALE, EST, BEMF, SPD_SMP,
                            SPD, CC, LOAD} state_e;
  state_e state;
  logic [$clog2(CUR_PER_SPD+1)-1:0] pcnt;
  logic spd_slot;
  logic waiting;   // a step has been started and its done pulse is awaited

  assign valid_a = (state == CONV_A) && waiting && adc_valid;
  assign valid_b = (state == CONV_B) && waiting && adc_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; pcnt <= '0; spd_slot <= 1'b0; waiting <= 1'b0;
      adc_req <= 1'b0; adc_ch <= CH_IA; est_start <= 1'b0; bemf_start <= 1'b0;
      cur_tick <= 1'b0; spd_tick <= 1'b0; spd_start <= 1'b0; cc_start <= 1'b0;
      duty_load <= 1'b0; overruns <= '0;
    end else begin
      {adc_req, est_start, bemf_start, cur_tick, spd_tick, spd_start, cc_start, duty_load} <= '0;
      if (!enable) begin
        state   <= IDLE;
        waiting <= 1'b0;
        pcnt    <= '0;
      end else begin
        if (period_start && state != IDLE) overruns <= overruns + 1'b1;
        case (state)
          IDLE: if (period_start) begin
            spd_slot <= (pcnt == '0);
            pcnt     <= (pcnt == ($bits(pcnt))'(CUR_PER_SPD - 1)) ? '0 : pcnt + 1'b1;
            state    <= CONV_A;
          end
          CONV_A: if (!waiting) begin
            adc_req <= 1'b1; adc_ch <= CH_IA; waiting <= 1'b1;
          end else if (adc_valid) begin
            waiting <= 1'b0; state <= CONV_B;
          end
          CONV_B: if (!waiting) begin
            adc_req <= 1'b1; adc_ch <= CH_IB; waiting <= 1'b1;
          end else if (adc_valid) begin
            waiting <= 1'b0; state <= SCALE;
          end
          SCALE: state <= EST;
          EST: if (!waiting) begin
            est_start <= 1'b1; cur_tick <= 1'b1; waiting <= 1'b1;
          end else if (est_done) begin
            waiting <= 1'b0; state <= BEMF;
          end
          BEMF: if (!waiting) begin
            bemf_start <= 1'b1; waiting <= 1'b1;
          end else if (bemf_done) begin
            waiting <= 1'b0; state <= spd_slot ? SPD_SMP : CC;
          end
          SPD_SMP: begin
            spd_tick <= 1'b1; state <= spd_enable ? SPD : CC;
          end
          SPD: if (!waiting) begin
            spd_start <= 1'b1; waiting <= 1'b1;
          end else if (spd_done) begin
            waiting <= 1'b0; state <= CC;
          end
          CC: if (!waiting) begin
            cc_start <= 1'b1; waiting <= 1'b1;
          end else if (cc_done) begin
            waiting <= 1'b0; state <= LOAD;
          end
          LOAD: begin
            duty_load <= 1'b1; state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
