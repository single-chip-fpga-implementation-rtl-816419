// startup_ctrl: start-up sequencer of the three phases of the start-up
// procedure: (1) initial position estimation, (2) open-loop acceleration,
// (3) sensorless closed-loop speed control.
//
// When run rises it starts the twelve-vector detection. When that is done
// the detected vector index n (0..11) gives the initial electrical angle
// n*8000/12 counts, which is loaded into the position estimator (est_init)
// and into the open-loop angle. In open loop the angle advances every current
// sample by an open-loop speed that rises by ol_accel (Q8 counts per sample)
// every speed-loop period, and the current controller is fed with the fixed
// current command ol_istart at that angle. When the open-loop speed reaches
// ol_switch (counts per speed period) the closed loop takes over: handover
// pulses so that the speed PI integrator and the speed command can be preset
// to the open-loop values. run low returns to idle from any phase.
// The three phases follow the document; the ramp law, the angle offset of the
// detected vector and the hand-over presets are this design's choices.
module startup_ctrl
  import pmsm_pkg::*;
#(
  parameter int unsigned CUR_PER_SPD = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               tick_cur,
  input  logic               tick_spd,
  input  logic               det_done,
  input  logic [3:0]         det_pos,
  input  logic [15:0]        ol_accel,
  input  s16_t               ol_switch,
  output mode_e              mode,
  output logic               det_start,
  output logic               est_init,
  output logic [THETA_W-1:0] theta_init,
  output logic [THETA_W-1:0] theta_ol,
  output s16_t               ol_speed,
  output logic               handover
);
  localparam logic [31:0] MOD8 = 32'(THETA_COUNTS) << 8;

  logic [31:0] theta_q8;   // open-loop angle, Q8 counts
  logic [31:0] omega_q8;   // open-loop speed, Q8 counts per current sample
  logic [31:0] nxt;
  logic [31:0] spd_full;

  always_comb begin
    theta_init = THETA_W'((32'(det_pos) * THETA_COUNTS + 32'd6) / 32'd12);
    nxt        = theta_q8 + omega_q8;
    if (nxt >= MOD8) nxt = nxt - MOD8;
    spd_full   = (omega_q8 * CUR_PER_SPD) >> 8;
    ol_speed   = (spd_full > 32'h7fff) ? 16'sh7fff : 16'(spd_full);
  end

  assign theta_ol = THETA_W'(theta_q8 >> 8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_IDLE;
      det_start <= 1'b0; est_init <= 1'b0; handover <= 1'b0;
      theta_q8 <= '0; omega_q8 <= '0;
    end else begin
      det_start <= 1'b0;
      est_init  <= 1'b0;
      handover  <= 1'b0;
      if (!run) begin
        mode <= MODE_IDLE;
      end else begin
        case (mode)
          MODE_IDLE: begin
            mode      <= MODE_DETECT;
            det_start <= 1'b1;
            omega_q8  <= '0;
          end
          MODE_DETECT: if (det_done) begin
            mode     <= MODE_OPEN;
            est_init <= 1'b1;
            theta_q8 <= 32'(theta_init) << 8;
            omega_q8 <= '0;
          end
          MODE_OPEN: begin
            if (tick_cur) theta_q8 <= nxt;
            if (tick_spd) omega_q8 <= omega_q8 + 32'(ol_accel);
            if (ol_speed >= ol_switch) begin
              mode     <= MODE_CLOSED;
              handover <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
