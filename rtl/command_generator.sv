// command_generator: speed command ramp. On every speed-loop tick the
// command moves toward the target, clamped to [SLow, SHigh], by at most the
// acceleration step (when rising) or the deceleration step (when falling),
// and stops exactly on the target. preset loads the command directly (used
// when the closed loop takes over from open-loop start-up). The command
// updates in the cycle after the tick.
// The document names the block and its four settings (SHigh, SLow, Accel
// Rate, Decel Rate); the ramp law is this design's choice.
module command_generator
  import pmsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  s16_t        target,
  input  s16_t        shigh,
  input  s16_t        slow,
  input  logic [15:0] accel,
  input  logic [15:0] decel,
  input  logic        preset,
  input  s16_t        preset_val,
  output s16_t        cmd
);
  s16_t               tgt;
  logic signed [17:0] up, dn;

  always_comb begin
    tgt = target;
    if (tgt > shigh) tgt = shigh;
    if (tgt < slow)  tgt = slow;
    up = 18'(cmd) + 18'(signed'({1'b0, accel}));
    dn = 18'(cmd) - 18'(signed'({1'b0, decel}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd <= '0;
    end else if (preset) begin
      cmd <= preset_val;
    end else if (tick) begin
      if (cmd < tgt)      cmd <= (up > 18'(tgt)) ? tgt : 16'(up);
      else if (cmd > tgt) cmd <= (dn < 18'(tgt)) ? tgt : 16'(dn);
    end
  end
endmodule
