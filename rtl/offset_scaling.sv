// offset_scaling: turns the raw 12-bit A/D results of the phase currents into
// signed currents. For phases a and b: i = ((raw - offset) * gain) >>> 8,
// with gain in Q8 and the offsets programmable (the sensor's zero-current
// code, 2048 for a mid-scale sensor). Because the motor is star connected,
// ic = -(ia + ib). Each output register loads when its raw value is valid
// (ic with ib, which the sampling sequence converts last).
// The document only names this block; the formula is this design's choice.
module offset_scaling
  import pmsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] raw,
  input  logic        valid_a,
  input  logic        valid_b,
  input  logic [11:0] offs_a,
  input  logic [11:0] offs_b,
  input  s16_t        gain,
  output s16_t        ia,
  output s16_t        ib,
  output s16_t        ic
);
  logic signed [12:0] centred;
  logic signed [31:0] scaled;
  s16_t               ival;

  always_comb begin
    centred = 13'(signed'({1'b0, raw})) - 13'(signed'({1'b0, valid_b ? offs_b : offs_a}));
    scaled  = (32'(centred) * 32'(gain)) >>> 8;
    ival    = 16'(limit32(scaled, 16'sh7fff));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ia <= '0; ib <= '0; ic <= '0;
    end else begin
      if (valid_a) ia <= ival;
      if (valid_b) begin
        ib <= ival;
        ic <= -(ia + ival);
      end
    end
  end
endmodule
