// speed_calc: the d/dt block. Differentiates the estimated electrical
// position: on every sample pulse (the speed-loop rate) the speed is the
// position change since the previous sample, wrapped into -4000..+3999 counts
// so that crossing the 7999 -> 0 boundary is handled. The unit is therefore
// angle counts per speed period (2.5 rpm per count for 6 pole pairs at 2 kHz).
// The speed register updates in the cycle after the sample pulse. init
// re-references the previous position to the present one and clears the speed.
// The document only names the differentiator; the wrap-around difference is
// this design's choice.
module speed_calc
  import pmsm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample,
  input  logic               init,
  input  logic [THETA_W-1:0] theta,
  output s16_t               speed
);
  logic [THETA_W-1:0] prev;
  logic signed [15:0] diff;

  always_comb begin
    diff = 16'(signed'({3'b000, theta})) - 16'(signed'({3'b000, prev}));
    if (diff >= 16'sd4000)       diff = diff - 16'sd8000;
    else if (diff < -16'sd4000)  diff = diff + 16'sd8000;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= '0;
      speed <= '0;
    end else if (init) begin
      prev  <= theta;
      speed <= '0;
    end else if (sample) begin
      prev  <= theta;
      speed <= diff;
    end
  end
endmodule
