// bemf_generator: normalized back-EMF function generator.
//
// Looks up ea = sin(theta), eb = sin(theta - 120 deg), ec = sin(theta + 120 deg)
// in a 500-point sine table in Q9 (entry n = round(512*sin(2*pi*n/500)),
// loaded from rtl/sine_q9.hex). An electrical turn is 8000 counts, so the
// table index is the angle divided by 16; 120 degrees is taken as 2667 counts.
// The table has one registered read port and the three values are read in
// turn: done pulses five cycles after start (theta must be held meanwhile) with ea, eb, ec updated together.
// The table size and format follow the document; the sequential single-port
// read and the phase-shift rounding are this design's choices.
module bemf_generator
  import pmsm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [THETA_W-1:0] theta,
  output s16_t               ea,
  output s16_t               eb,
  output s16_t               ec,
  output logic               done
);
  s16_t sine_rom [SINE_POINTS];
  initial $readmemh("rtl/sine_q9.hex", sine_rom);

  logic [THETA_W-1:0] th_b, th_c, th_sel;
  logic [8:0]         idx;
  s16_t               rd, ea_r, eb_r;
  logic [2:0]         step;   // one-hot read sequence

  // phase-shifted angles, wrapped into 0..7999
  always_comb begin
    th_b = (theta >= THETA_W'(THETA_120)) ? theta - THETA_W'(THETA_120)
                                          : theta + THETA_W'(THETA_COUNTS - THETA_120);
    th_c = (theta >= THETA_W'(THETA_COUNTS - THETA_120)) ? theta - THETA_W'(THETA_COUNTS - THETA_120)
                                                         : theta + THETA_W'(THETA_120);
    case (1'b1)
      step[1]: th_sel = th_b;
      step[2]: th_sel = th_c;
      default: th_sel = theta;
    endcase
    idx = 9'(th_sel >> 4);
  end

  always_ff @(posedge clk) begin
    rd <= sine_rom[idx];
  end

  logic [2:0] got;   // read data valid for a, b, c in the cycle after each read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0; got <= '0;
      ea <= '0; eb <= '0; ec <= '0; ea_r <= '0; eb_r <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      step <= {step[1:0], start};
      got  <= step;
      if (got[0]) ea_r <= rd;
      if (got[1]) eb_r <= rd;
      if (got[2]) begin
        ea   <= ea_r;
        eb   <= eb_r;
        ec   <= rd;
        done <= 1'b1;
      end
    end
  end
endmodule
