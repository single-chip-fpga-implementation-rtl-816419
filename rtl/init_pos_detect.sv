// init_pos_detect: initial rotor position detection at standstill.
//
// Twelve test voltage vectors, 30 electrical degrees apart, are applied one
// after another, one per interval of INTERVAL clock cycles (1 ms at 40 MHz).
// CNT1 times the interval and CNT2 counts the vectors. A vector is applied
// from the start of its interval while CNT1 < V1_time (vectors 1, 3, ..., 11,
// which drive all three phases) or CNT1 < V2_time (vectors 2, 4, ..., 12,
// which leave one phase open); CNT2[0] selects between the two times. When the
// vector ends (CNT1 reaches its on-time) adc_req asks for one DC-link current
// sample. Magnetic saturation makes the current peak largest for the vector
// aligned with the rotor magnet, so the block keeps the largest sample and the
// CNT2 value it came with; init_pos (0..11 for vectors 1..12) is valid when
// done pulses, after the twelfth interval (about 12 ms in all).
// pwm[5:0] are the gates S1..S6 (upper/lower of phases a, b, c), registered.
// The vector patterns are those of the twelve-vector diagram; interval
// length, CNT1/CNT2 and V1/V2_time follow the document. Sampling exactly at
// the vector's end through a request/valid pair to the A/D interface is this
// design's reading of the ADC_CS timing; the detection circuit diagram also
// has a compare at 50 cycles before the interval end, which is not used here.
module init_pos_detect #(
  parameter int unsigned INTERVAL = 40000,
  parameter int unsigned NVEC     = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] v1_time,
  input  logic [15:0] v2_time,
  input  logic [11:0] idc,
  input  logic        idc_valid,
  output logic [5:0]  pwm,
  output logic        active,
  output logic        adc_req,
  output logic        done,
  output logic [3:0]  init_pos,
  output logic [11:0] peak
);
  // Gate patterns {S6,S5,S4,S3,S2,S1} of vectors 1..12
  // (phase at Vdc: upper switch on, at 0 V: lower switch on, open: both off).
  localparam logic [5:0] PATTERN [12] = '{
    6'h16, 6'h06, 6'h26, 6'h24, 6'h25, 6'h21,
    6'h29, 6'h09, 6'h19, 6'h18, 6'h1A, 6'h12
  };

  logic [15:0] cnt1;
  logic [3:0]  cnt2;
  logic [15:0] vtime;

  assign vtime = cnt2[0] ? v2_time : v1_time;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt1 <= '0; cnt2 <= '0; active <= 1'b0;
      pwm <= '0; adc_req <= 1'b0; done <= 1'b0;
      init_pos <= '0; peak <= '0;
    end else begin
      adc_req <= 1'b0;
      done    <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        cnt1 <= '0; cnt2 <= '0;
        peak <= '0; init_pos <= '0;
      end else if (active) begin
        pwm <= (cnt1 < vtime) ? PATTERN[cnt2] : 6'h00;
        if (cnt1 == vtime) adc_req <= 1'b1;
        if (idc_valid && idc > peak) begin
          peak     <= idc;
          init_pos <= cnt2;
        end
        if (cnt1 == 16'(INTERVAL - 1)) begin
          cnt1 <= '0;
          if (cnt2 == 4'(NVEC - 1)) begin
            active <= 1'b0;
            done   <= 1'b1;
            pwm    <= '0;
          end else begin
            cnt2 <= cnt2 + 1'b1;
          end
        end else begin
          cnt1 <= cnt1 + 1'b1;
        end
      end else begin
        pwm <= '0;
      end
    end
  end
endmodule
