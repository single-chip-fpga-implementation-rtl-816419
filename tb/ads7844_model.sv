// ads7844_model: behavioural model of a 12-bit, 8-channel serial A/D
// converter of the ADS7844 kind, for simulation only (not synthesizable
// intent). After ADC_CS falls it shifts in the control byte on the first
// eight rising edges of DCLK, takes the channel from bits A2..A0, and drives
// result bits D11..D0 on DOUT during the low half of DCLK periods 9..20
// (changing on falling edges); DOUT is 0 otherwise. The converted value of
// each channel is taken from the `value` inputs. last_ctrl shows the last
// control byte received.
module ads7844_model (
  input  logic        dclk,
  input  logic        cs_n,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] value [8],
  output logic [7:0]  last_ctrl,
  output int          frames
);
  int          cnt;
  logic [7:0]  ctrl;
  logic [11:0] sample;

  initial begin
    dout = 1'b0; cnt = 0; ctrl = '0; sample = '0; last_ctrl = '0; frames = 0;
  end

  always @(negedge cs_n) begin
    cnt = 0;
    dout = 1'b0;
  end

  always @(posedge dclk) begin
    if (!cs_n) begin
      if (cnt < 8) ctrl = {ctrl[6:0], din};
      cnt = cnt + 1;
      if (cnt == 8) begin
        last_ctrl = ctrl;
        sample = value[{ctrl[6], ctrl[5], ctrl[4]}];
        frames = frames + 1;
      end
    end
  end

  always @(negedge dclk) begin
    if (!cs_n && cnt >= 9 && cnt <= 20) dout = sample[11 - (cnt - 9)];
    else dout = 1'b0;
  end
endmodule
