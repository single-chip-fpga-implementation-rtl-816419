// deadtime_gen: delays the rising edge of one gate signal by `deadtime`
// clock cycles and passes the falling edge at once, so that the two switches
// of an inverter leg are never on together.
//
// A 7-bit counter is cleared while PWM_in is low and counts while it is high,
// saturating at the programmed deadtime; the output is PWM_in gated by
// (count >= deadtime). This is the counter / register / Less_Than / output
// multiplexer structure of the described deadtime circuit. With a 40 MHz clock
// the 7-bit range gives 0 .. 3.175 us. The output is combinational from
// PWM_in and the registered count.
module deadtime_gen #(
  parameter int unsigned DW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pwm_in,
  input  logic [DW-1:0] deadtime,
  output logic          pwm_out
);
  logic [DW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             cnt <= '0;
    else if (!pwm_in)       cnt <= '0;
    else if (cnt < deadtime) cnt <= cnt + 1'b1;
  end

  assign pwm_out = pwm_in && !(cnt < deadtime);
endmodule
