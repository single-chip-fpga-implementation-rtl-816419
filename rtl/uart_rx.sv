// uart_rx: 8N1 asynchronous serial receiver, LSB first. The line is
// synchronised with two flip-flops; a falling edge starts a frame, every bit
// is sampled in its middle (BAUD_DIV clock cycles per bit), and valid pulses
// for one cycle with the byte once the stop bit has been sampled high
// (a low stop bit drops the byte).
module uart_rx #(
  parameter int unsigned BAUD_DIV = 347
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  logic [1:0]  sync;
  logic        busy;
  logic [15:0] cnt;
  logic [3:0]  bitn;
  logic [7:0]  sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11; busy <= 1'b0; cnt <= '0; bitn <= '0; sh <= '0;
      data <= '0; valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      if (!busy) begin
        if (!sync[1]) begin
          busy <= 1'b1;
          cnt  <= 16'(BAUD_DIV / 2);
          bitn <= '0;
        end
      end else if (cnt == 16'(BAUD_DIV - 1)) begin
        cnt <= '0;
        if (bitn == 4'd0) begin
          if (sync[1]) busy <= 1'b0;     // false start
          else         bitn <= 4'd1;
        end else if (bitn <= 4'd8) begin
          sh   <= {sync[1], sh[7:1]};
          bitn <= bitn + 1'b1;
        end else begin
          busy <= 1'b0;
          if (sync[1]) begin
            data  <= sh;
            valid <= 1'b1;
          end
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
