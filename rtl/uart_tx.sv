// uart_tx: 8N1 asynchronous serial transmitter, LSB first, BAUD_DIV clock
// cycles per bit. start loads a byte when the transmitter is not busy; the
// line idles high.
module uart_tx #(
  parameter int unsigned BAUD_DIV = 347
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);
  logic [15:0] cnt;
  logic [3:0]  bitn;
  logic [9:0]  frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; bitn <= '0; frame <= '1; busy <= 1'b0; txd <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        cnt   <= '0;
        bitn  <= '0;
        txd   <= 1'b0;
      end
    end else if (cnt == 16'(BAUD_DIV - 1)) begin
      cnt <= '0;
      if (bitn == 4'd9) begin
        busy <= 1'b0;
        txd  <= 1'b1;
      end else begin
        bitn <= bitn + 1'b1;
        txd  <= frame[bitn + 1'b1];
      end
    end else begin
      cnt <= cnt + 1'b1;
      txd <= frame[bitn];
    end
  end
endmodule
