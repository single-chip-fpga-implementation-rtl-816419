// adc_serial_if: serial interface to a 12-bit, 8-channel serial A/D converter
// of the ADS7844 kind (pins ADC_CLK, ADC_CS, ADC_DIN, ADC_DOUT).
//
// A request converts one channel in a 24-clock frame with ADC_CS low:
// during ADC_CLK periods 0..7 the control byte {S=1, A2..A0 = channel,
// MODE=0 (12 bit), SGL/DIF=1 (single ended), PD1..PD0=00} is shifted out on
// ADC_DIN, MSB first, changing while ADC_CLK is low; the converter then
// presents result bits D11..D0 on ADC_DOUT while ADC_CLK is low in periods
// 9..20, and they are sampled as ADC_CLK rises. ADC_CLK runs at
// clk / (2*CLK_DIV): 2 MHz from 40 MHz. valid pulses with data one cycle
// after ADC_CS returns high, about 24*2*CLK_DIV + CLK_DIV cycles after req.
// A request while busy is ignored. The document names the converter and the
// four pins only; the frame and the channel encoding are this design's choice.
module adc_serial_if #(
  parameter int unsigned CLK_DIV = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [2:0]  ch,
  output logic        adc_clk,
  output logic        adc_cs_n,
  output logic        adc_din,
  input  logic        adc_dout,
  output logic [11:0] data,
  output logic        valid,
  output logic        busy
);
  typedef enum logic [1:0] {IDLE, XFER, TAIL} state_e;
  state_e state;

  logic [$clog2(CLK_DIV+1)-1:0] div;
  logic [4:0]  bitn;      // ADC_CLK period 0..23
  logic [7:0]  ctrl;
  logic [11:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; div <= '0; bitn <= '0; ctrl <= '0; shreg <= '0;
      adc_clk <= 1'b0; adc_cs_n <= 1'b1; adc_din <= 1'b0;
      data <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      case (state)
        IDLE: begin
          adc_clk  <= 1'b0;
          adc_cs_n <= 1'b1;
          if (req) begin
            ctrl     <= {1'b1, ch, 1'b0, 1'b1, 2'b00};
            adc_cs_n <= 1'b0;
            adc_din  <= 1'b1;          // start bit, period 0
            bitn     <= '0;
            div      <= '0;
            state    <= XFER;
          end
        end
        XFER: begin
          if (div == ($bits(div))'(CLK_DIV - 1)) begin
            div <= '0;
            if (!adc_clk) begin
              adc_clk <= 1'b1;         // rising edge: sample DOUT
              if (bitn >= 5'd9 && bitn <= 5'd20) shreg <= {shreg[10:0], adc_dout};
            end else begin
              adc_clk <= 1'b0;         // falling edge: next period
              if (bitn == 5'd23) begin
                adc_cs_n <= 1'b1;
                adc_din  <= 1'b0;
                state    <= TAIL;
              end else begin
                bitn    <= bitn + 1'b1;
                adc_din <= (bitn < 5'd7) ? ctrl[3'(5'd6 - bitn)] : 1'b0;
              end
            end
          end else begin
            div <= div + 1'b1;
          end
        end
        TAIL: begin
          if (div == ($bits(div))'(CLK_DIV - 1)) begin
            div   <= '0;
            data  <= shreg;
            valid <= 1'b1;
            state <= IDLE;
          end else begin
            div <= div + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
