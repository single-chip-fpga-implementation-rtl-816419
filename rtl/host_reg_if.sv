// host_reg_if: host register interface. A host computer sets up every
// block's registers over a serial line (8N1, BAUD_DIV clocks per bit,
// 115200 baud at 40 MHz by default).
//
// Protocol: the first byte of a command is {rw, addr[6:0]}. rw = 0 is a
// write and is followed by the data high byte and low byte; the register is
// written when the low byte arrives. rw = 1 is a read and the interface
// answers with the high and then the low byte. Addresses 0x00..0x19 are the
// configuration registers (map and reset values in pmsm_pkg); 0x20..0x22
// return the estimated position, the estimated speed and the status word;
// other addresses read as zero. cfg presents all configuration registers as
// one struct. The document gives the function only; the protocol, the map
// and the reset values are this design's choice.
module host_reg_if
  import pmsm_pkg::*;
#(
  parameter int unsigned BAUD_DIV = 347
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic        txd,
  input  logic [15:0] theta_rd,
  input  logic [15:0] speed_rd,
  input  logic [15:0] status_rd,
  output cfg_t        cfg
);
  function automatic logic [15:0] reset_value(input logic [6:0] a);
    case (a)
      REG_CTRL:      return 16'h0002;
      REG_PWM_PER:   return 16'd1000;
      REG_DEADTIME:  return 16'd40;
      REG_SPD_TGT:   return 16'd800;
      REG_SHIGH:     return 16'd2800;
      REG_SLOW:      return 16'd200;
      REG_ACCEL:     return 16'd8;
      REG_DECEL:     return 16'd8;
      REG_SKP:       return 16'd2048;
      REG_SKI:       return 16'd64;
      REG_SLIM:      return 16'd1500;
      REG_CKP:       return 16'd1024;
      REG_CKI:       return 16'd128;
      REG_CLIM:      return 16'd480;
      REG_EST_A:     return 16'd100;
      REG_EST_B:     return 16'd193;
      REG_EST_C:     return 16'd53;
      REG_EST_ALPHA: return 16'd105;
      REG_V1_TIME:   return 16'd8000;
      REG_V2_TIME:   return 16'd8000;
      REG_OFFS_A:    return 16'd2048;
      REG_OFFS_B:    return 16'd2048;
      REG_ISCALE:    return 16'd256;
      REG_OL_ISTART: return 16'd300;
      REG_OL_ACCEL:  return 16'd10;
      REG_OL_SWITCH: return 16'd200;
      default:       return 16'h0000;
    endcase
  endfunction

  logic [15:0] regs [NUM_CFG_REGS];

  logic [7:0] rx_data;
  logic       rx_valid;
  logic       tx_start, tx_busy;
  logic [7:0] tx_data;

  uart_rx #(.BAUD_DIV(BAUD_DIV)) u_rx (.clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid));
  uart_tx #(.BAUD_DIV(BAUD_DIV)) u_tx (.clk, .rst_n, .start(tx_start), .data(tx_data),
                                       .txd, .busy(tx_busy));

  typedef enum logic [2:0] {CMD, WR_HI, WR_LO, RD_HI, RD_WAIT, RD_LO} state_e;
  state_e      state;
  logic [6:0]  addr;
  logic [7:0]  hi;
  logic [15:0] rdata;

  always_comb begin
    rdata = 16'h0000;
    if (32'(addr) < NUM_CFG_REGS) rdata = regs[5'(addr)];
    else if (addr == REG_THETA)   rdata = theta_rd;
    else if (addr == REG_SPEED)   rdata = speed_rd;
    else if (addr == REG_STATUS)  rdata = status_rd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CFG_REGS; i++) regs[i] <= reset_value(7'(i));
      state <= CMD; addr <= '0; hi <= '0; tx_start <= 1'b0; tx_data <= '0;
    end else begin
      tx_start <= 1'b0;
      case (state)
        CMD: if (rx_valid) begin
          addr  <= rx_data[6:0];
          state <= rx_data[7] ? RD_HI : WR_HI;
        end
        WR_HI: if (rx_valid) begin
          hi    <= rx_data;
          state <= WR_LO;
        end
        WR_LO: if (rx_valid) begin
          if (32'(addr) < NUM_CFG_REGS) regs[5'(addr)] <= {hi, rx_data};
          state <= CMD;
        end
        RD_HI: if (!tx_busy) begin
          tx_data  <= rdata[15:8];
          tx_start <= 1'b1;
          state    <= RD_WAIT;
        end
        RD_WAIT: state <= RD_LO;     // let busy rise
        RD_LO: if (!tx_busy) begin
          tx_data  <= rdata[7:0];
          tx_start <= 1'b1;
          state    <= CMD;
        end
        default: state <= CMD;
      endcase
    end
  end

  always_comb begin
    cfg.run        = regs[5'(REG_CTRL)][0];
    cfg.pwm_mode   = regs[5'(REG_CTRL)][1];
    cfg.pwm_period = regs[5'(REG_PWM_PER)][11:0];
    cfg.deadtime   = regs[5'(REG_DEADTIME)][6:0];
    cfg.spd_target = regs[5'(REG_SPD_TGT)];
    cfg.shigh      = regs[5'(REG_SHIGH)];
    cfg.slow       = regs[5'(REG_SLOW)];
    cfg.accel      = regs[5'(REG_ACCEL)];
    cfg.decel      = regs[5'(REG_DECEL)];
    cfg.skp        = regs[5'(REG_SKP)];
    cfg.ski        = regs[5'(REG_SKI)];
    cfg.slim       = regs[5'(REG_SLIM)];
    cfg.ckp        = regs[5'(REG_CKP)];
    cfg.cki        = regs[5'(REG_CKI)];
    cfg.clim       = regs[5'(REG_CLIM)];
    cfg.est_a      = regs[5'(REG_EST_A)];
    cfg.est_b      = regs[5'(REG_EST_B)];
    cfg.est_c      = regs[5'(REG_EST_C)];
    cfg.est_alpha  = regs[5'(REG_EST_ALPHA)];
    cfg.v1_time    = regs[5'(REG_V1_TIME)];
    cfg.v2_time    = regs[5'(REG_V2_TIME)];
    cfg.offs_a     = regs[5'(REG_OFFS_A)][11:0];
    cfg.offs_b     = regs[5'(REG_OFFS_B)][11:0];
    cfg.iscale     = regs[5'(REG_ISCALE)];
    cfg.ol_istart  = regs[5'(REG_OL_ISTART)];
    cfg.ol_accel   = regs[5'(REG_OL_ACCEL)];
    cfg.ol_switch  = regs[5'(REG_OL_SWITCH)];
  end
endmodule
