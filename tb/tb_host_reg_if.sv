// tb_host_reg_if: a serial host model (8N1, BAUD_DIV = 16) checks the reset
// values read back, writes random values to every configuration register and
// reads them back, checks the cfg struct fields, the read-only status
// registers, the line idles high, and that an unmapped address reads zero.
module tb_host_reg_if;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BD = 16;

  logic rxd, txd;
  logic [15:0] theta_rd, speed_rd, status_rd;
  cfg_t cfg;

  host_reg_if #(.BAUD_DIV(BD)) dut (.clk, .rst_n, .rxd, .txd, .theta_rd, .speed_rd, .status_rd, .cfg);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(input logic [7:0] b);
    rxd = 0; repeat (BD) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BD) @(posedge clk); end
    rxd = 1; repeat (BD) @(posedge clk);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    int guard = 0;
    while (txd && guard < 100 * BD) begin @(posedge clk); guard++; end
    repeat (BD + BD / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = txd; repeat (BD) @(posedge clk); end
    check(txd == 1'b1, "stop bit");
  endtask

  task automatic wr(input logic [6:0] a, input logic [15:0] d);
    send_byte({1'b0, a}); send_byte(d[15:8]); send_byte(d[7:0]);
    repeat (4) @(posedge clk);
  endtask

  task automatic rd(input logic [6:0] a, output logic [15:0] d);
    logic [7:0] h, l;
    fork
      send_byte({1'b1, a});
      begin recv_byte(h); recv_byte(l); end
    join
    d = {h, l};
  endtask

  logic [15:0] shadow [NUM_CFG_REGS];
  logic [15:0] d;
  initial begin
    rxd = 1; theta_rd = 16'd4321; speed_rd = 16'hFF38; status_rd = 16'h00A3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(txd == 1'b1, "idle high");
    rd(7'(REG_EST_B), d);  check(d == 16'd193, "reset B");
    rd(7'(REG_EST_A), d);  check(d == 16'd100, "reset A");
    rd(7'(REG_PWM_PER), d); check(d == 16'd1000, "reset period");
    for (int a = 0; a < NUM_CFG_REGS; a++) begin
      shadow[a] = 16'($urandom);
      wr(7'(a), shadow[a]);
    end
    for (int a = 0; a < NUM_CFG_REGS; a++) begin
      rd(7'(a), d);
      check(d == shadow[a], $sformatf("reg %0d = %h exp %h", a, d, shadow[a]));
    end
    check(cfg.run == shadow[REG_CTRL][0] && cfg.pwm_mode == shadow[REG_CTRL][1], "cfg ctrl");
    check(cfg.pwm_period == shadow[REG_PWM_PER][11:0], "cfg period");
    check(cfg.deadtime == shadow[REG_DEADTIME][6:0], "cfg deadtime");
    check(cfg.est_c == shadow[REG_EST_C], "cfg C");
    check(cfg.ol_switch == shadow[REG_OL_SWITCH], "cfg ol_switch");
    check(cfg.v2_time == shadow[REG_V2_TIME], "cfg v2");
    rd(7'(REG_THETA), d);  check(d == 16'd4321, "theta read");
    rd(7'(REG_SPEED), d);  check(d == 16'hFF38, "speed read");
    rd(7'(REG_STATUS), d); check(d == 16'h00A3, "status read");
    rd(7'h7F, d);          check(d == 16'h0000, "unmapped");
    wr(7'h7F, 16'hBEEF);
    rd(7'(REG_EST_A), d);  check(d == shadow[REG_EST_A], "unmapped write harmless");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
