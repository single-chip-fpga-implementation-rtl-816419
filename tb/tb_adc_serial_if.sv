// tb_adc_serial_if: converts random channels of a converter model holding
// random values; checks the returned data, the control byte seen by the
// converter (start bit, channel, 12-bit single-ended mode), the A/D clock
// period of 2*CLK_DIV cycles, the frame latency, and that a request while busy
// is ignored.
module tb_adc_serial_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int CLK_DIV = 10;

  logic req, adc_clk, adc_cs_n, adc_din, adc_dout, valid, busy;
  logic [2:0] ch;
  logic [11:0] data;
  logic [11:0] value [8];
  logic [7:0] last_ctrl;
  int frames;

  adc_serial_if #(.CLK_DIV(CLK_DIV)) dut (.clk, .rst_n, .req, .ch, .adc_clk, .adc_cs_n,
    .adc_din, .adc_dout, .data, .valid, .busy);
  ads7844_model adc (.dclk(adc_clk), .cs_n(adc_cs_n), .din(adc_din), .dout(adc_dout),
    .value, .last_ctrl, .frames);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A/D clock period
  int last_rise = -1, cyc = 0, bad_period = 0, rises = 0;
  logic clk_d;
  always @(posedge clk) begin
    cyc++;
    clk_d <= adc_clk;
    if (adc_clk && !clk_d) begin
      if (last_rise >= 0 && !adc_cs_n && cyc - last_rise != 2 * CLK_DIV && rises != 0) bad_period++;
      last_rise = cyc; rises++;
    end
    if (adc_cs_n) rises = 0;
  end

  int lat, f0;
  initial begin
    req = 0; ch = 0;
    for (int i = 0; i < 8; i++) value[i] = 12'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      ch = 3'($urandom_range(0, 7));
      value[ch] = 12'($urandom);
      f0 = frames;
      @(negedge clk); req = 1; @(negedge clk); req = 0;
      lat = 1;
      repeat (30) @(negedge clk);
      req = 1; @(negedge clk); req = 0; lat += 31;   // ignored: busy
      while (!valid) begin @(negedge clk); lat++; end
      check(data == value[ch], $sformatf("ch %0d data %h exp %h", ch, data, value[ch]));
      check(last_ctrl == {1'b1, ch, 1'b0, 1'b1, 2'b00}, $sformatf("ctrl %b", last_ctrl));
      check(lat == 49 * CLK_DIV + 1, $sformatf("latency %0d", lat));
      check(frames == f0 + 1, "one frame per request");
      @(negedge clk);
      check(!busy, "idle after frame");
    end
    check(bad_period == 0, $sformatf("%0d bad A/D clock periods", bad_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
