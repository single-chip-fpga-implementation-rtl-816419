// tb_speed_calc: feeds positions advancing by random signed steps (both
// directions, across the 7999 -> 0 wrap) and checks that each sample gives
// exactly the step taken since the previous sample, and that init clears.
module tb_speed_calc;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sample, init;
  logic [12:0] theta;
  s16_t speed;

  speed_calc dut (.clk, .rst_n, .sample, .init, .theta, .speed);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int th, step, wraps;
  initial begin
    sample = 0; init = 0; theta = 13'd7000; th = 7000; wraps = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    init = 1; @(negedge clk); init = 0;
    check(speed == 0, "init clears");
    for (int n = 0; n < 500; n++) begin
      step = $signed($urandom_range(0, 7000)) - 3500;
      if (th + step >= 8000 || th + step < 0) wraps++;
      th = ((th + step) % 8000 + 8000) % 8000;
      theta = 13'(th);
      @(negedge clk); sample = 1; @(negedge clk); sample = 0;
      check(int'(speed) == step, $sformatf("speed %0d exp %0d", speed, step));
      // position moves between samples without a sample: speed must hold
      theta = 13'($urandom_range(0, 7999)); @(negedge clk);
      check(int'(speed) == step, "holds between samples");
      theta = 13'(th); @(negedge clk);
    end
    check(wraps > 20, "wraps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
