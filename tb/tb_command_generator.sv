// tb_command_generator: ramps the speed command up and down with random
// rates and targets and checks every tick against a reference ramp
// (clamped to SLow..SHigh, stops on the target), including a 500 -> 7000 rpm
// ramp at 40 rpm/ms (8 counts per 0.5 ms speed period), its duration in ticks,
// and the preset.
module tb_command_generator;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, preset;
  s16_t target, shigh, slow, preset_val, cmd;
  logic [15:0] accel, decel;

  command_generator dut (.clk, .rst_n, .tick, .target, .shigh, .slow, .accel, .decel,
                         .preset, .preset_val, .cmd);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r, tg, nt;
  task automatic do_tick();
    tick = 1; @(negedge clk); tick = 0;
    tg = int'(target);
    if (tg > int'(shigh)) tg = shigh;
    if (tg < int'(slow)) tg = slow;
    if (r < tg) r = (r + int'(accel) > tg) ? tg : r + int'(accel);
    else if (r > tg) r = (r - int'(decel) < tg) ? tg : r - int'(decel);
    check(int'(cmd) == r, $sformatf("cmd %0d exp %0d", cmd, r));
  endtask

  initial begin
    tick = 0; preset = 0; preset_val = 0;
    shigh = 16'sd2800; slow = 16'sd200; accel = 8; decel = 8; target = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 500 rpm (200) -> 7000 rpm (2800) at 8 counts per tick
    preset = 1; preset_val = 16'sd200; @(negedge clk); preset = 0;
    check(cmd == 16'sd200, "preset");
    r = 200; target = 16'sd2800; nt = 0;
    while (cmd != 16'sd2800 && nt < 1000) begin do_tick(); nt++; end
    check(nt == 325, $sformatf("ramp took %0d ticks", nt));
    for (int n = 0; n < 2000; n++) begin
      if (n % 50 == 0) begin
        target = 16'($signed($urandom_range(0, 4000)) - 500);
        accel = 16'($urandom_range(0, 100)); decel = 16'($urandom_range(0, 100));
      end
      if (n == 1000) begin shigh = 16'sd1000; slow = -16'sd1000; end
      do_tick();
      @(negedge clk);
      check(int'(cmd) == r, "holds without tick");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
