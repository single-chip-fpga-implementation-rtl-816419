// tb_control_sequencer: period starts every 600 cycles and block models
// that answer each start after a fixed delay. Checks the step order of every
// period (ia, ib, scale, estimator, back-EMF, [speed sample, speed PI],
// current PI, duty load), the A/D channels, that speed sampling happens on
// every 10th period and the speed PI only with spd_enable, one cur_tick
// per period, and the overrun counter when periods are made too short.
module tb_control_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, spd_enable, period_start, adc_valid, est_done, bemf_done, spd_done, cc_done;
  logic adc_req, valid_a, valid_b, est_start, bemf_start, cur_tick, spd_tick, spd_start, cc_start, duty_load;
  logic [2:0] adc_ch;
  logic [15:0] overruns;

  control_sequencer #(.CUR_PER_SPD(10)) dut (.clk, .rst_n, .enable, .spd_enable, .period_start,
    .adc_valid, .est_done, .bemf_done, .spd_done, .cc_done, .adc_req, .adc_ch, .valid_a, .valid_b,
    .est_start, .bemf_start, .cur_tick, .spd_tick, .spd_start, .cc_start, .duty_load, .overruns);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responders
  task automatic respond(ref logic d, input int delay);
    repeat (delay) @(negedge clk);
    d = 1; @(negedge clk); d = 0;
  endtask
  always @(negedge clk) if (adc_req)    fork respond(adc_valid, 40); join_none
  always @(negedge clk) if (est_start)  fork respond(est_done, 15); join_none
  always @(negedge clk) if (bemf_start) fork respond(bemf_done, 4); join_none
  always @(negedge clk) if (spd_start)  fork respond(spd_done, 5); join_none
  always @(negedge clk) if (cc_start)   fork respond(cc_done, 11); join_none

  // event log of the current period
  string log_s;
  int n_tick, n_spd, n_spdpi, n_load, per;
  always @(negedge clk) begin
    if (adc_req)    log_s = {log_s, $sformatf("A%0d", adc_ch)};
    if (valid_a)    log_s = {log_s, "a"};
    if (valid_b)    log_s = {log_s, "b"};
    if (est_start)  log_s = {log_s, "E"};
    if (bemf_start) log_s = {log_s, "F"};
    if (spd_tick)   begin log_s = {log_s, "T"}; n_spd++; end
    if (spd_start)  begin log_s = {log_s, "S"}; n_spdpi++; end
    if (cc_start)   log_s = {log_s, "C"};
    if (duty_load)  begin log_s = {log_s, "L"}; n_load++; end
    if (cur_tick)   n_tick++;
  end

  initial begin
    enable = 0; spd_enable = 0; period_start = 0;
    adc_valid = 0; est_done = 0; bemf_done = 0; spd_done = 0; cc_done = 0;
    n_tick = 0; n_spd = 0; n_spdpi = 0; n_load = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      enable = 1; spd_enable = (phase == 1);
      for (per = 0; per < 30; per++) begin
        log_s = "";
        period_start = 1; @(negedge clk); period_start = 0;
        repeat (599) @(negedge clk);
        if (per % 10 == 0)
          check(log_s == (spd_enable ? "A0aA1bEFTSCL" : "A0aA1bEFTCL"), $sformatf("period %0d order %s", per, log_s));
        else
          check(log_s == "A0aA1bEFCL", $sformatf("period %0d order %s", per, log_s));
      end
    end
    check(n_tick == 60 && n_load == 60, "one sequence per period");
    check(n_spd == 6, $sformatf("speed samples %0d", n_spd));
    check(n_spdpi == 3, $sformatf("speed PI runs %0d", n_spdpi));
    check(overruns == 0, "no overrun");
    // too-short periods
    for (int p = 0; p < 5; p++) begin
      period_start = 1; @(negedge clk); period_start = 0;
      repeat (49) @(negedge clk);
    end
    check(overruns > 0, "overrun counted");
    enable = 0; @(negedge clk); @(negedge clk);
    log_s = "";
    period_start = 1; @(negedge clk); period_start = 0;
    repeat (300) @(negedge clk);
    check(log_s == "", "disabled: nothing runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
