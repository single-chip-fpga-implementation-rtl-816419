// tb_deadtime_gen: drives random gate patterns and checks that each rising
// edge is delayed by exactly `deadtime` cycles, falling edges pass at once,
// and pulses shorter than the deadtime are removed; deadtime 0, 5 and 127.
module tb_deadtime_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pin, pout;
  logic [6:0] dt;

  deadtime_gen dut (.clk, .rst_n, .pwm_in(pin), .deadtime(dt), .pwm_out(pout));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int run_len;  // cycles pwm_in has been high before the current cycle
  int delayed_edges;
  initial begin
    pin = 0; dt = 0; delayed_edges = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (dt_list[k]) begin
      dt = dt_list[k];
      pin = 0; run_len = 0;
      repeat (3) @(negedge clk);
      for (int t = 0; t < 3000; t++) begin
        logic pold;
        @(posedge clk);
        pold = pin;
        run_len = pold ? run_len + 1 : 0;
        #1;
        if ($urandom_range(0, 99) < 3 + (dt < 20 ? 10 : 0)) pin = !pin;
        #1;
        check(pout == (pin && run_len >= dt), $sformatf("dt=%0d run=%0d out=%0d", dt, run_len, pout));
        if (pin && run_len == dt && dt > 0) delayed_edges++;
      end
    end
    check(delayed_edges > 10, "delayed edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [6:0] dt_list [3] = '{7'd0, 7'd5, 7'd127};
endmodule
