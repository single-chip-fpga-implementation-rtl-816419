// tb_init_pos_detect: runs the twelve-vector test with a short interval.
// A DC-link current model answers each sample request with a value whose
// peak is at a random vector. Checks: each vector's gate pattern against the
// phase connections of the twelve test vectors (Vdc -> upper on, 0 V -> lower
// on, open -> both off), its on-time (V1_time for odd, V2_time for even
// vectors), one sample per vector, never both switches of a leg on, the total
// duration of 12 intervals, and that init_pos names the peak vector.
module tb_init_pos_detect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int INTERVAL = 400;

  logic start, idc_valid, active, adc_req, done;
  logic [15:0] v1_time, v2_time;
  logic [11:0] idc, peak;
  logic [5:0]  pwm;
  logic [3:0]  init_pos;

  init_pos_detect #(.INTERVAL(INTERVAL)) dut (.clk, .rst_n, .start, .v1_time, .v2_time,
    .idc, .idc_valid, .pwm, .active, .adc_req, .done, .init_pos, .peak);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase connections of vectors 1..12: "a b c", H = Vdc, L = 0 V, X = open
  string conn [12] = '{"LHH", "LHX", "LHL", "XHL", "HHL", "HXL",
                       "HLL", "HLX", "HLH", "XLH", "LLH", "LXH"};
  function automatic logic [5:0] expected(int v);
    logic [5:0] p = '0;
    for (int ph = 0; ph < 3; ph++) begin
      if (conn[v][ph] == "H") p[2*ph] = 1'b1;
      if (conn[v][ph] == "L") p[2*ph+1] = 1'b1;
    end
    return p;
  endfunction

  int on_cnt [12];
  int reqs, cur_vec, peak_vec, cycles, shoot;
  logic [11:0] cur_model [12];

  // current model: answer requests after 25 cycles
  initial begin
    idc_valid = 0; idc = 0;
    forever begin
      @(negedge clk);
      if (adc_req) begin
        reqs++;
        repeat (25) @(negedge clk);
        idc = cur_model[cur_vec]; idc_valid = 1;
        @(negedge clk); idc_valid = 0;
      end
    end
  end

  initial begin
    start = 0; reqs = 0; shoot = 0;
    v1_time = 16'd120; v2_time = 16'd150;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      peak_vec = $urandom_range(0, 11);
      for (int v = 0; v < 12; v++) begin
        cur_model[v] = 12'($urandom_range(500, 1500));
        on_cnt[v] = 0;
      end
      cur_model[peak_vec] = 12'd2000;
      reqs = 0; cycles = 0; cur_vec = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) begin
        @(negedge clk); cycles++;
        cur_vec = (cycles - 1) / INTERVAL;
        if (cur_vec > 11) cur_vec = 11;
        if (pwm != 0) begin
          on_cnt[cur_vec]++;
          check(pwm == expected(cur_vec), $sformatf("vector %0d pattern %b exp %b", cur_vec + 1, pwm, expected(cur_vec)));
        end
        if ((pwm[0] && pwm[1]) || (pwm[2] && pwm[3]) || (pwm[4] && pwm[5])) shoot++;
      end
      for (int v = 0; v < 12; v++)
        check(on_cnt[v] == ((v % 2 == 0) ? 120 : 150), $sformatf("vector %0d on %0d", v + 1, on_cnt[v]));
      check(reqs == 12, $sformatf("%0d samples", reqs));
      check(cycles == 12 * INTERVAL, $sformatf("duration %0d", cycles));
      check(int'(init_pos) == peak_vec, $sformatf("init_pos %0d exp %0d", init_pos, peak_vec));
      check(peak == 12'd2000, "peak value");
      check(!active, "inactive after done");
      repeat (5) @(negedge clk);
      check(pwm == 0, "gates off after test");
    end
    check(shoot == 0, "no leg shoot-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
