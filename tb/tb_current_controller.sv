// tb_current_controller: random torque commands, back-EMF values and phase
// currents against an integer reference of ia* = I*ea>>9, the two limited PI
// regulators (Q10) and Dc = Lim(-Da-Db); checks all three duties, the
// integrator states through later results, the 12-cycle latency, and init.
module tb_current_controller;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, init, done, busy;
  s16_t istar, ea, eb, ia, ib, kp, ki, lim, da, db, dc;

  current_controller dut (.clk, .rst_n, .start, .init, .istar, .ea, .eb, .ia, .ib,
                          .kp, .ki, .lim, .da, .db, .dc, .done, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lm(longint v, longint l);
    return v > l ? l : (v < -l ? -l : v);
  endfunction

  longint ai, bi, xa, xb, pa, pb, eda, edb, edc;
  int lat, nsat;
  initial begin
    start = 0; init = 0; kp = 16'sd1024; ki = 16'sd128; lim = 16'sd480;
    ai = 0; bi = 0; nsat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      if (n % 80 == 0) begin
        kp = 16'($urandom_range(0, 3000)); ki = 16'($urandom_range(0, 600));
        lim = 16'($urandom_range(50, 800));
      end
      if (n == 200) begin
        @(negedge clk); init = 1; @(negedge clk); init = 0; ai = 0; bi = 0;
      end
      istar = 16'($signed($urandom_range(0, 2000)) - 1000);
      ea = 16'($signed($urandom_range(0, 1024)) - 512);
      eb = 16'($signed($urandom_range(0, 1024)) - 512);
      ia = 16'($signed($urandom_range(0, 2000)) - 1000);
      ib = 16'($signed($urandom_range(0, 2000)) - 1000);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      xa = ((longint'(istar) * ea) >>> 9) - ia;
      xb = ((longint'(istar) * eb) >>> 9) - ib;
      ai = lm(((ki * xa) >>> 10) + ai, lim);
      bi = lm(((ki * xb) >>> 10) + bi, lim);
      eda = lm(((kp * xa) >>> 10) + ai, lim);
      edb = lm(((kp * xb) >>> 10) + bi, lim);
      edc = lm(-eda - edb, lim);
      if (eda == lim || eda == -lim) nsat++;
      check(longint'(da) == eda, $sformatf("da=%0d exp=%0d", da, eda));
      check(longint'(db) == edb, $sformatf("db=%0d exp=%0d", db, edb));
      check(longint'(dc) == edc, $sformatf("dc=%0d exp=%0d", dc, edc));
      check(lat == 12, $sformatf("latency %0d", lat));
    end
    check(nsat > 5, "duty limit exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
