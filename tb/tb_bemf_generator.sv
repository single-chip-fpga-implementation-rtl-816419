// tb_bemf_generator: for random angles and the wrap-around corners, checks
// ea, eb, ec against round(512*sin(2*pi*k/500)) computed here with real
// arithmetic, k = angle/16 for theta, theta-2667 and theta+2667 (mod 8000),
// and the five-cycle latency.
module tb_bemf_generator;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, done;
  logic [12:0] theta;
  s16_t ea, eb, ec;

  bemf_generator dut (.clk, .rst_n, .start, .theta, .ea, .eb, .ec, .done);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sin(int ang);
    int a, k;
    real v;
    a = ((ang % 8000) + 8000) % 8000;
    k = a / 16;
    v = 512.0 * $sin(2.0 * 3.14159265358979 * k / 500.0);
    return (v >= 0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  int lat, t;
  initial begin
    start = 0; theta = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      case (n)
        0: t = 0; 1: t = 7999; 2: t = 2666; 3: t = 2667; 4: t = 5332; 5: t = 5333;
        default: t = $urandom_range(0, 7999);
      endcase
      theta = 13'(t);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(int'(ea) == ref_sin(t), $sformatf("ea(%0d)=%0d exp %0d", t, ea, ref_sin(t)));
      check(int'(eb) == ref_sin(t - 2667), $sformatf("eb(%0d)=%0d exp %0d", t, eb, ref_sin(t - 2667)));
      check(int'(ec) == ref_sin(t + 2667), $sformatf("ec(%0d)=%0d exp %0d", t, ec, ref_sin(t + 2667)));
      check(lat == 5, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
