// tb_offset_scaling: random raw codes, offsets and gains; checks
// ia = ((raw_a - offs_a)*gain)>>>8, ib likewise, ic = -(ia+ib), and that a
// register only loads on its own valid strobe.
module tb_offset_scaling;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] raw, offs_a, offs_b;
  logic valid_a, valid_b;
  s16_t gain, ia, ib, ic;

  offset_scaling dut (.clk, .rst_n, .raw, .valid_a, .valid_b, .offs_a, .offs_b, .gain, .ia, .ib, .ic);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ra, rb, ea, eb;
  initial begin
    valid_a = 0; valid_b = 0; raw = 0; offs_a = 2048; offs_b = 2048; gain = 256;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      offs_a = 12'($urandom_range(1900, 2200)); offs_b = 12'($urandom_range(1900, 2200));
      gain = 16'($urandom_range(0, 1024));
      ra = $urandom_range(0, 4095); rb = $urandom_range(0, 4095);
      raw = 12'(ra); valid_a = 1; @(negedge clk); valid_a = 0;
      raw = 12'($urandom_range(0, 4095)); @(negedge clk);     // no strobe: no load
      raw = 12'(rb); valid_b = 1; @(negedge clk); valid_b = 0;
      ea = ((ra - int'(offs_a)) * int'(gain)) >>> 8;
      eb = ((rb - int'(offs_b)) * int'(gain)) >>> 8;
      check(int'(ia) == ea, $sformatf("ia %0d exp %0d", ia, ea));
      check(int'(ib) == eb, $sformatf("ib %0d exp %0d", ib, eb));
      check(int'(ic) == -(ea + eb), $sformatf("ic %0d exp %0d", ic, -(ea + eb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
