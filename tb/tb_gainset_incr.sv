// Unit test of the gain-set counter: after init with a start value every step
// must add GI modulo 32, GI = 0 must hold the gain set, and no step without
// the strobe.
module tb_gainset_incr;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [S_W-1:0] s0 = '0, s;
  logic [GI_W-1:0] gi = '0;
  int checks = 0, failures = 0;

  gainset_incr dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int es;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk) begin init = 1; s0 = S_W'($urandom); gi = GI_W'(r % 8); end
      es = int'(s0);
      @(negedge clk) init = 0;
      check(int'(s) == es, "start value");
      for (int c = 0; c < 40; c++) begin
        @(negedge clk) step = $urandom_range(1);
        if (step) es = (es + int'(gi)) % 32;
        @(posedge clk); #1;
        check(int'(s) == es, $sformatf("gain set %0d expected %0d gi=%0d", s, es, gi));
      end
      @(negedge clk) step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
