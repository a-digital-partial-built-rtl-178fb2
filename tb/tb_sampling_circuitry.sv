// Unit test of the sampling circuitry: random 6-bit codes are summed over
// windows of random length up to 64; after each clock the 12-bit output must
// equal the exact sum of the codes since the last restart.
module tb_sampling_circuitry;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, restart = 0;
  logic [D_W-1:0] d = '0;
  logic [2*D_W-1:0] f;
  int checks = 0, failures = 0;

  sampling_circuitry dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sum, len;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      len = (w < 4) ? 64 : 1 + int'($urandom_range(63));
      sum = 0;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        en = ($urandom_range(5) != 0) || c == 0;
        restart = (c == 0);
        d = (w < 2) ? '1 : D_W'($urandom);
        if (!en) begin c--; continue; end
        sum += int'(d);
        @(posedge clk); #1;
        check(int'(f) == sum, $sformatf("sum %0d expected %0d", f, sum));
        @(negedge clk) en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
