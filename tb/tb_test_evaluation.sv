// Unit test of the test evaluation block: random samples are loaded, the
// buffers must shift F -> G -> H, and on every eval the signature must count
// exactly the comparisons G > H + J (MinMax = 1) or G < H + J (MinMax = 0),
// with sums that exceed 12 bits and the boundary G == H + J included.
module tb_test_evaluation;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, load = 0, eval = 0, minmax = 0;
  logic [SUM_W-1:0] f = '0, j = '0, g, h;
  logic pass;
  logic [L_W-1:0] l;
  int checks = 0, failures = 0;

  test_evaluation dut (.*);
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
    int eg, eh, el;
    bit ok;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      eg = 0; eh = 0; el = 0;
      minmax = r[0];
      j = SUM_W'($urandom_range(r < 10 ? 200 : 4095));
      for (int s = 0; s < 31; s++) begin
        @(negedge clk) begin
          load = 1;
          // runs 4..7 hit the boundary G == H + J and one above/below it
          if (r >= 4 && r < 8) f = SUM_W'(eg + int'(j) + (s % 3) - 1);
          else f = (r == 3) ? SUM_W'(4095 - s) : SUM_W'(eg + int'($urandom_range(300)) - 100);
        end
        @(posedge clk); #1;
        eh = eg; eg = int'(f);
        check(int'(g) == eg && int'(h) == eh, "buffer chain");
        @(negedge clk) begin load = 0; eval = 1; end
        ok = minmax ? (eg > eh + int'(j)) : (eg < eh + int'(j));
        check(pass == ok, $sformatf("compare G=%0d H=%0d J=%0d mm=%0d", eg, eh, j, minmax));
        @(posedge clk); #1;
        if (ok) el++;
        check(int'(l) == el, "signature count");
        @(negedge clk) eval = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
