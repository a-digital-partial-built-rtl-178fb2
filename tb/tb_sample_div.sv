// Unit test of the sample-window divider: for every N field value the first
// and last flags must mark windows of 2^N clocks (N limited to 1..6), the
// count must hold while disabled and restart on clear.
module tb_sample_div;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [N_W-1:0] n = '0;
  logic first, last;
  int checks = 0, failures = 0;

  sample_div dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int nv = 0; nv < 8; nv++) begin
      int len, pos;
      len = 1 << ((nv < 1) ? 1 : (nv > 6 ? 6 : nv));
      @(negedge clk) begin n = N_W'(nv); clr = 1; en = 0; end
      @(negedge clk) begin clr = 0; en = 1; end
      pos = 0;
      for (int c = 0; c < 3 * len; c++) begin
        // pause now and then: nothing may move
        if (c % 7 == 3) begin
          en = 0; #1;
          check(!first && !last, "flags low while disabled");
          @(negedge clk) en = 1;
        end
        #1;
        check(first == (pos == 0), $sformatf("first N=%0d pos=%0d", nv, pos));
        check(last == (pos == len - 1), $sformatf("last N=%0d pos=%0d", nv, pos));
        @(negedge clk);
        pos = (pos + 1) % len;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
