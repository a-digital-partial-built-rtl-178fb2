// Unit test of the gain decoder: all 32 gain sets, exactly line S high.
module tb_gain_decoder;
  import bist_pkg::*;
  logic [S_W-1:0] s = '0;
  logic [(1<<S_W)-1:0] d;
  int checks = 0, failures = 0;

  gain_decoder dut (.*);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      s = S_W'(k);
      #1;
      checks++;
      if (d != (32'd1 << k)) begin
        failures++;
        $display("FAIL: s=%0d d=%h", k, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
