// Unit test of the behavioural AGC: hand-computed outputs for both inputs,
// several gain sets and the high-pass filter enabled (DC blocked).
// With vref = 100 mV and vin = 500 mV the output is 100 mV + gain * 400 mV,
// gain = 1.0 + 0.1 * S, so S = 0 -> 500 mV, S = 10 -> 900 mV, S = 31 -> 1740 mV.
module tb_agc_model;
  import bist_pkg::*;
  int signed in1_uv = 500_000, in2_uv = 200_000, vref_uv = 100_000, out_uv;
  logic sel = 0, hpb = 1;
  logic [S_W-1:0] s = '0;
  int checks = 0, failures = 0;

  agc_model dut (.*);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input int v, input string what);
    #1;
    checks++;
    if (out_uv != v) begin
      failures++;
      $display("FAIL: %s: %0d expected %0d", what, out_uv, v);
    end
  endtask

  initial begin
    s = 0;  expect_out(500_000, "S=0");
    s = 10; expect_out(900_000, "S=10");
    s = 31; expect_out(1_740_000, "S=31");
    sel = 1; s = 20; expect_out(400_000, "in2, S=20");      // 100 + 3.0*100
    in2_uv = 50_000; s = 5; expect_out(25_000, "in2 below vref");  // 100 - 1.5*50
    hpb = 0; expect_out(100_000, "HPF blocks DC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
