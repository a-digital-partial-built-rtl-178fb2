// Unit test of the behavioural 6-bit ADC with a 0.5 V .. 1.9 V range
// (LSB 21.875 mV): codes at hand-computed points, clipping at both ends.
module tb_flash_adc_model;
  import bist_pkg::*;
  int signed vin_uv = 0, vlo_uv = 500_000, vhi_uv = 1_900_000;
  logic [D_W-1:0] code;
  int checks = 0, failures = 0;

  flash_adc_model dut (.*);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(input int v, input int c);
    vin_uv = v;
    #1;
    checks++;
    if (int'(code) != c) begin
      failures++;
      $display("FAIL: vin=%0d code=%0d expected %0d", v, code, c);
    end
  endtask

  initial begin
    expect_code(100_000, 0);      // below range
    expect_code(500_000, 0);
    expect_code(521_874, 0);
    expect_code(521_875, 1);
    expect_code(543_750, 2);
    expect_code(1_200_000, 32);
    expect_code(1_878_124, 62);
    expect_code(1_878_125, 63);
    expect_code(1_900_000, 63);   // top of range clips
    expect_code(2_500_000, 63);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
