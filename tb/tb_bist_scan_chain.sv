// Unit test of the scan chain: random configurations shifted in must appear
// on the configuration outputs once all bits are in, must hold while the
// chain is idle, and a captured result must come out least significant bit
// first, followed by the configuration that was in the chain.
module tb_bist_scan_chain;
  import bist_pkg::*;
  localparam int CW = CFG_W + RES_W;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, capture = 0;
  res_t res = '0;
  cfg_t cfg;
  logic scan_out;
  int checks = 0, failures = 0;

  bist_scan_chain dut (.*);
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

  task automatic shift(input logic [CW-1:0] din, output logic [CW-1:0] dout);
    for (int i = 0; i < CW; i++) begin
      @(negedge clk) begin scan_en = 1; scan_in = din[i]; end
      dout[i] = scan_out;
      @(posedge clk);
    end
    @(negedge clk) scan_en = 0;
  endtask

  initial begin
    logic [CW-1:0] o;
    cfg_t c, prev;
    res_t r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = '0;
    for (int k = 0; k < 30; k++) begin
      c = cfg_t'({$urandom, $urandom});
      r = res_t'({$urandom, $urandom});
      // capture the live result, then shift it out while a new config goes in
      @(negedge clk) begin res = r; capture = 1; end
      @(negedge clk) begin capture = 0; res = ~r; end
      check(cfg == prev, "config kept while capturing");
      shift({c, {RES_W{1'b0}}}, o);
      check(res_t'(o[RES_W-1:0]) == r, "captured result shifted out");
      check(cfg_t'(o[CW-1:RES_W]) == prev, "previous config shifted out");
      check(cfg == c, "new config in place");
      repeat (3) @(negedge clk);
      check(cfg == c, "config held");
      prev = c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
