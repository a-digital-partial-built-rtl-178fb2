// Test of the partial BIST structure on its own, with the ADC codes driven
// directly. Each run gives every gain set a code level (a staircase with
// random step heights, some steps missing as a faulty feedback network would
// leave them) plus per-clock jitter, and the testbench recomputes the window
// sums and the expected signature independently. Checked per run: the gain
// set driven in each window, the signature, the flags, G and H, and the run
// length nwin * 2^N + 2 clocks, which for 64 codes and 32 gain sets is the
// 2048-clock test plus two clocks of pipeline, and for 64 codes and 16 time
// slots the 1024-clock ramp test plus two.
module tb_agc_partial_bist;
  import bist_pkg::*;
  localparam int CW = CFG_W + RES_W;
  logic clk = 0, rst_n = 0, start = 0, scan_en = 0, scan_in = 0, capture = 0;
  logic [D_W-1:0] d = '0;
  logic scan_out, busy, done, test_pass;
  logic [S_W-1:0] s;
  logic [L_W-1:0] l;
  int checks = 0, failures = 0;
  int n_missing = 0, n_timing_2048 = 0, n_timing_1024 = 0;

  agc_partial_bist dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 24; r++) begin
      cfg_t c;
      res_t rs;
      logic [CW-1:0] o;
      int level[32], sums[33], ne, nw, ncy, l_exp, stop_w, cyc_done, i, w, se;
      bit stop_exp, miss;
      // staircase of code levels over the gain sets
      level[0] = int'($urandom_range(5));
      miss = 0;
      for (int k = 1; k < 32; k++) begin
        int st;
        st = (r % 3 == 2 && $urandom_range(7) == 0) ? 0 : 1 + int'($urandom_range(1));
        if (st == 0) miss = 1;
        level[k] = (level[k-1] + st > 61) ? 61 : level[k-1] + st;
      end
      c = '0;
      c.n = (r == 0 || r == 1) ? 3'd6 : N_W'($urandom_range(7));
      c.gi = (r == 0 || r % 3 == 2) ? 3'd1 : ((r == 1) ? 3'd0 : N_W'($urandom_range(7)));
      c.s0 = (r < 2) ? ((r == 1) ? 5'd31 : 5'd0) : S_W'($urandom);
      c.nwin = (r == 0) ? 6'd32 : ((r == 1) ? 6'd16 : WIN_W'($urandom_range(40)));
      c.minmax = (r < 2 || r % 3 == 2) ? 1'b1 : 1'($urandom);
      ne = (c.n < 1) ? 1 : ((c.n > 6) ? 6 : int'(c.n));
      c.thr = SUM_W'((c.minmax ? 1 : 2) * ((1 << ne) - 1) * (1 + $urandom_range(1)) / 2);
      c.stop_on_fail = (r > 2) && r[0];
      c.lmin = L_W'($urandom_range(20)); c.lmax = L_W'(c.lmin + $urandom_range(15));
      nw = (c.nwin == 0 || c.nwin > 32) ? 32 : int'(c.nwin);
      ncy = nw << ne;
      shift({c, {RES_W{1'b0}}}, o);
      foreach (sums[k]) sums[k] = 0;
      l_exp = 0; stop_exp = 0; stop_w = -1; cyc_done = -1;
      @(negedge clk) start = 1;
      @(posedge clk);
      i = 0;
      while (cyc_done < 0 && i < ncy + 10) begin
        i++;
        @(negedge clk);
        start = 0;
        if (i <= ncy && !stop_exp) begin
          w = (i - 1) >> ne;
          se = (int'(c.s0) + int'(c.gi) * w) % 32;
          check(int'(s) == se, "gain set");
          d = D_W'(level[int'(s)] + int'($urandom_range(2)));
          sums[w] += int'(d);
          if ((i & ((1 << ne) - 1)) == 0 && w >= 1) begin
            bit ok;
            ok = c.minmax ? (sums[w] > sums[w-1] + int'(c.thr))
                          : (sums[w] < sums[w-1] + int'(c.thr));
            if (ok) l_exp++;
            else if (c.stop_on_fail) begin stop_exp = 1; stop_w = w; end
          end
        end else d = D_W'($urandom);
        @(posedge clk); #1;
        if (done && cyc_done < 0) cyc_done = i;
      end
      if (stop_exp) check(cyc_done == ((stop_w + 1) << ne) + 2, "stop time");
      else check(cyc_done == ncy + 2, $sformatf("run length %0d expected %0d", cyc_done, ncy + 2));
      if (!stop_exp && ne == 6 && nw == 32 && cyc_done == 2048 + 2) n_timing_2048++;
      if (!stop_exp && ne == 6 && nw == 16 && cyc_done == 1024 + 2) n_timing_1024++;
      @(negedge clk) capture = 1;
      @(negedge clk) capture = 0;
      shift({c, {RES_W{1'b0}}}, o);
      rs = res_t'(o[RES_W-1:0]);
      check(int'(rs.l) == l_exp, $sformatf("run %0d signature %0d expected %0d", r, rs.l, l_exp));
      check(rs.done && rs.stopped == stop_exp, "flags");
      check(rs.pass == (!stop_exp && l_exp >= int'(c.lmin) && l_exp <= int'(c.lmax)), "pass flag");
      check(test_pass == rs.pass && l == rs.l, "direct outputs");
      if (stop_exp)
        check(int'(rs.g) == sums[stop_w] && int'(rs.h) == sums[stop_w-1], "G/H at stop");
      else if (nw > 1)
        check(int'(rs.g) == sums[nw-1] && int'(rs.h) == sums[nw-2], "G/H at end");
      if (miss && c.minmax && c.gi == 1 && l_exp < nw - 1) n_missing++;
    end
    check(n_timing_2048 > 0 && n_timing_1024 > 0, "paper test lengths");
    check(n_missing > 0, "a missing gain step lowered the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
