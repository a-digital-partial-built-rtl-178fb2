// Unit test of the test control sequencer. The testbench plays the divider
// (a window end every `len` clocks while run is high) and the signature
// counter, and checks clock by clock: run for exactly nwin*len clocks, a gain
// step at every window end but the last, load one clock after each window
// end, eval one clock after each load from the second sample on, done
// nwin*len + 2 clocks after the start, the early stop on a failing step, and
// the pass/fail window.
module tb_test_control;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, stop_on_fail = 0, win_end = 0, pass = 0;
  logic [WIN_W-1:0] nwin = '0;
  logic [L_W-1:0] lmin = '0, lmax = '0, l = '0;
  logic clr, run, step, load, eval, busy, done, stopped, test_pass;
  int checks = 0, failures = 0;
  int n_stop = 0;

  test_control dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
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
    for (int r = 0; r < 60; r++) begin
      int len, nw, total, stop_at, lcount, i;
      bit stop_exp, pass_at[int];
      len  = 2 + int'($urandom_range(6));
      nwin = (r == 0) ? '0 : ((r == 1) ? WIN_W'(1) : WIN_W'(1 + $urandom_range(31)));
      nw   = (nwin == 0) ? 32 : int'(nwin);
      total = nw * len;
      stop_on_fail = r[0];
      lmin = L_W'($urandom_range(10)); lmax = L_W'(lmin + $urandom_range(20));
      l = '0; lcount = 0; stop_exp = 0; stop_at = -1;
      @(negedge clk) start = 1;
      #1 check(clr, "clear on start");
      @(negedge clk) start = 0;
      i = 1;
      // cycles 1 .. until done
      while (i < total + 10) begin
        int w;
        w = (i - 1) / len;
        win_end = run && (i % len == 0);
        pass = ($urandom_range(9) != 0);
        #1;
        if (!stop_exp) begin
          check(run == (i <= total), $sformatf("run at cycle %0d", i));
          check(step == (i <= total && i % len == 0 && i != total), "gain step");
          check(load == (i > 1 && i - 1 <= total && (i - 1) % len == 0), $sformatf("load at %0d", i));
          check(eval == (i > 2 && i - 2 <= total && (i - 2) % len == 0 && i - 2 >= 2 * len),
                $sformatf("eval at %0d", i));
          check(done == (i >= total + 3), $sformatf("done at %0d", i));
        end else begin
          check(!run && !load && !eval && done && stopped, "halted after failure");
        end
        check(!clr, "no clear while busy");
        if (eval && !stop_exp) begin
          if (pass) lcount++;
          else if (stop_on_fail) begin stop_exp = 1; stop_at = i; end
        end
        @(posedge clk);
        #1 l = L_W'(lcount);
        @(negedge clk);
        i++;
        if (done && !stop_exp && i > total + 3) break;
        if (stop_exp && i > stop_at + 3) break;
      end
      win_end = 0;
      check(done && busy == 0, "done and idle");
      check(stopped == stop_exp, "stopped flag");
      check(test_pass == (!stop_exp && lcount >= int'(lmin) && lcount <= int'(lmax)), "pass window");
      if (stop_exp) n_stop++;
    end
    check(n_stop > 0, "a run stopped early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
