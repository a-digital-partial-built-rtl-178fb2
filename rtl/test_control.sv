// Test control: sequences one test run of the partial BIST structure.
//
// A `start` pulse while idle clears the structure (`clr`, which also loads
// the start gain set) and sets `run`; while `run` is high the divider and
// sampling circuitry take one ADC code per clock. At the end of each sample
// window (`win_end`, from the divider) the gain set steps, except after the
// last window; one clock later `load` moves the finished sample into BUF1 and
// the old one into BUF2; one clock after that `eval` lets the signature
// counter add the comparator result, from the second sample on (the first
// sample has no predecessor). After `nwin` windows (0 is read as 32) `done`
// rises, W*2^N + 2 clocks after the clock that took `start`. With
// `stop_on_fail` set, the first failing comparison halts the run at once,
// keeps G and H for read-out and sets `stopped`. `test_pass` is the on-chip
// pass/fail flag: done, not stopped and lmin <= L <= lmax.
// The document only names a test control block; the whole sequence here is
// this design's reading of the test it describes.
module test_control
  import bist_pkg::*;
#(
  parameter int unsigned WW = WIN_W,
  parameter int unsigned LW = L_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WW-1:0] nwin,
  input  logic          stop_on_fail,
  input  logic [LW-1:0] lmin,
  input  logic [LW-1:0] lmax,
  input  logic          win_end,   // last cycle of a sample window
  input  logic          pass,      // comparator result (valid with eval)
  input  logic [LW-1:0] l,         // signature
  output logic          clr,
  output logic          run,
  output logic          step,
  output logic          load,
  output logic          eval,
  output logic          busy,
  output logic          done,
  output logic          stopped,
  output logic          test_pass
);

  logic [WW-1:0] wcnt;        // finished windows
  logic [WW-1:0] nwin_eff;
  logic          final_win;
  logic          load_last, eval_last, have_h;
  logic          fail_stop;

  always_comb begin
    nwin_eff  = (nwin == '0 || nwin > WW'(32)) ? WW'(32) : nwin;
    final_win = win_end && (wcnt + 1'b1 == nwin_eff);
    clr       = start && !busy;
    step      = win_end && !final_win;
    fail_stop = eval && !pass && stop_on_fail;
    test_pass = done && !stopped && (l >= lmin) && (l <= lmax);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; busy <= 1'b0; done <= 1'b0; stopped <= 1'b0;
      wcnt <= '0; load <= 1'b0; load_last <= 1'b0;
      eval <= 1'b0; eval_last <= 1'b0; have_h <= 1'b0;
    end else if (clr) begin
      run <= 1'b1; busy <= 1'b1; done <= 1'b0; stopped <= 1'b0;
      wcnt <= '0; load <= 1'b0; load_last <= 1'b0;
      eval <= 1'b0; eval_last <= 1'b0; have_h <= 1'b0;
    end else begin
      load      <= win_end;
      load_last <= final_win;
      eval      <= load && have_h;
      eval_last <= load_last;
      if (win_end) wcnt <= wcnt + 1'b1;
      if (final_win) run <= 1'b0;
      if (load) have_h <= 1'b1;
      if (eval_last) begin
        done <= 1'b1;
        busy <= 1'b0;
      end
      if (fail_stop) begin
        run <= 1'b0; load <= 1'b0; load_last <= 1'b0;
        eval <= 1'b0; eval_last <= 1'b0;
        done <= 1'b1; busy <= 1'b0; stopped <= 1'b1;
      end
    end
  end

  // Sequencing rules: a buffer load and a count never share a clock (so L
  // always sees the comparison of the samples just loaded), and nothing is
  // sampled or loaded once the run is done. Both are off during reset, which
  // is why rst_n is also read here as a synchronous signal.
  a_load_eval_apart: assert property (@(posedge clk) disable iff (!rst_n) !(load && eval));
  a_quiet_when_done: assert property (@(posedge clk) disable iff (!rst_n) done |-> !run && !load);

endmodule
