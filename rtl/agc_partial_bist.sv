// Partial BIST structure for the AGC: on-chip evaluation of the gain-step
// test and the output-swing (ramp) test from the ADC codes alone.
//
// Every ADC clock one 6-bit code D enters the sampling circuitry, which sums
// 2^N codes into a 12-bit sample. At the end of each window the sample goes
// into BUF1 and the previous one into BUF2, and the comparator checks whether
// the new sample exceeds (MinMax = 1) or stays below (MinMax = 0) the previous
// one plus the threshold J; the passing comparisons are counted into the
// signature L. During the gain-step test the gain-set counter raises S by GI
// after every window, so a fault-free AGC gives one pass per gain step; for
// the ramp test GI = 0 holds S while a ramp is applied to the AGC input and L
// counts the time slots in which the output moved by at least J.
// A run takes nwin * 2^N + 2 clocks from `start` to `done`. Parameters are
// shifted in, and results out, through the scan chain (`scan_*`, `capture`).
// The cells and their wiring follow the structure's block diagram; the test
// control sequence, the configuration layout and the pass window are this
// design's own.
module agc_partial_bist
  import bist_pkg::*;
(
  input  logic           clk,        // ADC clock
  input  logic           rst_n,
  input  logic [D_W-1:0] d,          // ADC output code
  input  logic           start,      // begin a test run
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic           capture,
  output logic           scan_out,
  output logic [S_W-1:0] s,          // gain set to the AGC in test mode
  output logic           busy,
  output logic           done,
  output logic           test_pass,
  output logic [L_W-1:0] l           // test signature
);

  cfg_t             cfg;
  res_t             res;
  logic             clr, run, step, load, eval, stopped, pass;
  logic             first, last;
  logic [SUM_W-1:0] f, g, h;

  bist_scan_chain u_scan (
    .clk, .rst_n, .scan_en, .scan_in, .capture, .res, .cfg, .scan_out
  );

  sample_div u_div (
    .clk, .rst_n, .clr, .en(run), .n(cfg.n), .first, .last
  );

  sampling_circuitry u_samp (
    .clk, .rst_n, .en(run), .restart(first), .d, .f
  );

  test_evaluation u_eval (
    .clk, .rst_n, .clr, .load, .eval, .f, .j(cfg.thr), .minmax(cfg.minmax),
    .g, .h, .pass, .l
  );

  gainset_incr u_gs (
    .clk, .rst_n, .init(clr), .step, .s0(cfg.s0), .gi(cfg.gi), .s
  );

  test_control u_ctl (
    .clk, .rst_n, .start, .nwin(cfg.nwin), .stop_on_fail(cfg.stop_on_fail),
    .lmin(cfg.lmin), .lmax(cfg.lmax), .win_end(last), .pass, .l,
    .clr, .run, .step, .load, .eval, .busy, .done, .stopped, .test_pass
  );

  always_comb begin
    res.h       = h;
    res.g       = g;
    res.s       = s;
    res.pass    = test_pass;
    res.stopped = stopped;
    res.done    = done;
    res.l       = l;
  end

endmodule
