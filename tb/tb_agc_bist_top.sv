// End-to-end test of the AGC with its partial BIST, at the default sizes.
//
// The testbench loads test parameters through the scan chain, starts a run in
// test mode, drives the AGC input (a DC level, a DC level with noise, or a
// ramp) and, as an independent reference, recomputes every ADC code, every
// sample sum, the expected signature, the expected stop point and the run
// length (W * 2^N + 2 clocks). It then reads the result back through the scan
// chain and compares. Covered: minimum-step test (GI = 1 and the two GI = 2
// runs), maximum-step test, an offset that pushes the lowest gain sets out of
// the ADC range, noise with a relaxed threshold, the ramp (output-swing) test
// over 8 and 16 time slots, stop-on-first-failure with G/H read-out, the
// pass/fail window both ways, and normal mode where the control loop's gain
// set reaches the AGC.
module tb_agc_bist_top;
  import bist_pkg::*;

  localparam int ADC_LO = 500_000;     // ADC input range 0.5 V .. 1.9 V
  localparam int ADC_HI = 1_900_000;
  localparam int VREF   = 111_000;     // AGC reference for the wide-swing setup
  localparam int VDC    = 540_000;     // DC test input
  localparam int LSB    = (ADC_HI - ADC_LO) / 64;

  logic clk = 0, rst_n = 0;
  int signed in1_uv = VDC, in2_uv = 0, vref_uv = VREF;
  int signed adc_lo_uv = ADC_LO, adc_hi_uv = ADC_HI;
  logic in_sel = 0, hpb = 1, test_mode = 0;
  logic [S_W-1:0] s_loop = '0;
  logic [D_W-1:0] adc_code;
  logic [S_W-1:0] s_agc;
  logic start = 0, scan_en = 0, scan_in = 0, capture = 0;
  logic scan_out, busy, done, test_pass;
  logic [L_W-1:0] l;

  int checks = 0, failures = 0;
  int n_min = 0, n_max = 0, n_gi2 = 0, n_ramp = 0, n_stop = 0, n_noise = 0,
      n_offset = 0, n_pass1 = 0, n_pass0 = 0, n_normal = 0;

  agc_bist_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference AGC + ADC transfer
  function automatic int ref_code(input int vin, input int s, input int vref);
    longint g, o, q;
    g = 1000 + 100 * s;
    o = longint'(vref) + (g * (longint'(vin) - longint'(vref))) / 1000;
    if (o < ADC_LO) return 0;
    q = ((o - ADC_LO) * 64) / (ADC_HI - ADC_LO);
    return (q > 63) ? 63 : int'(q);
  endfunction

  task automatic scan_shift(input logic [CFG_W+RES_W-1:0] din,
                            output logic [CFG_W+RES_W-1:0] dout);
    for (int i = 0; i < CFG_W + RES_W; i++) begin
      @(negedge clk);
      scan_en = 1; scan_in = din[i];
      dout[i] = scan_out;
      @(posedge clk);
    end
    @(negedge clk) scan_en = 0;
  endtask

  task automatic load_cfg(input cfg_t c);
    logic [CFG_W+RES_W-1:0] dummy;
    scan_shift({c, {RES_W{1'b0}}}, dummy);
  endtask

  task automatic read_res(input cfg_t c, output res_t r);
    logic [CFG_W+RES_W-1:0] o;
    @(negedge clk) capture = 1;
    @(negedge clk) capture = 0;
    scan_shift({c, {RES_W{1'b0}}}, o);   // shifting the same config back in
    r = res_t'(o[RES_W-1:0]);
    check(cfg_t'(o[CFG_W+RES_W-1:RES_W]) == c, "configuration read back");
  endtask

  // mode 0: DC, 1: DC with noise, 2: ramp with `slope` uV per clock at the output
  function automatic int drive(input int mode, input int i, input int vdc,
                               input int ramp_out0, input int slope);
    int n;
    case (mode)
      0: return vdc;
      1: begin
        n = int'($urandom_range(8000)) - 4000;   // about +-16 mV at the output
        return vdc + n;
      end
      default: begin   // input that makes the gain-4.1 output ramp linearly
        longint o;
        o = longint'(ramp_out0) + longint'(i) * slope;
        return int'(longint'(VREF) + ((o - VREF) * 1000) / 4100);
      end
    endcase
  endfunction

  task automatic run_test(input cfg_t c, input int mode, input int vdc,
                          input int ramp_out0, input int slope,
                          output int l_got, output bit passed, output bit stopped);
    int ne, nw, ncy, s_exp, w, i, cyc_done, l_exp, stop_w;
    int sums[33];
    res_t r;
    bit stop_exp, pass_exp;
    ne  = (c.n < 1) ? 1 : ((c.n > 6) ? 6 : int'(c.n));
    nw  = (c.nwin == 0 || c.nwin > 32) ? 32 : int'(c.nwin);
    ncy = nw << ne;
    foreach (sums[k]) sums[k] = 0;
    load_cfg(c);
    test_mode = 1;
    @(negedge clk) start = 1;
    in1_uv = drive(mode, 0, vdc, ramp_out0, slope);
    @(posedge clk);                     // edge 0 takes start
    cyc_done = -1;
    l_exp = 0; stop_exp = 0; stop_w = -1;
    i = 0;
    while (cyc_done < 0 && i < ncy + 10) begin
      i++;
      @(negedge clk);
      start = 0;
      if (i <= ncy && !stop_exp) begin
        w = (i - 1) >> ne;
        s_exp = (int'(c.s0) + int'(c.gi) * w) % 32;
        in1_uv = drive(mode, i, vdc, ramp_out0, slope);
        #1;
        check(int'(s_agc) == s_exp, $sformatf("gain set in window %0d", w));
        check(int'(adc_code) == ref_code(in1_uv, s_exp, VREF), $sformatf("ADC code cycle %0d", i));
        sums[w] += ref_code(in1_uv, s_exp, VREF);
        // window finished: evaluate it against the previous one
        if ((i & ((1 << ne) - 1)) == 0 && w >= 1) begin
          bit ok;
          ok = c.minmax ? (sums[w] > sums[w-1] + int'(c.thr))
                        : (sums[w] < sums[w-1] + int'(c.thr));
          if (ok) l_exp++;
          else if (c.stop_on_fail) begin stop_exp = 1; stop_w = w; end
        end
      end
      @(posedge clk);
      #1;
      if (done && cyc_done < 0) cyc_done = i;
    end
    if (stop_exp)
      check(cyc_done == ((stop_w + 1) << ne) + 2, $sformatf("stop cycle %0d", cyc_done));
    else
      check(cyc_done == ncy + 2, $sformatf("run length %0d, expected %0d", cyc_done, ncy + 2));
    read_res(c, r);
    pass_exp = !stop_exp && (l_exp >= int'(c.lmin)) && (l_exp <= int'(c.lmax));
    check(int'(r.l) == l_exp && int'(l) == l_exp,
          $sformatf("signature %0d expected %0d", r.l, l_exp));
    check(r.done && r.stopped == stop_exp, "done/stopped flags");
    check(r.pass == pass_exp && test_pass == pass_exp, "pass flag");
    if (stop_exp) begin
      check(int'(r.g) == sums[stop_w] && int'(r.h) == sums[stop_w-1], "G/H held at failing step");
      n_stop++;
    end else if (nw >= 2) begin
      check(int'(r.g) == sums[nw-1] && int'(r.h) == sums[nw-2], "G/H of last two windows");
    end
    $display("run N=%0d GI=%0d S0=%0d J=%0d windows=%0d: L=%0d stopped=%0d pass=%0d clocks=%0d",
             ne, c.gi, c.s0, c.thr, nw, l_exp, stop_exp, pass_exp, cyc_done);
    if (pass_exp) n_pass1++; else n_pass0++;
    l_got = l_exp; passed = pass_exp; stopped = stop_exp;
    test_mode = 0;
  endtask

  cfg_t c;
  int lg; bit ps, st;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // normal mode: the control loop sets the gain
    for (int k = 0; k < 8; k++) begin
      @(negedge clk) s_loop = S_W'($urandom);
      #1;
      check(s_agc == s_loop, "normal-mode gain set");
      check(int'(adc_code) == ref_code(in1_uv, int'(s_loop), VREF), "normal-mode ADC code");
      n_normal++;
    end

    // minimum gain-step test, 64 codes per sample, J = 63: G > H + J means
    // the average code rose by at least one LSB
    c = '0; c.n = 6; c.gi = 1; c.s0 = 0; c.thr = 63; c.minmax = 1; c.nwin = 32;
    c.lmin = 31; c.lmax = 31;
    run_test(c, 0, VDC, 0, 0, lg, ps, st);
    check(lg == 31 && ps, "fault-free minimum-step test passes");
    n_min++;

    // maximum gain-step test: every step stays below 3 LSB average
    c.minmax = 0; c.thr = 3 * 64;
    run_test(c, 0, VDC, 0, 0, lg, ps, st);
    check(lg == 31, "maximum-step test");
    n_max++;

    // GI = 2: runs 0,2,..,30 and 1,3,..,31, 16 windows each, signature 15
    c.minmax = 1; c.thr = 32; c.gi = 2; c.nwin = 16; c.lmin = 15; c.lmax = 15;
    c.n = 4;
    for (int s0 = 0; s0 < 2; s0++) begin
      c.s0 = S_W'(s0);
      run_test(c, 0, VDC, 0, 0, lg, ps, st);
      check(lg == 15 && ps, "GI=2 run");
      n_gi2++;
    end

    // offset: the low gain sets fall below the ADC range, the signature drops
    c = '0; c.n = 5; c.gi = 1; c.thr = 32; c.minmax = 1; c.nwin = 32;
    c.lmin = 31; c.lmax = 31;
    run_test(c, 0, 430_000, 0, 0, lg, ps, st);
    check(lg < 31 && !ps, "offset lowers the signature");
    n_offset++;

    // noise: 64 codes per sample, threshold 50
    c.n = 6; c.thr = 50;
    run_test(c, 1, VDC, 0, 0, lg, ps, st);
    check(lg == 31 && ps, "noise with threshold 50 passes");
    n_noise++;

    // stop on the first failing step: threshold far above any step
    c.thr = 1000; c.stop_on_fail = 1; c.n = 3;
    run_test(c, 0, VDC, 0, 0, lg, ps, st);
    check(st && lg == 0, "stop on first failure");

    // ramp test, gain set held at 31, 64 codes per slot
    // 8 slots in range: threshold 6 LSB, L must be 7 or 8
    c = '0; c.n = 6; c.gi = 0; c.s0 = 31; c.minmax = 1; c.thr = 6 * 64;
    c.nwin = 12; c.lmin = 7; c.lmax = 8;
    run_test(c, 2, 0, ADC_LO - 30_000 - 64 * 2 * 1400_000 / 512, 1400_000 / 512, lg, ps, st);
    check(lg >= 7 && lg <= 8 && ps, $sformatf("ramp over 8 slots, L=%0d", lg));
    n_ramp++;
    // 16 slots in range: threshold 3 LSB, L must be 15 or 16
    c.thr = 3 * 64; c.nwin = 20; c.lmin = 15; c.lmax = 16;
    run_test(c, 2, 0, ADC_LO - 30_000 - 64 * 2 * 1400_000 / 1024, 1400_000 / 1024, lg, ps, st);
    check(lg >= 15 && lg <= 16 && ps, $sformatf("ramp over 16 slots, L=%0d", lg));
    n_ramp++;

    check(n_min > 0, "minimum test exercised");
    check(n_max > 0, "maximum test exercised");
    check(n_gi2 == 2, "GI=2 runs exercised");
    check(n_offset > 0, "offset case exercised");
    check(n_noise > 0, "noise case exercised");
    check(n_stop > 0, "stop-on-fail exercised");
    check(n_ramp == 2, "ramp tests exercised");
    check(n_pass1 > 0 && n_pass0 > 0, "pass flag seen both ways");
    check(n_normal > 0, "normal mode exercised");
    $display("mechanisms: min=%0d max=%0d gi2=%0d offset=%0d noise=%0d stop=%0d ramp=%0d pass=%0d fail=%0d normal=%0d",
             n_min, n_max, n_gi2, n_offset, n_noise, n_stop, n_ramp, n_pass1, n_pass0, n_normal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
