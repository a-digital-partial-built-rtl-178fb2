// Shared widths and types of the AGC partial BIST structure.
//
// The widths are those of the structure's cells: a 6-bit ADC code D, a 12-bit
// sample sum F/G/H (six sum bits plus six carry-count bits, so up to 64 codes
// of 63 fit), a 5-bit gain set S, a 5-bit test signature L, a 3-bit sample
// exponent N (2^N codes per sample) and a 3-bit gain-set increase GI.
// The scan-loaded configuration and the captured result are packed structs;
// their field order is the order of the scan chain (last field first out).
// Fields beyond N, GI, I and MinMax (start gain set, window count,
// stop-on-fail and the pass window lmin..lmax) are this design's own additions.
package bist_pkg;

  localparam int unsigned D_W   = 6;   // ADC code width
  localparam int unsigned SUM_W = 12;  // sample sum width (F, G, H, J, K)
  localparam int unsigned S_W   = 5;   // gain set width
  localparam int unsigned L_W   = 5;   // signature counter width
  localparam int unsigned N_W   = 3;   // sample exponent field (d2..d0)
  localparam int unsigned GI_W  = 3;   // gain-set increase field
  localparam int unsigned WIN_W = 6;   // window count field (1..32)
  localparam int unsigned N_MAX = 6;   // 2^6 = 64 codes fill the 12-bit sum

  typedef struct packed {
    logic [L_W-1:0]   lmax;          // highest passing signature
    logic [L_W-1:0]   lmin;          // lowest passing signature
    logic             stop_on_fail;  // halt at the first failing step
    logic [WIN_W-1:0] nwin;          // number of sample windows (0 means 32)
    logic             minmax;        // 1: test G > H+J, 0: test G < H+J
    logic [SUM_W-1:0] thr;           // threshold I, copied to J
    logic [S_W-1:0]   s0;            // first gain set of the run
    logic [GI_W-1:0]  gi;            // gain-set increase per window (0 holds S)
    logic [N_W-1:0]   n;             // 2^N codes per sample window
  } cfg_t;

  typedef struct packed {
    logic [SUM_W-1:0] h;        // previous sample
    logic [SUM_W-1:0] g;        // newest sample
    logic [S_W-1:0]   s;        // gain set applied last
    logic             pass;     // run finished and lmin <= L <= lmax
    logic             stopped;  // run halted on a failing step
    logic             done;     // run finished
    logic [L_W-1:0]   l;        // test signature
  } res_t;

  localparam int unsigned CFG_W = $bits(cfg_t);
  localparam int unsigned RES_W = $bits(res_t);

endpackage
