// Test evaluation: compares each new sample with the previous one plus a
// threshold and counts the passing comparisons.
//
// On `load` the 12-bit buffer BUF1 takes the new sample F (G) and BUF2 takes
// the old content of BUF1 (H). The 12-bit adder forms K = H + J, with J the
// threshold held in the 12-bit register, and the comparator tests G against K:
// with `minmax` high a step passes when G > K (minimum step present), with it
// low when G < K (step below the maximum). On `eval` the 5-bit counter adds the
// comparator result to the signature L. `clr` empties both buffers and L.
// The buffer chain, adder, comparator and counter follow the structure's
// description; keeping the adder's carry so that H + J never wraps, and the
// separate load/eval strobes, are this design's choices. `pass` is the
// comparator result, valid in the cycle `eval` is high.
module test_evaluation
  import bist_pkg::*;
#(
  parameter int unsigned SW = SUM_W,
  parameter int unsigned LW = L_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          load,
  input  logic          eval,
  input  logic [SW-1:0] f,
  input  logic [SW-1:0] j,
  input  logic          minmax,
  output logic [SW-1:0] g,
  output logic [SW-1:0] h,
  output logic          pass,
  output logic [LW-1:0] l
);

  logic [SW:0] k;   // H + J
  logic        a_lt_b, a_gt_b;

  always_comb begin
    k      = {1'b0, h} + {1'b0, j};   // 12bit ADD with its carry kept
    a_lt_b = {1'b0, g} < k;           // COMP a<b
    a_gt_b = {1'b0, g} > k;           // COMP a>b
    pass   = minmax ? a_gt_b : a_lt_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g <= '0;
      h <= '0;
      l <= '0;
    end else if (clr) begin
      g <= '0;
      h <= '0;
      l <= '0;
    end else begin
      if (load) begin
        g <= f;   // 12bit BUF1
        h <= g;   // 12bit BUF2
      end
      if (eval && pass) l <= l + 1'b1;   // 5bit CNT
    end
  end

endmodule
