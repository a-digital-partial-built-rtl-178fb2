// Gainset Incr.: the gain-set counter that drives the AGC during a test.
//
// `init` loads the start gain set S0; every `step` adds the gain-set increase
// GI (1..7) to S, wrapping modulo 32. GI = 0 holds S, which the ramp test uses
// to keep the gain set constant. A start of 0 or 1 with GI = 2 gives the two
// runs 0,2,..,30 and 1,3,..,31 of the two-step test. The 3-bit GI input and
// 5-bit S output follow the structure; the loadable start value and GI = 0
// are this design's choices. S changes on the clock edge after `step`.
module gainset_incr
  import bist_pkg::*;
#(
  parameter int unsigned SW  = S_W,
  parameter int unsigned GIW = GI_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           step,
  input  logic [SW-1:0]  s0,
  input  logic [GIW-1:0] gi,
  output logic [SW-1:0]  s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     s <= '0;
    else if (init)  s <= s0;
    else if (step)  s <= s + SW'(gi);
  end

endmodule
