// DIV: sample-window divider.
//
// Counts ADC clock cycles within a sample window of 2^N cycles while `en` is
// high and flags the window's first cycle (`first`, where the sampling
// circuitry restarts its sum) and its last cycle (`last`, the window's end).
// N is taken from the 3-bit field d2..d0; values below 1 are treated as 1 and
// values above 6 as 6, since 2^6 = 64 six-bit codes are the most the 12-bit
// sum holds. `clr` restarts the count at the first cycle of a window.
// The divider function and the N input follow the structure's description;
// the clamping and the synchronous clear are this design's choices.
module sample_div
  import bist_pkg::*;
#(
  parameter int unsigned NW = N_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [NW-1:0] n,
  output logic          first,
  output logic          last
);

  logic [N_MAX-1:0] cnt;
  logic [N_MAX-1:0] top;   // 2^N - 1
  int unsigned      n_eff;

  always_comb begin
    n_eff = (int'(n) < 1) ? 1 : ((int'(n) > N_MAX) ? N_MAX : int'(n));
    top   = N_MAX'((1 << n_eff) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (clr)     cnt <= '0;
    else if (en)      cnt <= (cnt == top) ? '0 : cnt + 1'b1;
  end

  assign first = en && (cnt == '0);
  assign last  = en && (cnt == top);

endmodule
