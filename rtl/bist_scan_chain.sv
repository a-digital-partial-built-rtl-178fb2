// Scan chain of the partial BIST structure.
//
// One shift register holds the test configuration (upper CFG_W bits; among
// them the 12-bit threshold register I that supplies J) and a result section
// (lower RES_W bits). With `scan_en` high it shifts one bit per clock from
// `scan_in` towards `scan_out` = bit 0, so a result is read out least
// significant bit first and a new configuration is shifted in least
// significant bit first, after CFG_W + RES_W clocks in all. With `scan_en`
// low, a `capture` pulse copies the live results (signature L, samples G and
// H, gain set, flags) into the result section. The configuration section
// drives the structure directly. That parameters and the signature travel
// through a scan chain follows the document; the field layout (see bist_pkg)
// and the capture control are this design's choices.
module bist_scan_chain
  import bist_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic scan_in,
  input  logic capture,
  input  res_t res,
  output cfg_t cfg,
  output logic scan_out
);

  localparam int unsigned CHAIN_W = CFG_W + RES_W;

  logic [CHAIN_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (scan_en)  sr <= {scan_in, sr[CHAIN_W-1:1]};
    else if (capture)  sr[RES_W-1:0] <= res;
  end

  assign cfg      = cfg_t'(sr[CHAIN_W-1:RES_W]);
  assign scan_out = sr[0];

endmodule
