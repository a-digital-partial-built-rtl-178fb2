// Gain decoder: turns the 5-bit gain set S into 32 select lines D for the
// tap switches of OP1's feedback network.
//
// Exactly one line is high, line S, so that each gain set closes one tap of
// the resistor ladder. The 5-bit input and 32 outputs are the AGC's; the
// one-hot code is this design's choice, as the code the decoder produces is
// not specified. Purely combinational.
module gain_decoder
  import bist_pkg::*;
#(
  parameter int unsigned SW = S_W
) (
  input  logic [SW-1:0]      s,
  output logic [(1<<SW)-1:0] d
);

  always_comb begin
    d    = '0;
    d[s] = 1'b1;
  end

endmodule
