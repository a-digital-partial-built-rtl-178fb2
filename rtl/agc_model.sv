// Behavioural model (not synthesizable analogue circuit) of the automatic
// gain control amplifier, for DC and slow-ramp tests. Voltages are signed
// integers in microvolts.
//
// The input multiplexer picks in1 or in2 (`sel`). OP1 is a non-inverting
// amplifier about the reference `vref` whose gain is set by the tap that the
// decoded gain set closes: gain = (G0_MILLI + tap * GSTEP_MILLI) / 1000. The
// high-pass filter blocks DC unless it is disabled by `hpb`, in which case
// the amplified signal passes. OP2 only shifts the level, so the output is
// out = vref + gain * (vin - vref) + OFFSET_UV. The linear gain law, the
// default gains and the DC-only treatment of the filter are modelling
// choices; the input mux, the 5-bit gain set through a decoder, the HPF
// bypass and the two-stage structure are the AGC's. Purely combinational.
module agc_model
  import bist_pkg::*;
#(
  parameter int G0_MILLI    = 1000,  // gain at gain set 0, in 1/1000
  parameter int GSTEP_MILLI = 100,   // gain added per gain set, in 1/1000
  parameter int OFFSET_UV   = 0      // output-referred offset
) (
  input  int signed      in1_uv,
  input  int signed      in2_uv,
  input  logic           sel,      // 0: in1, 1: in2
  input  logic           hpb,      // 1: high-pass filter disabled
  input  int signed      vref_uv,  // reference (mid-ladder) voltage
  input  logic [S_W-1:0] s,        // gain set
  output int signed      out_uv
);

  logic [(1<<S_W)-1:0] taps;
  int                  tap;
  longint              gain_milli, vin, amp;

  gain_decoder u_dec (.s, .d(taps));

  always_comb begin
    tap = 0;
    for (int i = 0; i < (1 << S_W); i++)
      if (taps[i]) tap = i;
    gain_milli = longint'(G0_MILLI) + longint'(tap) * longint'(GSTEP_MILLI);
    vin        = sel ? longint'(in2_uv) : longint'(in1_uv);
    amp        = hpb ? (gain_milli * (vin - longint'(vref_uv))) / 1000 : 64'sd0;
    out_uv     = int'(longint'(vref_uv) + amp + longint'(OFFSET_UV));
  end

endmodule
