// Behavioural model (not synthesizable analogue circuit) of the 6-bit flash
// ADC behind the AGC. Voltages are signed integers in microvolts.
//
// The input is quantised between the low and high ladder references into 64
// codes: code = floor(64 * (vin - vlo) / (vhi - vlo)), held at 0 below the
// range and at 63 above it. The 6-bit width is the converter's; the ideal
// transfer curve is a modelling choice. The model is combinational, i.e. the
// code belongs to the current gain set within the same clock.
module flash_adc_model
  import bist_pkg::*;
(
  input  int signed        vin_uv,
  input  int signed        vlo_uv,
  input  int signed        vhi_uv,
  output logic [D_W-1:0]   code
);

  longint q;

  always_comb begin
    if (vhi_uv > vlo_uv)
      q = ((longint'(vin_uv) - longint'(vlo_uv)) * (1 << D_W)) / (longint'(vhi_uv) - longint'(vlo_uv));
    else
      q = 0;
    if (vin_uv < vlo_uv)          code = '0;
    else if (q > (1 << D_W) - 1)  code = '1;
    else                          code = D_W'(q);
  end

endmodule
