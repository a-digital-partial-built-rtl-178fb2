// AGC macro with its digital partial built-in self-test.
//
// The behavioural AGC amplifies the selected input with a gain chosen by the
// 5-bit gain set; the behavioural 6-bit flash ADC digitises its output. In
// normal operation (`test_mode` low) the gain set comes from the AGC's
// digital control loop, which lies outside this block (`s_loop` in,
// `adc_code` out). In test mode the partial BIST's gain-set counter drives
// the AGC instead, and the BIST evaluates the ADC codes on chip: the
// gain-step test (DC input, gain set stepped once per sample window) or the
// output-swing test (ramp input, gain set held). Parameters and the result
// are moved through the scan chain; `done`, `test_pass` and `l` give the
// result directly as well. All analogue quantities are integers in
// microvolts. The multiplexer choosing the gain-set source is this design's
// reading of how the counter reaches the AGC; everything else is wired as
// the structure's block diagram shows.
module agc_bist_top
  import bist_pkg::*;
(
  input  logic           clk,          // ADC clock
  input  logic           rst_n,
  input  int signed      in1_uv,
  input  int signed      in2_uv,
  input  logic           in_sel,
  input  logic           hpb,          // 1: high-pass filter disabled
  input  int signed      vref_uv,      // AGC reference
  input  int signed      adc_lo_uv,    // ADC low reference
  input  int signed      adc_hi_uv,    // ADC high reference
  input  logic           test_mode,
  input  logic [S_W-1:0] s_loop,       // gain set from the control loop
  output logic [D_W-1:0] adc_code,     // ADC output to the control loop
  output logic [S_W-1:0] s_agc,        // gain set applied to the AGC
  input  logic           start,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic           capture,
  output logic           scan_out,
  output logic           busy,
  output logic           done,
  output logic           test_pass,
  output logic [L_W-1:0] l
);

  int signed      agc_out_uv;
  logic [S_W-1:0] s_bist;

  assign s_agc = test_mode ? s_bist : s_loop;

  agc_model u_agc (
    .in1_uv, .in2_uv, .sel(in_sel), .hpb, .vref_uv, .s(s_agc), .out_uv(agc_out_uv)
  );

  flash_adc_model u_adc (
    .vin_uv(agc_out_uv), .vlo_uv(adc_lo_uv), .vhi_uv(adc_hi_uv), .code(adc_code)
  );

  agc_partial_bist u_bist (
    .clk, .rst_n, .d(adc_code), .start(start && test_mode), .scan_en, .scan_in,
    .capture, .scan_out, .s(s_bist), .busy, .done, .test_pass, .l
  );

endmodule
