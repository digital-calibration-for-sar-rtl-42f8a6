// Behavioural (simulation-only, not synthesizable) model of the control-voltage DAC.
//
// The calibration logic holds each analog control voltage as a VC_W-bit code
// over the 0.65-1.2 V range (256 levels for VC_W = 8). This model returns the
// voltage the code stands for, in microvolts: vc_uv = 650000 + code*550000/2^VC_W.
// It is combinational and settles at once; a real DAC's settling time and
// errors are not modelled. The range and the 8-bit resolution follow the
// method; the converter itself is not designed here.
module vc_dac_model
  import tdc_calib_pkg::*;
#(
  parameter int unsigned VC_W = VC_BITS
) (
  input  logic [VC_W-1:0] code,
  output logic [20:0]     vc_uv
);
  timeunit 1ps; timeprecision 1ps;

  always_comb vc_uv = 21'(650000 + (64'(code) * 550000) / (64'd1 << VC_W));

endmodule
