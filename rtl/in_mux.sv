// Input multiplexer (2:1) in front of the voltage-to-time converter.
//
// Selects either the external input level or the level driven by the
// calibration logic. The analog input voltage is represented by its code over
// the 0.4-0.6 V input range, W bits wide. sel = 1 routes the calibration
// input. Purely combinational; the choice of a digital code for the analog
// level is this design's own representation.
module in_mux #(
  parameter int unsigned W = 10
) (
  input  logic         sel,
  input  logic [W-1:0] ext_in,
  input  logic [W-1:0] cal_in,
  output logic [W-1:0] y
);
  timeunit 1ps; timeprecision 1ps;

  always_comb y = sel ? cal_in : ext_in;

endmodule
