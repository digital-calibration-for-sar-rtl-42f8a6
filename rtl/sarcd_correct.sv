// Bit correction of the SAR-CD conversion.
//
// Each SAR-CD stage compares the residue it receives with its own weight and
// passes on the absolute difference, so the raw stage decisions u[] are in a
// reflected (Gray-like) code: below a stage whose bit is 0 the residue is
// "mirrored". The binary output is recovered by one XNOR per bit:
//   b[N-1] = u[N-1],   b[k] = u[k] XNOR b[k+1]   for k < N-1.
// This chain is the correction step of the algorithm; it is purely
// combinational (N-1 XNOR gates in series), with no clock and no latency.
module sarcd_correct
  import tdc_calib_pkg::*;
#(
  parameter int unsigned N = ADC_BITS
) (
  input  logic [N-1:0] u,   // uncorrected stage decisions, u[N-1] from the first stage
  output logic [N-1:0] b    // corrected binary word, b[N-1] is the MSB
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    b[N-1] = u[N-1];
    for (int k = int'(N) - 2; k >= 0; k--)
      b[k] = ~(u[k] ^ b[k+1]);
  end

endmodule
