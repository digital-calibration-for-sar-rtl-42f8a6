// Behavioural (simulation-only, not synthesizable) model of an ideal voltage-to-time
// converter.
//
// At every rising edge of the sampling clock it takes the input level vin
// (code of the 0.4-0.6 V range, W bits: 0 = 0.4 V, 2^W = 0.6 V) as it is just
// after the edge (a level driven from the same edge is therefore the one
// converted) and, LAUNCH_PS after the edge, emits one pulse of width vin * FS_PS / 2^W (31.5 ns full scale). A
// short clear pulse (clr, CLR_PS wide) just before the pulse resets the TDC
// stage decisions. A zero input emits no pulse. The ideal VTC and the 31.5 ns
// full scale follow the method; the launch offset and clear pulse are this
// model's choices. With the 34 ns sampling period the last TDC stage has
// settled before the next clock edge. Time unit 1 ps.
module vtc_model
  import tdc_calib_pkg::*;
#(
  parameter int unsigned W         = ADC_BITS + 1,
  parameter real         LAUNCH_PS = 200.0,
  parameter real         CLR_PS    = 20.0
) (
  input  logic         clk,
  input  logic [W-1:0] vin,
  output logic         pulse,
  output logic         clr
);
  timeunit 1ps; timeprecision 1ps;

  real w_ps;

  initial begin
    pulse = 1'b0;
    clr   = 1'b0;
  end

  always begin
    @(posedge clk);
    #(LAUNCH_PS - CLR_PS) clr = 1'b1;
    // the level is taken after the clock edge, once the sampled input has settled
    w_ps = real'(vin) * FS_PS / real'(64'd1 << W);
    #(CLR_PS) clr = 1'b0;
    if (w_ps > 0.0) begin
      pulse = 1'b1;
      #(w_ps) pulse = 1'b0;
    end
  end

endmodule
