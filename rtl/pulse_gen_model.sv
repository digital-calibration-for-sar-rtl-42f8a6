// Behavioural (simulation-only, not synthesizable) model of the reference pulse
// generator of one SAR-CD stage.
//
// On a rising edge of trig the generator emits one pulse vr. The pulse starts
// TGATE_PS*GATE_CORNER after the edge (the fixed path through the isolating
// inverters, the same for every stage) and lasts
//   W_PS * CS_CORNER * (1 + ALPHA*(0.925 V - Vc)),
// the delay of the current-starved inverter charging the stage's own base
// capacitor; W_PS is the nominal width at mid-scale Vc (the stage weight).
// Edges that arrive while a pulse is being made are ignored, and an input
// pulse narrower than TTRIG_PS does not trigger the generator. The width law,
// the trigger threshold and the separate gate-delay corner are this model's
// choices. Time unit 1 ps.
module pulse_gen_model
  import tdc_calib_pkg::*;
#(
  parameter real W_PS        = FS_PS / 2.0,
  parameter real GATE_CORNER = 1.0,
  parameter real CS_CORNER   = 1.0
) (
  input  logic        trig,
  input  logic [20:0] vc_uv,
  output logic        vr
);
  timeunit 1ps; timeprecision 1ps;

  real w_ps;

  initial vr = 1'b0;
  always begin
    @(posedge trig);
    w_ps = cs_delay_ps(W_PS, CS_CORNER, real'(vc_uv) * 1.0e-6);
    #(TTRIG_PS);
    if (trig) begin
      #(TGATE_PS * GATE_CORNER - TTRIG_PS) vr <= 1'b1;
      #(w_ps) vr <= 1'b0;
    end
  end

endmodule
