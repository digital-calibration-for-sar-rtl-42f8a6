// Behavioural (simulation-only, not synthesizable) model of one SAR-CD unit cell, stage k.
//
// The rising edge of the stage input pin triggers the reference pulse
// generator (pulse_gen_model), whose pulse vr has the stage weight set by the
// stage control voltage. A copy of the input, pind, is delayed by the
// synchronization delay (cs_delay_model) so that it starts together with vr.
// The XOR of pind and vr is the absolute difference of the two widths and is
// passed to the next stage as pout. A flip-flop clocked by the falling edge
// of vr samples pind: u = 1 when the input pulse is longer than the reference
// (the uncorrected stage bit). clr (active high, asynchronous) clears u before
// each conversion, so a stage that receives no pulse reports 0.
// The cell structure follows the method; the clear input is this model's way
// of starting each conversion from a known state. Time unit 1 ps.
module sarcd_stage_model
  import tdc_calib_pkg::*;
#(
  parameter real W_PS        = FS_PS / 2.0,   // nominal reference width of this stage
  parameter real GATE_CORNER = 1.0,
  parameter real CS_CORNER   = 1.0
) (
  input  logic        pin,
  input  logic        clr,
  input  logic [20:0] vc_uv,        // pulse-generator control voltage
  input  logic [20:0] vc_synch_uv,  // synchronization-delay control voltage
  output logic        pout,         // residue pulse to the next stage
  output logic        u             // uncorrected decision
);
  timeunit 1ps; timeprecision 1ps;

  logic vr, pind;

  pulse_gen_model #(.W_PS(W_PS), .GATE_CORNER(GATE_CORNER), .CS_CORNER(CS_CORNER))
    u_pg (.trig(pin), .vc_uv(vc_uv), .vr(vr));

  cs_delay_model #(.BASE_PS(TGATE_PS), .CORNER(CS_CORNER))
    u_sync (.din(pin), .vc_uv(vc_synch_uv), .dout(pind));

  always_comb pout = pind ^ vr;

  always_ff @(negedge vr or posedge clr) begin
    if (clr) u <= 1'b0;
    else     u <= pind;
  end

endmodule
