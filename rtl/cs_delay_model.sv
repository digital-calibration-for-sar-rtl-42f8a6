// Behavioural (simulation-only, not synthesizable) model of a current-starved inverter
// delay cell loaded by a capacitor, used as the synchronization delay "Delay"
// of each SAR-CD stage.
//
// The control voltage sets the current that charges the load capacitor, so a
// higher Vc gives a shorter delay. The model delays every edge of din, however
// close to the previous one (transport delay, edges kept in a queue), by
//   BASE_PS * CORNER * (1 + ALPHA*(0.925 V - Vc))   (see tdc_calib_pkg),
// evaluated at the edge, as a transport delay. CORNER stands for process,
// voltage and temperature drift of the cell. The linear law and its numbers
// are this model's own; the cell's structure and the direction of control
// follow the method. Time unit 1 ps.
module cs_delay_model
  import tdc_calib_pkg::*;
#(
  parameter real BASE_PS = TGATE_PS,
  parameter real CORNER  = 1.0
) (
  input  logic        din,
  input  logic [20:0] vc_uv,
  output logic        dout
);
  timeunit 1ps; timeprecision 1ps;

  // Pending edges (transport delay): time due and value, oldest first
  realtime due_q[$];
  logic    val_q[$];
  event    pushed;

  initial dout = 1'b0;

  always @(din) begin
    due_q.push_back($realtime + cs_delay_ps(BASE_PS, CORNER, real'(vc_uv) * 1.0e-6));
    val_q.push_back(din);
    -> pushed;
  end

  always begin
    if (due_q.size() == 0) begin
      @(pushed);
    end else begin
      if (due_q[0] > $realtime) #(due_q[0] - $realtime);
      dout <= val_q[0];
      void'(due_q.pop_front());
      void'(val_q.pop_front());
    end
  end

endmodule
