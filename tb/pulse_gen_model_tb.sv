// Testbench of the reference pulse generator model. For several control
// voltages and corners the pulse must start 150 ps * GATE_CORNER after the
// trigger edge and last W * CS_CORNER * (1 + 0.4*(0.925 V - Vc)) (within
// 1 ps); a trigger narrower than 8 ps must produce no pulse, and a second
// trigger during a pulse must not restart it.
module pulse_gen_model_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam real W = 4000.0;
  logic trig = 1'b0, vr;
  logic [20:0] vc_uv;
  int checks = 0, failures = 0, pulses = 0;
  realtime t_r, t_f;

  pulse_gen_model #(.W_PS(W), .GATE_CORNER(1.1), .CS_CORNER(0.9)) dut (
    .trig(trig), .vc_uv(vc_uv), .vr(vr));

  always @(posedge vr) begin t_r = $realtime; pulses++; end
  always @(negedge vr) t_f = $realtime;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int uvs[3] = '{650000, 925000, 1200000};
    #1000;
    foreach (uvs[i]) begin
      realtime t0;
      real w_exp;
      vc_uv = 21'(uvs[i]);
      w_exp = W * 0.9 * (1.0 + 0.4 * (0.925 - real'(uvs[i]) * 1.0e-6));
      t0 = $realtime;
      trig = 1'b1;
      #300 trig = 1'b0;
      #1000 trig = 1'b1;        // second trigger inside the pulse
      #100 trig = 1'b0;
      #10000;
      checks++;
      if ((t_r - t0) > 166.0 || (t_r - t0) < 164.0) begin
        failures++;
        $display("start delay %0.1f", t_r - t0);
      end
      checks++;
      if ((t_f - t_r) > w_exp + 1.0 || (t_f - t_r) < w_exp - 1.0) begin
        failures++;
        $display("Vc %0d uV: width %0.1f expected %0.1f", uvs[i], t_f - t_r, w_exp);
      end
    end
    checks++;
    if (pulses != 3) begin failures++; $display("%0d pulses, expected 3", pulses); end
    trig = 1'b1;
    #5 trig = 1'b0;             // too narrow to trigger
    #10000;
    checks++;
    if (pulses != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
