// Testbench of the current-starved delay model. Pulses of several widths,
// some narrower than the delay and some arriving back to back, are sent
// through it at several control voltages; both edges of every pulse must
// come out after 150 ps * (1 + 0.4*(0.925 V - Vc)) (within 1 ps), so pulse
// widths are kept, and the delay must shrink as Vc rises.
module cs_delay_model_tb;
  timeunit 1ps; timeprecision 1ps;

  logic din = 1'b0, dout;
  logic [20:0] vc_uv;
  int checks = 0, failures = 0;
  realtime t_in_r, t_in_f, t_out_r, t_out_f;

  cs_delay_model #(.BASE_PS(150.0), .CORNER(1.0)) dut (.din(din), .vc_uv(vc_uv), .dout(dout));

  always @(posedge dout) t_out_r = $realtime;
  always @(negedge dout) t_out_f = $realtime;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widths[5] = '{30, 100, 149, 400, 2000};
    int uvs[4] = '{650000, 925000, 1062500, 1200000};
    real prev_d = 1.0e9;
    #1000;
    foreach (uvs[i]) begin
      real d;
      vc_uv = 21'(uvs[i]);
      d = 150.0 * (1.0 + 0.4 * (0.925 - real'(uvs[i]) * 1.0e-6));
      checks++;
      if (d >= prev_d) failures++;
      prev_d = d;
      foreach (widths[j]) begin
        t_in_r = $realtime; din = 1'b1;
        #(widths[j]);
        t_in_f = $realtime; din = 1'b0;
        #3000;
        checks++;
        if ((t_out_r - t_in_r) > d + 1.0 || (t_out_r - t_in_r) < d - 1.0) begin
          failures++;
          $display("Vc %0d uV width %0d: rise delay %0.1f expected %0.1f", uvs[i], widths[j], t_out_r - t_in_r, d);
        end
        checks++;
        if ((t_out_f - t_in_f) > d + 1.0 || (t_out_f - t_in_f) < d - 1.0) begin
          failures++;
          $display("Vc %0d uV width %0d: fall delay %0.1f expected %0.1f", uvs[i], widths[j], t_out_f - t_in_f, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
