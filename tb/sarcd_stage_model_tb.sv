// Testbench of one SAR-CD unit cell (stage weight 2000 ps, mid-scale
// controls, so reference 2000 ps and the two paths aligned). For input pulses
// shorter and longer than the reference it checks the decision u = (input
// longer than reference) and that the residue pulse passed on is
// |input - reference| wide (within 2 ps); clr must clear u.
module sarcd_stage_model_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam real R = 2000.0;
  logic pin = 1'b0, clr = 1'b0, pout, u;
  logic [20:0] vc_uv = 21'd925000, vs_uv = 21'd925000;
  int checks = 0, failures = 0;
  realtime t_r, width;

  sarcd_stage_model #(.W_PS(R)) dut (.pin(pin), .clr(clr), .vc_uv(vc_uv), .vc_synch_uv(vs_uv),
                                     .pout(pout), .u(u));

  always @(posedge pout) t_r = $realtime;
  always @(negedge pout) width = $realtime - t_r;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ws[8] = '{100, 700, 1500, 1950, 2050, 2600, 3500, 3990};
    foreach (ws[i]) begin
      clr = 1'b1; #10 clr = 1'b0;
      checks++;
      if (u !== 1'b0) failures++;
      width = -1.0;
      pin = 1'b1;
      #(ws[i]) pin = 1'b0;
      #8000;
      checks++;
      if (u !== (real'(ws[i]) > R)) begin
        failures++;
        $display("input %0d ps: u=%b", ws[i], u);
      end
      checks++;
      if (width > (real'(ws[i]) > R ? real'(ws[i]) - R : R - real'(ws[i])) + 2.0 ||
          width < (real'(ws[i]) > R ? real'(ws[i]) - R : R - real'(ws[i])) - 2.0) begin
        failures++;
        $display("input %0d ps: residue %0.1f ps", ws[i], width);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
