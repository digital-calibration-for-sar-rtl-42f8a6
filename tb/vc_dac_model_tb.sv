// Testbench of the control-voltage DAC model: code 0 gives 0.65 V, mid-scale
// 0.925 V, every code steps by 550 mV/256 (within 1 uV of rounding) and the
// output never leaves 0.65-1.2 V.
module vc_dac_model_tb;
  logic [7:0] code;
  logic [20:0] vc_uv;
  int checks = 0, failures = 0;

  vc_dac_model #(.VC_W(8)) dut (.code(code), .vc_uv(vc_uv));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      real expect_uv;
      code = 8'(c);
      #1;
      expect_uv = 650000.0 + real'(c) * 2148.4375;
      checks++;
      if (real'(vc_uv) > expect_uv + 1.0 || real'(vc_uv) < expect_uv - 1.0) begin
        failures++;
        $display("code %0d: %0d uV, expected %0.1f", c, vc_uv, expect_uv);
      end
      checks++;
      if (vc_uv < 650000 || vc_uv > 1200000) failures++;
    end
    code = 8'd128;
    #1;
    checks++;
    if (vc_uv != 925000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
