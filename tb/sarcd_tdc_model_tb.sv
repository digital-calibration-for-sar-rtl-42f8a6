// Testbench of the SAR-CD TDC model at nominal corners, no mismatch and all
// control voltages at mid-scale. Input pulses of width (x + 1/2) LSB for
// every code x (plus a few widths near the middle of each LSB) must convert
// to x. A reference value is computed here from the pulse width alone
// (floor(width/LSB)); the per-bit decisions are also compared with a
// folding model of the algorithm (u[N-1] = (w > FS/2), residue = |w - FS/2|,
// and so on down). Conversions are started every 34 ns.
module sarcd_tdc_model_tb;
  import tdc_calib_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = ADC_BITS;
  localparam real LSB = FS_PS / real'(1 << N);

  logic pin = 1'b0, clr = 1'b0, res_out;
  logic [N-1:0][20:0] vc_uv;
  logic [20:0] vc_synch_uv;
  logic [N-1:0] u, out;
  int checks = 0, failures = 0;

  sarcd_tdc_model #(.N(N)) dut (.pin(pin), .clr(clr), .vc_uv(vc_uv), .vc_synch_uv(vc_synch_uv),
                                .u(u), .out(out), .res_out(res_out));

  function automatic logic [N-1:0] fold_u(real w);
    logic [N-1:0] r;
    real v = w;
    for (int k = N - 1; k >= 0; k--) begin
      real ref_w;
      ref_w = LSB * real'(1 << k);
      r[k] = (v > ref_w);
      v = (v > ref_w) ? v - ref_w : ref_w - v;
    end
    return r;
  endfunction

  task automatic convert(real w);
    #(200.0) clr = 1'b1;
    #(20.0)  clr = 1'b0;
    pin = 1'b1;
    #(w) pin = 1'b0;
    #(34000.0 - 220.0 - w);
  endtask

  initial begin
    #(200_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) vc_uv[k] = 21'(vc_code_to_uv(1 << (VC_BITS - 1)));
    vc_synch_uv = 21'(vc_code_to_uv(1 << (VC_BITS - 1)));
    for (int x = 0; x < (1 << N); x++) begin
      real w;
      w = (real'(x) + 0.5) * LSB;
      convert(w);
      checks++;
      if (out !== N'(x)) begin
        failures++;
        if (failures < 10) $display("width %0.1f ps: out=%0d expected %0d (u=%b)", w, out, x, u);
      end
      checks++;
      if (u !== fold_u(w)) begin
        failures++;
        if (failures < 10) $display("width %0.1f ps: u=%b expected %b", w, u, fold_u(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
