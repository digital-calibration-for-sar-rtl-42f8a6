// Workload testbench: effective number of bits of the converter, before and
// after calibration, at several operating corners at once.
//
// A full-scale sine of 1.75 MHz, sampled at 29.4 MHz (34 ns), is converted by
// five copies of the design. Each copy has its analog models set to one
// corner: nominal; warmer (gate delays +1%, current-starved delays +3%); hot
// (+4%, +8%); fast process (-5%, -6%); slow process (+5%, +7%). All share a
// 3% spread of the stage references. The mapping of temperatures and process
// corners onto these factors is this testbench's own assumption. For every
// copy the testbench converts 1024 samples, runs one calibration (all
// copies together), and converts 1024 samples again. Each sample is placed in
// the middle of an output code: the stage models do not fire on a residue
// under 8 ps, so an input within that distance of a code transition can come
// out far off, and such inputs are kept out of this measurement. ENOB comes
// from the error between the output code (+1/2 LSB) and the exact sine, with the
// mean removed: ENOB = (10*log10(P_signal/P_error) - 1.76)/6.02.
// Checks: after calibration every copy reaches at least 8.5 bits (9 is the
// ideal) and has improved on its uncalibrated value.
module tdc_calib_enob_tb;
  import tdc_calib_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N    = ADC_BITS;
  localparam int unsigned VC_W = VC_BITS;
  localparam int unsigned NC   = 5;
  localparam int unsigned NS   = 1024;
  localparam real GC[NC] = '{1.00, 1.01, 1.04, 0.95, 1.05};
  localparam real CC[NC] = '{1.00, 1.03, 1.08, 0.94, 1.07};
  localparam real F_IN   = 1.75e6;
  localparam real T_S    = 34.0e-9;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [N:0] vin_ext = '0;
  logic [NC-1:0][N-1:0] out;
  logic [NC-1:0] cal_busy, cal_done;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_corner
    logic [N-1:0][VC_W-1:0] vc_code;
    logic [VC_W-1:0] vc_synch_code;
    tdc_calib_top #(.GATE_CORNER(GC[i]), .CS_CORNER(CC[i]), .MISMATCH(0.03)) dut (
      .clk(clk), .rst_n(rst_n), .cal_start(cal_start), .vin_ext(vin_ext), .out(out[i]),
      .cal_busy(cal_busy[i]), .cal_done(cal_done[i]), .vc_code(vc_code),
      .vc_synch_code(vc_synch_code));
  end

  always #17000 clk = ~clk;

  // Converts NS sine samples and returns the ENOB of each copy
  task automatic measure(output real enob[NC]);
    real x_prev, se[NC], se2[NC], ps, xm;
    int n;
    x_prev = -1.0;
    n = 0; ps = 0.0; xm = 0.0;
    for (int i = 0; i < NC; i++) begin se[i] = 0.0; se2[i] = 0.0; end
    for (int s = 0; s <= NS; s++) begin
      real x;
      int code;
      @(negedge clk);
      // exact sine in LSB; the converter gets it moved to the middle of its
      // code, as an (N+1)-bit level (odd values only)
      x = 256.0 + 255.9 * $sin(2.0 * 3.14159265358979 * F_IN * T_S * real'(s));
      code = 2 * int'($floor(x)) + 1;
      vin_ext = (N+1)'(code);
      @(posedge clk); #1;
      if (x_prev >= 0.0) begin
        for (int i = 0; i < NC; i++) begin
          real e;
          e = real'(out[i]) + 0.5 - x_prev;
          se[i] += e;
          se2[i] += e * e;
        end
        ps += (x_prev - 256.0) * (x_prev - 256.0);
        xm += x_prev;
        n++;
      end
      x_prev = x;
    end
    for (int i = 0; i < NC; i++) begin
      real pe, psig;
      pe = se2[i] / real'(n) - (se[i] / real'(n)) * (se[i] / real'(n));
      psig = ps / real'(n) - (xm / real'(n) - 256.0) * (xm / real'(n) - 256.0);
      if (pe < 1.0e-6) pe = 1.0e-6;
      enob[i] = (10.0 * $log10(psig / pe) - 1.76) / 6.02;
    end
  endtask

  initial begin
    #(2_000_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real enob_pre[NC], enob_post[NC];
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    measure(enob_pre);
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    cycles = 0;
    while (cal_done != '1 && cycles < 2000) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cal_done != '1) failures++;
    measure(enob_post);
    for (int i = 0; i < NC; i++) begin
      $display("corner %0d (gate x%0.2f, delay cell x%0.2f): ENOB %0.2f before, %0.2f after calibration",
               i, GC[i], CC[i], enob_pre[i], enob_post[i]);
      checks++;
      if (enob_post[i] < 8.5) failures++;
      checks++;
      if (enob_post[i] <= enob_pre[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
