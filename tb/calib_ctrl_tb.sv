// Testbench of the calibration controller against an arithmetic stand-in for
// the converter.
//
// The stand-in works in LSB units: stage k has reference width
//   R_k(c) = 2^k * g_k * (1 + 0.1*(128 - c)/128)   (shorter for larger c),
// with a per-stage gain g_k drawn at random, and every stage adds the
// synchronization error e(c) = E0 - 0.02*c to its residue. When |e| exceeds
// 2 LSB the word is forced to 0 (the mis-timed chain no longer converts).
// Its result is registered once per clock, as in the full design.
// The expected control words are found here by exhaustive search over all
// 256 codes (largest code whose stage bit is 0, edges of the window of codes
// giving full-scale output), not by successive approximation, and compared
// with the controller's. The calibration length (2N+2)*VC_W*CONV_CYCLES
// cycles, busy/done/cal_sel and a restart are checked as well.
module calib_ctrl_tb;
  import tdc_calib_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N    = ADC_BITS;
  localparam int unsigned VC_W = VC_BITS;
  localparam int unsigned CC   = 2;
  localparam int unsigned CAL_CYCLES = (2 * N + 2) * VC_W * CC;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] tdc_out = '0;
  logic [N-1:0][VC_W-1:0] vc;
  logic [VC_W-1:0] vc_synch;
  logic [N:0] vsig;
  logic cal_sel, busy, done;
  int checks = 0, failures = 0;

  calib_ctrl #(.N(N), .VC_W(VC_W), .CONV_CYCLES(CC)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .tdc_out(tdc_out), .vc(vc),
    .vc_synch(vc_synch), .vsig(vsig), .cal_sel(cal_sel), .busy(busy), .done(done));

  always #5 clk = ~clk;

  real g[N];
  real e0;

  function automatic real ref_w(int k, int c);
    return real'(1 << k) * g[k] * (1.0 + 0.1 * real'(128 - c) / 128.0);
  endfunction

  function automatic real sync_err(int c);
    return e0 - 0.02 * real'(c);
  endfunction

  // Arithmetic stand-in: input level v (N+1-bit code, 2 codes per LSB)
  function automatic logic [N-1:0] convert(int v, int codes[N], int cs);
    logic [N-1:0] u, b;
    real res, e;
    res = real'(v) / 2.0;
    e = sync_err(cs);
    if (e > 2.0 || e < -2.0) return '0;
    for (int k = N - 1; k >= 0; k--) begin
      real r;
      r = ref_w(k, codes[k]);
      u[k] = (res + e > r);
      res = (res + e > r) ? res + e - r : r - res - e;
    end
    b[N-1] = u[N-1];
    for (int k = N - 2; k >= 0; k--) b[k] = ~(u[k] ^ b[k+1]);
    return b;
  endfunction

  // Registered stand-in, one conversion per clock
  always @(posedge clk) begin
    int codes[N];
    for (int k = 0; k < N; k++) codes[k] = int'(vc[k]);
    tdc_out <= convert(int'(vsig), codes, int'(vc_synch));
  end

  function automatic int level(int k);
    return (1 << (N + 1)) - (1 << (k + 1));
  endfunction

  // Exhaustive search of one pulse-generator pass at synchronization code cs
  task automatic expect_pg(int cs, ref int codes[N]);
    for (int k = 0; k < N; k++) codes[k] = 128;
    for (int k = N - 1; k >= 0; k--) begin
      int best;
      logic [N-1:0] o;
      best = 0;
      for (int c = 0; c < 256; c++) begin
        codes[k] = c;
        o = convert(level(k), codes, cs);
        if (!o[k]) best = c;
      end
      codes[k] = best;
    end
  endtask

  // Returns 0 without running when code 128 is outside the full-scale window
  // (the controller assumes its first synchronization trial is inside it)
  task automatic run_and_check(int tag, output bit ran);
    int codes[N];
    int hi, lo, cs, cycles;
    ran = 1'b0;
    expect_pg(128, codes);
    hi = -1; lo = -1;
    for (int c = 0; c < 256; c++)
      if (convert((1 << (N + 1)) - 1, codes, c) == '1) begin
        if (lo < 0) lo = c;
        hi = c;
      end
    if (hi < 128 || lo > 128) return;
    ran = 1'b1;
    cs = (hi + lo + 1) / 2;
    expect_pg(cs, codes);

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 0;
    while (!done && cycles < 4 * CAL_CYCLES) begin
      checks++;
      if (!busy || !cal_sel) failures++;
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != CAL_CYCLES) begin
      failures++;
      $display("[%0d] calibration took %0d cycles, expected %0d", tag, cycles, CAL_CYCLES);
    end
    checks++;
    if (int'(vc_synch) != cs) begin
      failures++;
      $display("[%0d] vc_synch=%0d expected %0d (window %0d..%0d)", tag, vc_synch, cs, lo, hi);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (int'(vc[k]) != codes[k]) begin
        failures++;
        $display("[%0d] vc[%0d]=%0d expected %0d", tag, k, vc[k], codes[k]);
      end
    end
    checks++;
    if (busy || cal_sel || !done) failures++;
  endtask

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (busy || done || cal_sel) failures++;
    rst_n = 1'b1;
    for (int run = 0; run < 12; ) begin
      bit ran;
      for (int k = 0; k < N; k++) g[k] = 0.95 + 0.10 * real'($urandom_range(1000)) / 1000.0;
      e0 = 1.6 + 1.6 * real'($urandom_range(1000)) / 1000.0;
      run_and_check(run, ran);
      if (ran) run++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
