// Full-size testbench: the top with every parameter at its default (9-bit
// converter, 8-bit control words, nominal corners, 3% spread of the stage
// references). It converts a ramp of mid-code inputs before calibration,
// runs one complete calibration (checking its length and that each decision
// kind and the input switch happened) and requires every code of the ramp to
// be right afterwards.
module tdc_calib_top_full_tb;
  import tdc_calib_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N    = ADC_BITS;
  localparam int unsigned VC_W = VC_BITS;
  localparam int unsigned CC   = 2;
  localparam int unsigned CAL_CYCLES = (2 * N + 2) * VC_W * CC;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [N:0] vin_ext = '0;
  logic [N-1:0] out;
  logic cal_busy, cal_done;
  logic [N-1:0][VC_W-1:0] vc_code;
  logic [VC_W-1:0] vc_synch_code;
  int checks = 0, failures = 0;

  tdc_calib_top dut (
    .clk(clk), .rst_n(rst_n), .cal_start(cal_start), .vin_ext(vin_ext), .out(out),
    .cal_busy(cal_busy), .cal_done(cal_done), .vc_code(vc_code), .vc_synch_code(vc_synch_code));

  always #17000 clk = ~clk;   // 34 ns sampling period

  // Mechanism counters: decisions are read from the controller at the edges
  // where it takes them; the stage bit it looks at is out[bit_adc]
  int pg_clear = 0, pg_keep = 0, sy_clear = 0, sy_keep = 0, mux_cal = 0, mux_ext = 0;
  logic busy_prev = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_calib.conv_ready) begin
      if (dut.u_calib.state == CAL_PG) begin
        if (out[dut.u_calib.bit_adc]) pg_clear++; else pg_keep++;
      end
      if (dut.u_calib.state == CAL_SYNC) begin
        if (out != '1) sy_clear++; else sy_keep++;
      end
    end
    if (cal_busy && dut.u_mux.y == dut.vsig_cal) mux_cal++;
    if (busy_prev && !cal_busy) mux_ext++;
    busy_prev <= cal_busy;
  end

  // Converts one input code per sample; returns the number of wrong outputs
  task automatic ramp(output int errors, output int max_err);
    int expected_prev = -1;
    errors = 0;
    max_err = 0;
    for (int x = 0; x <= (1 << N); x++) begin
      @(negedge clk);
      vin_ext = (x < (1 << N)) ? (N+1)'(2 * x + 1) : '0;
      @(posedge clk); #1;
      // out now holds the conversion of the sample taken one edge earlier
      if (expected_prev >= 0 && out != N'(expected_prev)) begin
        int d;
        d = int'(out) - expected_prev;
        if (d < 0) d = -d;
        errors++;
        if (d > max_err) max_err = d;
      end
      expected_prev = (x < (1 << N)) ? x : -1;
    end
  endtask

  initial begin
    #(400_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err_before, err_after, max_before, max_after, cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    ramp(err_before, max_before);
    $display("before calibration: %0d of %0d codes wrong, largest error %0d", err_before, 1 << N, max_before);

    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    cycles = 0;
    while (!cal_done && cycles < 10 * CAL_CYCLES) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != CAL_CYCLES) begin
      failures++;
      $display("calibration took %0d cycles, expected %0d", cycles, CAL_CYCLES);
    end
    $display("calibration: %0d cycles, synch word %0d", cycles, vc_synch_code);
    for (int k = N - 1; k >= 0; k--) $display("  vc[%0d] = %0d", k, vc_code[k]);

    ramp(err_after, max_after);
    $display("after calibration: %0d of %0d codes wrong, largest error %0d", err_after, 1 << N, max_after);
    checks++;
    if (err_after != 0) failures++;
    checks++;
    if (err_before == 0) begin
      failures++;
      $display("drifted corner gave no error before calibration");
    end

    $display("mechanisms: pg_clear=%0d pg_keep=%0d sync_clear=%0d sync_keep=%0d mux_cal=%0d mux_back=%0d",
             pg_clear, pg_keep, sy_clear, sy_keep, mux_cal, mux_ext);
    checks++; if (pg_clear == 0) failures++;
    checks++; if (pg_keep  == 0) failures++;
    checks++; if (sy_clear == 0) failures++;
    checks++; if (sy_keep  == 0) failures++;
    checks++; if (mux_cal != CAL_CYCLES) begin failures++; $display("mux on calibration input for %0d cycles", mux_cal); end
    checks++; if (mux_ext != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
