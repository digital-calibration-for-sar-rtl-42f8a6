// Shared constants, types and delay law of the SAR-CD TDC calibration design.
//
// The resolution (9 bits), the 8-bit control-voltage word, the 0.65-1.2 V
// control range, the 0.4-0.6 V input range, the 31.5 ns full-scale time and
// the 34 ns sampling period are the figures of the design this RTL follows.
// The linear delay law used by the behavioural models of the current-starved
// delay cells (ALPHA, the mid-range point and the nominal gate delay) is this
// design's own choice: it only needs to be monotonic, to shorten the delay as
// Vc rises, and to span enough range to cover process and temperature drift.
package tdc_calib_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Digital sizes
  parameter int unsigned ADC_BITS = 9;   // TDC resolution N
  parameter int unsigned VC_BITS  = 8;   // control word per delay (256 levels)

  // Calibration controller state
  typedef enum logic [1:0] {
    CAL_IDLE = 2'd0,   // waiting for a start request, outputs hold
    CAL_PG   = 2'd1,   // tuning the pulse-generator control word of one stage
    CAL_SYNC = 2'd2,   // tuning the shared synchronization-delay control word
    CAL_DONE = 2'd3    // finished, input multiplexer back on the external input
  } cal_state_e;

  // Analog figures (used by the behavioural models and their testbenches)
  localparam real FS_PS      = 31500.0;  // full-scale pulse width, ps
  localparam real SAMPLE_PS  = 34000.0;  // sampling period, ps (29.4 MHz)
  localparam real VC_MIN_V   = 0.65;     // control voltage range
  localparam real VC_MAX_V   = 1.2;
  localparam real VSIG_MIN_V = 0.4;      // input voltage range
  localparam real VSIG_MAX_V = 0.6;

  // Behavioural delay law of a current-starved inverter loaded by a capacitor:
  //   delay = base * corner * (1 + ALPHA * (VC_MID_V - vc))
  localparam real ALPHA_PER_V = 0.4;
  localparam real VC_MID_V    = (VC_MIN_V + VC_MAX_V) / 2.0;
  localparam real TGATE_PS    = 150.0;   // nominal pulse-generator path delay
  localparam real TTRIG_PS    = 8.0;     // narrowest pulse that triggers a stage

  function automatic real cs_delay_ps(real base_ps, real corner, real vc_v);
    return base_ps * corner * (1.0 + ALPHA_PER_V * (VC_MID_V - vc_v));
  endfunction

  // Control-DAC output in microvolts for a code of VC_BITS bits
  function automatic int unsigned vc_code_to_uv(int unsigned code);
    return 650000 + (code * 550000) / (1 << VC_BITS);
  endfunction

endpackage
