// SAR-CD time-based ADC with run-time delay calibration (top level).
//
// Signal path: the input multiplexer picks the external input level or the
// calibration logic's level; the ideal voltage-to-time converter turns it
// into a pulse once per sampling period; the N-stage SAR-CD TDC converts the
// pulse width into the N-bit word, which is registered on the sampling clock
// (out). The calibration logic watches out and drives the mux select, the
// calibration input level, one 8-bit control word per stage pulse generator
// and one shared word for the synchronization delays; control DACs turn the
// words into the analog control voltages. This is the calibration
// connection of the method: the calibration uses only the converter's normal
// input and output.
//
// Interface: clk is the sampling clock (29.4 MHz, 34 ns, in the reference
// configuration); rst_n is an asynchronous active-low reset of the digital
// logic; cal_start (one cycle) starts a calibration, during which cal_busy is
// high and the external input is ignored; cal_done is high after it. vin_ext
// is the external input level as an (N+1)-bit code of the 0.4-0.6 V range.
// Timing: the sample taken at a clock edge appears on out at the next edge.
// The control words are brought out for observation. The TDC model's raw
// stage decisions (tdc_u) and final residue (tdc_res) are observation points
// for its own testbench and are left unused here.
// GATE_CORNER, CS_CORNER and MISMATCH only parameterize the analog models
// (drift of gate delays, drift of current-starved delays, per-stage spread of
// the reference widths); they are this design's own test knobs.
module tdc_calib_top
  import tdc_calib_pkg::*;
#(
  parameter int unsigned N           = ADC_BITS,
  parameter int unsigned VC_W        = VC_BITS,
  parameter int unsigned CONV_CYCLES = 2,
  parameter real         GATE_CORNER = 1.0,
  parameter real         CS_CORNER   = 1.0,
  parameter real         MISMATCH    = 0.03
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cal_start,
  input  logic [N:0]             vin_ext,
  output logic [N-1:0]           out,
  output logic                   cal_busy,
  output logic                   cal_done,
  output logic [N-1:0][VC_W-1:0] vc_code,
  output logic [VC_W-1:0]        vc_synch_code
);
  timeunit 1ps; timeprecision 1ps;

  logic [N:0]          vsig_cal, vin_sel;
  logic                cal_sel;
  logic                tdc_pin, tdc_clr, tdc_res;
  logic [N-1:0]        tdc_u, tdc_out;
  logic [N-1:0][20:0]  vc_uv;
  logic [20:0]         vc_synch_uv;

  calib_ctrl #(.N(N), .VC_W(VC_W), .CONV_CYCLES(CONV_CYCLES)) u_calib (
    .clk(clk), .rst_n(rst_n), .start(cal_start), .tdc_out(out),
    .vc(vc_code), .vc_synch(vc_synch_code), .vsig(vsig_cal),
    .cal_sel(cal_sel), .busy(cal_busy), .done(cal_done));

  in_mux #(.W(N + 1)) u_mux (.sel(cal_sel), .ext_in(vin_ext), .cal_in(vsig_cal), .y(vin_sel));

  vtc_model #(.W(N + 1)) u_vtc (.clk(clk), .vin(vin_sel), .pulse(tdc_pin), .clr(tdc_clr));

  for (genvar k = 0; k < N; k++) begin : g_dac
    vc_dac_model #(.VC_W(VC_W)) u_dac (.code(vc_code[k]), .vc_uv(vc_uv[k]));
  end
  vc_dac_model #(.VC_W(VC_W)) u_dac_synch (.code(vc_synch_code), .vc_uv(vc_synch_uv));

  sarcd_tdc_model #(.N(N), .GATE_CORNER(GATE_CORNER), .CS_CORNER(CS_CORNER),
                    .MISMATCH(MISMATCH)) u_tdc (
    .pin(tdc_pin), .clr(tdc_clr), .vc_uv(vc_uv), .vc_synch_uv(vc_synch_uv),
    .u(tdc_u), .out(tdc_out), .res_out(tdc_res));

  // Output register: samples the finished conversion at the next clock edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= tdc_out;
  end

endmodule
